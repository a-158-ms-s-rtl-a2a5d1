// mqc: MQ arithmetic encoder of one bit-plane coder.
// The three passes of a bit-plane are modelled at the same time, so each pass
// owns a complete coder: interval register A, code register C, bit counter CT,
// pending byte B and its own 19-context probability table. Every pass therefore
// produces its own terminated code word (the RESET and RESTART coding styles),
// which is what lets the passes and bit-planes run in parallel.
// Up to two CX-D pairs of the same pass are accepted per clock (in_valid[0],
// and in_valid[1] for a second one, e.g. the zero-coding and sign decisions of
// the same bit), coded one after the other in one combinational step; the
// renormalisation loop is unrolled so nothing stalls. A byte is only released
// when the next one is started, because a carry can still ripple into it; a
// clock releases up to four bytes, a flush up to three (out_cnt, out_byte[0]
// first); the output is registered, one clock after the input.
// flush terminates the code word of flush_pass and re-initialises that coder
// and its contexts for the next code-block. The coding procedure is the
// standard MQ encoder; the document only names this unit.
module mqc
  import jp2k_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid [2],   // [1] only together with [0], same pass
  input  cxd_t       in_cxd   [2],
  input  logic       flush,
  input  pass_e      flush_pass,
  output logic [2:0] out_cnt,
  output logic [7:0] out_byte [4],
  output pass_e      out_pass
);
  typedef struct packed {
    logic [15:0] a;
    logic [27:0] c;
    logic [3:0]  ct;
    logic [7:0]  b;
    logic        bvalid;   // B holds a real byte (not the initial placeholder)
  } coder_t;

  coder_t     cs    [3];
  logic [5:0] idx   [3][NCTX];
  logic       mps   [3][NCTX];

  // coder state plus the bytes released so far in this clock
  typedef struct packed {
    coder_t          s;
    logic [2:0]      n;
    logic [3:0][7:0] o;
  } work_t;

  // work state plus the probability entry of the context being coded
  typedef struct packed {
    work_t      w;
    logic [5:0] ci;
    logic       cm;
  } enc_t;

  work_t      w;
  enc_t       e0, e1;
  logic       upd;
  int unsigned pi;
  logic [27:0] tempc;

  // release the pending byte and start a new one
  function automatic work_t byteout(input work_t wi);
    work_t      x;
    logic [7:0] bb;
    logic       big;
    x   = wi;
    bb  = x.s.b;
    big = 1'b0;
    if (x.s.b == 8'hFF) begin
      big = 1'b1;
    end else if (x.s.c[27]) begin
      bb  = x.s.b + 8'd1;
      big = (bb == 8'hFF);
      if (big) x.s.c[27] = 1'b0;
    end
    if (x.s.bvalid) begin
      x.o[x.n[1:0]] = bb;
      x.n           = x.n + 3'd1;
    end
    x.s.bvalid = 1'b1;
    if (big) begin
      x.s.b  = x.s.c[27:20];
      x.s.c  = {8'd0, x.s.c[19:0]};
      x.s.ct = 4'd7;
    end else begin
      x.s.b  = x.s.c[26:19];
      x.s.c  = {9'd0, x.s.c[18:0]};
      x.s.ct = 4'd8;
    end
    return x;
  endfunction

  // code one decision, updating coder state and context entry
  function automatic enc_t encode1(input enc_t ei, input logic d);
    enc_t    x;
    qe_ent_t e;
    x = ei;
    e = qe_table(x.ci);
    x.w.s.a = x.w.s.a - e.qe;
    if (d == x.cm) begin
      if (!x.w.s.a[15]) begin
        if (x.w.s.a < e.qe) x.w.s.a = e.qe;
        else                x.w.s.c = x.w.s.c + 28'(e.qe);
        x.ci = e.nmps;
      end else begin
        x.w.s.c = x.w.s.c + 28'(e.qe);
      end
    end else begin
      if (x.w.s.a < e.qe) x.w.s.c = x.w.s.c + 28'(e.qe);
      else                x.w.s.a = e.qe;
      if (e.sw) x.cm = ~x.cm;
      x.ci = e.nlps;
    end
    // renormalise: at most 15 shifts, at most two byte releases
    for (int k = 0; k < 16; k++) begin
      if (!x.w.s.a[15]) begin
        x.w.s.a  = x.w.s.a << 1;
        x.w.s.c  = x.w.s.c << 1;
        x.w.s.ct = x.w.s.ct - 4'd1;
        if (x.w.s.ct == 4'd0) x.w = byteout(x.w);
      end
    end
    return x;
  endfunction

  always_comb begin
    pi   = flush ? 32'(flush_pass) : 32'(in_cxd[0].pass);
    if (pi > 2) pi = 2;
    w     = '{s: cs[pi], n: 3'd0, o: '0};
    e0    = '{w: w, ci: idx[pi][in_cxd[0].cx], cm: mps[pi][in_cxd[0].cx]};
    e1    = '{w: w, ci: idx[pi][in_cxd[1].cx], cm: mps[pi][in_cxd[1].cx]};
    upd   = 1'b0;
    tempc = '0;
    if (flush) begin
      upd = 1'b1;
      // set as many final bits as possible to 1 inside the interval
      tempc  = w.s.c + 28'(w.s.a);
      w.s.c  = w.s.c | 28'h000FFFF;
      if (w.s.c >= tempc) w.s.c = w.s.c - 28'h0008000;
      w.s.c = w.s.c << w.s.ct;
      w     = byteout(w);
      w.s.c = w.s.c << w.s.ct;
      w     = byteout(w);
      if (w.s.b != 8'hFF && w.s.bvalid) begin
        w.o[w.n[1:0]] = w.s.b;
        w.n           = w.n + 3'd1;
      end
    end else if (in_valid[0]) begin
      upd = 1'b1;
      e0  = encode1(e0, in_cxd[0].d);
      w   = e0.w;
      if (in_valid[1]) begin
        // the second decision may use the context the first one just updated
        e1.w = e0.w;
        if (in_cxd[1].cx == in_cxd[0].cx) begin
          e1.ci = e0.ci;
          e1.cm = e0.cm;
        end
        e1 = encode1(e1, in_cxd[1].d);
        w  = e1.w;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 3; p++) begin
        cs[p] <= '{a: 16'h8000, c: 28'd0, ct: 4'd12, b: 8'd0, bvalid: 1'b0};
        for (int x = 0; x < NCTX; x++) begin
          idx[p][x] <= ctx_init(x);
          mps[p][x] <= 1'b0;
        end
      end
      out_cnt  <= 3'd0;
      out_byte <= '{default: 8'h00};
      out_pass <= PASS_SP;
    end else begin
      out_cnt  <= upd ? w.n : 3'd0;
      for (int k = 0; k < 4; k++) out_byte[k] <= w.o[k];
      out_pass <= pass_e'(pi[1:0]);
      if (upd) begin
        if (flush) begin
          cs[pi] <= '{a: 16'h8000, c: 28'd0, ct: 4'd12, b: 8'd0, bvalid: 1'b0};
          for (int x = 0; x < NCTX; x++) begin
            idx[pi][x] <= ctx_init(x);
            mps[pi][x] <= 1'b0;
          end
        end else begin
          cs[pi] <= w.s;
          idx[pi][in_cxd[0].cx] <= e0.ci;
          mps[pi][in_cxd[0].cx] <= e0.cm;
          if (in_valid[1]) begin
            idx[pi][in_cxd[1].cx] <= e1.ci;
            mps[pi][in_cxd[1].cx] <= e1.cm;
          end
        end
      end
    end
  end
endmodule
