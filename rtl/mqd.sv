// mqd: MQ arithmetic decoder for one coding pass, one decision per clock.
// It is the counterpart of the encoder in mqc: 19 adaptive contexts with the
// 47-state probability table of jp2k_pkg, a 16-bit interval A and a 32-bit
// code register C whose upper half is compared with Qe (the LPS
// sub-interval lies at the bottom, as the encoder places it). A pulse on start
// resets the contexts and the byte pointer; the next clock reads the first
// bytes (initialisation) and ready rises. After that, every clock with
// in_valid decodes the decision of context in_cx; out_d is valid on the next
// clock with out_valid.
// Bytes come from a bit-stream buffer through a five-byte window: rd_addr is
// the current byte pointer and rd_win[k] must hold the byte at rd_addr+k
// combinationally. Bytes at or after len are read as 0xFF, so the decoder
// runs on past the end of a terminated pass as the standard requires. The
// window covers the up to three bytes a single decision can consume.
// The decoder is non-speculative: the document's speculative decoding of a
// bit that may belong to the SP pass, and its context correction for two
// successive bits, are this block's missing part. Interface and timing are
// this design's choice.
module mqd
  import jp2k_pkg::*;
#(
  parameter int AW = 8                  // byte address width (256-byte pass streams)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   len,            // stream length in bytes
  output logic [AW:0]   rd_addr,
  input  logic [7:0]    rd_win [5],
  output logic          ready,
  input  logic          in_valid,
  input  logic [4:0]    in_cx,
  output logic          out_valid,
  output logic          out_d
);
  typedef struct packed {
    logic [15:0] a;
    logic [31:0] c;
    logic [3:0]  ct;
    logic [2:0]  k;                     // bytes consumed from the window
  } dstate_t;

  logic [5:0] idx [NCTX];
  logic       mps [NCTX];
  logic [AW:0] bp;
  logic       init_pend;
  dstate_t    cur, nxt_init, nxt_dec;
  logic [7:0] w [6];
  logic       d_out, mps_new;
  logic [5:0] idx_new;

  assign rd_addr = bp;

  // window with bytes past the end of the stream read as 0xFF
  always_comb begin
    for (int k = 0; k < 5; k++) w[k] = ((bp + (AW+1)'(k)) < len) ? rd_win[k] : 8'hFF;
    w[5] = 8'hFF;
  end

  function automatic dstate_t bytein(dstate_t s, logic [7:0] win [6]);
    dstate_t r;
    r = s;
    if (win[s.k] == 8'hFF) begin
      if (win[s.k + 3'd1] > 8'h8F) begin
        r.c  = s.c + 32'h0000_FF00;
        r.ct = 4'd8;
      end else begin
        r.k  = s.k + 3'd1;
        r.c  = s.c + {15'd0, win[s.k + 3'd1], 9'd0};
        r.ct = 4'd7;
      end
    end else begin
      r.k  = s.k + 3'd1;
      r.c  = s.c + {16'd0, win[s.k + 3'd1], 8'd0};
      r.ct = 4'd8;
    end
    return r;
  endfunction

  function automatic dstate_t renormd(dstate_t s, logic [7:0] win [6]);
    dstate_t r;
    logic    fin;
    r   = s;
    fin = 1'b0;
    for (int i = 0; i < 16; i++) begin
      if (!fin) begin
        if (r.ct == 4'd0) r = bytein(r, win);
        r.a  = r.a << 1;
        r.c  = r.c << 1;
        r.ct = r.ct - 4'd1;
        if (r.a[15]) fin = 1'b1;
      end
    end
    return r;
  endfunction

  // initialisation from the first bytes of the stream (INITDEC)
  always_comb begin
    dstate_t s;
    s   = '0;
    s.c = {8'd0, w[0], 16'd0};
    s   = bytein(s, w);
    s.c = s.c << 7;
    s.ct = s.ct - 4'd7;
    s.a = 16'h8000;
    nxt_init = s;
  end

  // one decision (DECODE with MPS/LPS exchange and renormalisation)
  always_comb begin
    qe_ent_t  q;
    dstate_t  s;
    logic [15:0] a1;
    q       = qe_table(idx[in_cx]);
    s       = cur;
    s.k     = 3'd0;
    a1      = cur.a - q.qe;
    d_out   = mps[in_cx];
    mps_new = mps[in_cx];
    idx_new = idx[in_cx];
    if (cur.c[31:16] < q.qe) begin
      // lower sub-interval: the LPS one, unless the exchange applies
      if (a1 < q.qe) begin
        idx_new = q.nmps;
      end else begin
        d_out   = !mps[in_cx];
        mps_new = q.sw ? !mps[in_cx] : mps[in_cx];
        idx_new = q.nlps;
      end
      s.a = q.qe;
      s   = renormd(s, w);
    end else begin
      s.c[31:16] = cur.c[31:16] - q.qe;
      s.a = a1;
      if (!a1[15]) begin
        if (a1 < q.qe) begin
          d_out   = !mps[in_cx];
          mps_new = q.sw ? !mps[in_cx] : mps[in_cx];
          idx_new = q.nlps;
        end else begin
          idx_new = q.nmps;
        end
        s = renormd(s, w);
      end
    end
    nxt_dec = s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur       <= '0;
      bp        <= '0;
      init_pend <= 1'b0;
      ready     <= 1'b0;
      out_valid <= 1'b0;
      out_d     <= 1'b0;
      for (int i = 0; i < NCTX; i++) begin
        idx[i] <= ctx_init(i);
        mps[i] <= 1'b0;
      end
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        bp        <= '0;
        init_pend <= 1'b1;
        ready     <= 1'b0;
        for (int i = 0; i < NCTX; i++) begin
          idx[i] <= ctx_init(i);
          mps[i] <= 1'b0;
        end
      end else if (init_pend) begin
        cur       <= nxt_init;
        bp        <= bp + (AW+1)'(nxt_init.k);
        init_pend <= 1'b0;
        ready     <= 1'b1;
      end else if (ready && in_valid) begin
        cur          <= nxt_dec;
        bp           <= bp + (AW+1)'(nxt_dec.k);
        idx[in_cx]   <= idx_new;
        mps[in_cx]   <= mps_new;
        out_valid    <= 1'b1;
        out_d        <= d_out;
      end
    end
  end

  a_window: assert property (@(posedge clk) disable iff (!rst_n) ready && in_valid |-> nxt_dec.k <= 3'd4);
endmodule
