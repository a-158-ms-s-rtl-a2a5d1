// bpc: bit-plane coder, encoding one magnitude bit-plane of every code-block.
// A code-block is walked as a linear sequence of steps s. Step s takes the
// upper plane's column s+NC+1 from the U-FIFO into the stripe buffer, runs the
// SP pass on column s and the MR and CU passes on column s-NC-1 (one stripe and
// one column behind), writes the results back and sends column s-NC-1, now
// final, to the lower plane through the L-FIFO. Steps run from -(NC+1) (only
// filling the buffer) to NSTR*NC+NC (only MR/CU), so a code-block takes
// NSTR*NC+2*NC+2 steps. A step fires when the U-FIFO has data (if a column is
// due), the L-FIFO has room (if a column is sent) and the CX-D pairs of the
// previous step are all but sent: the pairs of a step leave towards the MQ
// coder one modelled bit per clock (a zero-coding or refinement decision
// together with its sign decision), so a step costs max(1, modelled bits)
// clocks, a run-length column with a 1 three clocks.
// After the last step the three pass coders are flushed (three clocks) and done
// pulses. The magnitude bits are read from the code-block buffer bank
// cb_count mod NBANK, column s; the code words go to the bit-stream buffer
// section of the same number.
module bpc
  import jp2k_pkg::*;
#(
  parameter int NC    = CB_W,
  parameter int NSTR  = CB_H / 4,
  localparam int CW   = $clog2(NC),
  localparam int SW   = $clog2(NSTR) + 1,
  localparam int XW   = $clog2(NSTR * NC) + 2   // signed step counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  band_e         band,
  input  logic          vcausal,
  // U-FIFO (from the upper plane or the sign plane feeder)
  input  logic          u_empty,
  input  col_item_t     u_item,
  output logic          u_pop,
  // L-FIFO (to the lower plane)
  input  logic          l_full,
  output logic          l_push,
  output col_item_t     l_item,
  // code-block buffer read port of this plane
  output logic [$clog2(NBANK)-1:0] cbb_bank,
  output logic [$clog2(NSTR*NC)-1:0] cbb_col,
  input  logic [3:0]    cbb_bits,
  // bit-stream buffer write port of this plane
  output logic          bs_clear,      // new code-block: clear the lengths of bs_sec
  output logic [$clog2(NBANK)-1:0] bs_sec,
  output pass_e         bs_pass,
  output logic [2:0]    bs_cnt,
  output logic [7:0]    bs_byte [4],
  // status
  output logic          done,          // code-block finished (pulse)
  output logic          stall_up,      // waiting on an empty U-FIFO
  output logic          stall_low      // waiting on a full L-FIFO
);
  localparam int NCOL  = NSTR * NC;
  localparam int S_FIRST = -(NC + 1);
  localparam int S_LAST  = NCOL + NC;

  typedef enum logic [1:0] {ST_RUN, ST_FLUSH, ST_DONE} bstate_e;
  bstate_e          st;
  logic signed [XW-1:0] s;
  logic [1:0]       fl;
  logic [7:0]       cbcnt;
  logic [18:0]      ebuf_v;
  cxd_t             ebuf [19];

  // step geometry
  logic signed [XW-1:0] j, c;
  logic          pop_need, sp_act, cu_act, ok, fire, last;
  logic [XW-1:0] su, cu_u, ju;
  assign j        = s + XW'(NC + 1);
  assign c        = s - XW'(NC + 1);
  assign su       = s;
  assign cu_u     = c;
  assign ju       = j;
  assign pop_need = (st == ST_RUN) && (j < XW'(NCOL));
  assign sp_act   = (st == ST_RUN) && (s >= 0) && (s < XW'(NCOL));
  assign cu_act   = (st == ST_RUN) && (c >= 0) && (c < XW'(NCOL));
  assign last     = (s == XW'(S_LAST));

  // stripe buffer
  cstate_t [3:0] up_q [4][NC], sp_q [4][NC], cu_q [4][NC];
  logic    [3:0] sgn_q [4][NC], pd1_q [4][NC], v_q [4][NC];
  cstate_t [3:0] sp_st, cu_st;
  logic    [3:0] sp_pd1;
  col_item_t     low_item;
  logic [18:0]   list_v;
  cxd_t          list [19];

  ssb #(.NC(NC)) u_ssb (
    .clk,
    .up_we(fire && pop_need), .up_slot(ju[CW+1:CW]), .up_col(ju[CW-1:0]), .up_item(u_item),
    .sp_we(fire && sp_act), .sp_slot(su[CW+1:CW]), .sp_col(su[CW-1:0]),
    .sp_st(sp_st), .sp_pd1(sp_pd1), .sp_v(cbb_bits),
    .cu_we(fire && cu_act), .cu_slot(cu_u[CW+1:CW]), .cu_col(cu_u[CW-1:0]), .cu_st(cu_st),
    .up_q, .sgn_q, .sp_q, .pd1_q, .v_q, .cu_q);

  pp #(.NC(NC), .NSTR(NSTR)) u_pp (
    .band, .vcausal,
    .sp_act, .sp_n(SW'(su >> CW)), .sp_l({1'b0, su[CW-1:0]}), .sp_bits(cbb_bits),
    .cu_act, .cu_n(SW'(cu_u >> CW)), .cu_l({1'b0, cu_u[CW-1:0]}),
    .byp_valid(pop_need), .byp_item(u_item),
    .up_q, .sgn_q, .sp_q, .pd1_q, .v_q, .cu_q,
    .sp_st, .sp_pd1, .cu_st, .low_item, .list_valid(list_v), .list);

  assign cbb_bank = cbcnt[$clog2(NBANK)-1:0];
  assign cbb_col  = su[$clog2(NCOL)-1:0];

  // Each clock sends the lowest pending list entry, together with the next
  // entry if it belongs to the same bit (zero coding or refinement followed by
  // the sign) or is the second uniform symbol of a run. List groups:
  // {0,1} {2,3} {4,5} {6,7} (SP rows), {8} (run), {9,10} (uniform),
  // {11,12} {13,14} {15,16} {17,18} (MR/CU rows).
  logic [18:0] pick, pick2, pick_all;
  logic        emit;
  logic        emit_v [2];
  cxd_t        emit_cxd [2];
  int          e0;
  always_comb begin
    e0 = 0;
    for (int e = 18; e >= 0; e--) if (ebuf_v[e]) e0 = e;
    emit        = |ebuf_v;
    pick        = emit ? (19'd1 << e0) : '0;
    emit_cxd[0] = ebuf[e0];
    emit_cxd[1] = ebuf[(e0 < 18) ? e0 + 1 : 18];
    emit_v[0]   = emit;
    emit_v[1]   = emit && (e0 < 18) && ebuf_v[(e0 < 18) ? e0 + 1 : 18] &&
                  ((e0 < 8) ? (e0 % 2 == 0) : (e0 >= 9) && (e0 % 2 == 1));
    pick2       = emit_v[1] ? (19'd1 << (e0 + 1)) : '0;
    pick_all    = pick | pick2;
  end

  assign ok        = (!pop_need || !u_empty) && (!cu_act || !l_full) && ((ebuf_v & ~pick_all) == '0);
  assign fire      = (st == ST_RUN) && ok;
  assign u_pop     = fire && pop_need;
  assign l_push    = fire && cu_act;
  assign l_item    = low_item;
  assign stall_up  = (st == ST_RUN) && pop_need && u_empty;
  assign stall_low = (st == ST_RUN) && cu_act && l_full;

  // MQ coder
  logic  flush;
  assign flush = (st == ST_FLUSH) && !emit;
  mqc u_mqc (.clk, .rst_n, .in_valid(emit_v), .in_cxd(emit_cxd),
             .flush, .flush_pass(pass_e'(fl)),
             .out_cnt(bs_cnt), .out_byte(bs_byte), .out_pass(bs_pass));

  // the bit-stream port runs one clock behind, like the MQ coder output
  logic [$clog2(NBANK)-1:0] sec_d;
  logic clear_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sec_d   <= '0;
      clear_d <= 1'b0;
    end else begin
      sec_d   <= cbb_bank;
      clear_d <= fire && (s == XW'(S_FIRST));
    end
  end
  assign bs_sec   = sec_d;
  assign bs_clear = clear_d;

  // list entries are only read where ebuf_v marks them valid
  always_ff @(posedge clk) begin
    if (fire) ebuf <= list;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= ST_RUN;
      s      <= XW'(S_FIRST);
      fl     <= 2'd0;
      cbcnt  <= '0;
      ebuf_v <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (fire) begin
        ebuf_v <= list_v;
      end else begin
        ebuf_v <= ebuf_v & ~pick_all;
      end
      case (st)
        ST_RUN: if (fire) begin
          if (last) begin
            st <= ST_FLUSH;
            fl <= 2'd0;
          end else begin
            s <= s + 1'b1;
          end
        end
        ST_FLUSH: if (flush) begin
          if (fl == 2'd2) st <= ST_DONE;
          fl <= fl + 2'd1;
        end
        default: begin
          done  <= 1'b1;
          cbcnt <= cbcnt + 8'd1;
          s     <= XW'(S_FIRST);
          st    <= ST_RUN;
        end
      endcase
    end
  end
endmodule
