// pp: pre-processor of a bit-plane coder (pass decision, state evaluation and
// the state write-back, SSW).
// In one step it handles two columns of the same bit-plane:
//   * the SP column (stripe n, column l), and
//   * the MR/CU column one stripe and one column behind it (stripe n-1,
//     column l-1), so the three passes overlap in time.
// Pass decisions follow PD1 = ~sig_up & NS, PD2 = sig_up, PD3 = ~PD1 & ~sig_sp,
// where sig_up is the significance after the upper plane's CU pass, sig_sp the
// significance after this plane's SP pass and NS the OR of the eight
// neighbours, taking neighbours earlier in scan order after this plane's SP
// pass and later ones from the upper plane. MR contexts see the states after
// the SP pass; CU contexts see the states after CU for earlier positions and
// after SP for later ones. That makes the result identical to coding the three
// passes one after the other. All inputs and outputs are combinational; the
// owning bpc latches the results on the step's clock edge.
// Outputs: the SP and CU write-back data for the SSB, the column item for the
// lower plane (states after CU plus signs) and a list of up to 19 CX-D pairs in
// coding order (8 for the SP column, 11 for the MR/CU column: run-length,
// two uniform symbols, then a refinement or zero-coding and a sign symbol per
// row). Coefficient states use two bits (0 insignificant, 1 significant from
// this plane's SP pass, 2 significant and never refined, 3 refined).
// vcausal selects the vertically causal mode: the row below a stripe is then
// treated as insignificant.
module pp
  import jp2k_pkg::*;
#(
  parameter int NC   = CB_W,       // columns per stripe
  parameter int NSTR = CB_H / 4,   // stripes per code-block
  localparam int CW  = $clog2(NC),
  localparam int SW  = $clog2(NSTR) + 1
) (
  input  band_e         band,
  input  logic          vcausal,
  // SP column
  input  logic          sp_act,
  input  logic [SW-1:0] sp_n,
  input  logic [CW:0]   sp_l,
  input  logic [3:0]    sp_bits,       // magnitude bits of the SP column (from CBB)
  // MR/CU column
  input  logic          cu_act,
  input  logic [SW-1:0] cu_n,
  input  logic [CW:0]   cu_l,
  // upper-plane column arriving this step (stripe sp_n+1, column sp_l+1)
  input  logic          byp_valid,
  input  col_item_t     byp_item,
  // stripe buffer contents
  input  cstate_t [3:0] up_q  [4][NC],
  input  logic    [3:0] sgn_q [4][NC],
  input  cstate_t [3:0] sp_q  [4][NC],
  input  logic    [3:0] pd1_q [4][NC],
  input  logic    [3:0] v_q   [4][NC],
  input  cstate_t [3:0] cu_q  [4][NC],
  // results
  output cstate_t [3:0] sp_st,
  output logic    [3:0] sp_pd1,
  output cstate_t [3:0] cu_st,
  output col_item_t     low_item,
  output logic    [18:0] list_valid,
  output cxd_t          list [19]
);
  // significance / sign windows: rows 0..5 = stripe row -1..4, cols 0..2 = l-1..l+1
  logic spw_sig [6][3], spw_sgn [6][3];
  logic mrw_sig [6][3], cuw_sig [6][3], cuw_sgn [6][3];
  nbr_t sp_nbr [4], mc_nbr [4], mr_nbr [4], cu_nbr [4];
  logic [4:0] sp_mr [4];  // unused: SP bits never refine
  logic [4:0] sp_zc [4], sp_sc [4], mc_zc [4], mc_sc [4], mc_mr [4];
  logic       sp_x [4], mc_x [4], sp_any [4], mc_any [4];
  logic       first_ref [4];

  // per-row decisions
  cstate_t [3:0] cu_up, cu_sp;
  logic    [3:0] cu_pd1, cu_v, cu_sg, pd2, pd3, newsig_cu, ns0;
  logic          rl, one;
  logic [1:0]    q;
  int            sn, sl, cn, cl;

  function automatic logic in_cb(input int y, input int x);
    return (y >= 0) && (y < NSTR) && (x >= 0) && (x < NC);
  endfunction

  function automatic nbr_t mk_nbr(input logic s [6][3], input logic g [6][3], input int row);
    nbr_t o;
    o.sig = {s[row+1][2], s[row+1][0], s[row-1][2], s[row-1][0],
             s[row+1][1], s[row-1][1], s[row][2], s[row][0]};
    o.sgn = {g[row+1][1], g[row-1][1], g[row][2], g[row][0]};
    return o;
  endfunction

  function automatic logic any8(input logic s [6][3], input int row);
    return s[row-1][0] | s[row-1][1] | s[row-1][2] | s[row][0] | s[row][2] |
           s[row+1][0] | s[row+1][1] | s[row+1][2];
  endfunction

  // ---------------- SP column ----------------
  always_comb begin
    sn = int'(sp_n);
    sl = int'(sp_l);
    sp_st  = '0;
    sp_pd1 = '0;
    for (int rr = 0; rr < 6; rr++)
      for (int c = 0; c < 3; c++) begin
        spw_sig[rr][c] = 1'b0;
        spw_sgn[rr][c] = 1'b0;
      end
    for (int c = 0; c < 3; c++) begin
      automatic int x = sl - 1 + c;
      // stripe above, bottom row, after this plane's SP pass
      if (in_cb(sn - 1, x)) begin
        spw_sig[0][c] = sp_q[2'(sn - 1)][x][3] != 2'd0;
        spw_sgn[0][c] = sgn_q[2'(sn - 1)][x][3];
      end
      for (int r = 0; r < 4; r++) begin
        if (in_cb(sn, x)) begin
          spw_sig[r+1][c] = (c == 0) ? (sp_q[2'(sn)][x][r] != 2'd0) : (up_q[2'(sn)][x][r] != 2'd0);
          spw_sgn[r+1][c] = sgn_q[2'(sn)][x][r];
        end
      end
      // stripe below, top row, from the upper plane
      if (in_cb(sn + 1, x) && !vcausal) begin
        if (byp_valid && c == 2) begin
          spw_sig[5][c] = byp_item.st[0] != 2'd0;
          spw_sgn[5][c] = byp_item.sgn[0];
        end else begin
          spw_sig[5][c] = up_q[2'(sn + 1)][x][0] != 2'd0;
          spw_sgn[5][c] = sgn_q[2'(sn + 1)][x][0];
        end
      end
    end
    for (int r = 0; r < 4; r++) begin
      automatic cstate_t up = in_cb(sn, sl) ? up_q[2'(sn)][sl][r] : 2'd0;
      sp_nbr[r]  = mk_nbr(spw_sig, spw_sgn, r + 1);
      sp_pd1[r]  = sp_act && (up == 2'd0) && any8(spw_sig, r + 1);
      sp_st[r]   = (up != 2'd0) ? up : ((sp_pd1[r] && sp_bits[r]) ? 2'd1 : 2'd0);
      spw_sig[r+1][1] = sp_st[r] != 2'd0;
    end
  end

  // ---------------- MR / CU column ----------------
  always_comb begin
    cn = int'(cu_n);
    cl = int'(cu_l);
    for (int rr = 0; rr < 6; rr++)
      for (int c = 0; c < 3; c++) begin
        mrw_sig[rr][c] = 1'b0;
        cuw_sig[rr][c] = 1'b0;
        cuw_sgn[rr][c] = 1'b0;
      end
    for (int c = 0; c < 3; c++) begin
      automatic int x = cl - 1 + c;
      if (in_cb(cn - 1, x)) begin
        mrw_sig[0][c] = sp_q[2'(cn - 1)][x][3] != 2'd0;
        cuw_sig[0][c] = cu_q[2'(cn - 1)][x][3] != 2'd0;
        cuw_sgn[0][c] = sgn_q[2'(cn - 1)][x][3];
      end
      for (int r = 0; r < 4; r++) begin
        if (in_cb(cn, x)) begin
          mrw_sig[r+1][c] = sp_q[2'(cn)][x][r] != 2'd0;
          cuw_sig[r+1][c] = (c == 0) ? (cu_q[2'(cn)][x][r] != 2'd0) : (sp_q[2'(cn)][x][r] != 2'd0);
          cuw_sgn[r+1][c] = sgn_q[2'(cn)][x][r];
        end
      end
      if (in_cb(cn + 1, x) && !vcausal) begin
        // the column right below-right is the SP column of this very step
        mrw_sig[5][c] = (c == 2) ? (sp_st[0] != 2'd0) : (sp_q[2'(cn + 1)][x][0] != 2'd0);
        cuw_sig[5][c] = mrw_sig[5][c];
        cuw_sgn[5][c] = sgn_q[2'(cn + 1)][x][0];
      end
    end
    for (int r = 0; r < 4; r++) begin
      cu_up[r]  = in_cb(cn, cl) ? up_q [2'(cn)][cl][r] : 2'd0;
      cu_sp[r]  = in_cb(cn, cl) ? sp_q [2'(cn)][cl][r] : 2'd0;
      cu_pd1[r] = in_cb(cn, cl) ? pd1_q[2'(cn)][cl][r] : 1'b0;
      cu_v[r]   = in_cb(cn, cl) ? v_q  [2'(cn)][cl][r] : 1'b0;
      cu_sg[r]  = in_cb(cn, cl) ? sgn_q[2'(cn)][cl][r] : 1'b0;
      pd2[r]    = cu_act && (cu_up[r] != 2'd0);
      pd3[r]    = cu_act && !cu_pd1[r] && (cu_sp[r] == 2'd0);
      ns0[r]    = any8(cuw_sig, r + 1);
      mr_nbr[r] = mk_nbr(mrw_sig, cuw_sgn, r + 1);
    end
    // run-length mode: all four rows left for CU and no significant neighbour
    rl  = (&pd3) && !(|ns0);
    one = |cu_v;
    q   = cu_v[0] ? 2'd0 : cu_v[1] ? 2'd1 : cu_v[2] ? 2'd2 : 2'd3;
    for (int r = 0; r < 4; r++) begin
      cu_nbr[r]       = mk_nbr(cuw_sig, cuw_sgn, r + 1);
      newsig_cu[r]    = pd3[r] && cu_v[r] && !(rl && (!one || 2'(r) < q));
      cuw_sig[r+1][1] = (cu_sp[r] != 2'd0) || newsig_cu[r];
    end
    for (int r = 0; r < 4; r++) begin
      mc_nbr[r]    = pd2[r] ? mr_nbr[r] : cu_nbr[r];
      first_ref[r] = cu_up[r] == 2'd2;
      cu_st[r]     = (cu_up[r] != 2'd0) ? 2'd3 :
                     ((cu_sp[r] != 2'd0) || newsig_cu[r]) ? 2'd2 : 2'd0;
    end
    low_item.st  = cu_st;
    low_item.sgn = cu_sg;
  end

  for (genvar r = 0; r < 4; r++) begin : g_cxd
    cxd u_sp (.nbr(sp_nbr[r]), .band(band), .first_ref(1'b0),
              .zc_cx(sp_zc[r]), .sc_cx(sp_sc[r]), .sc_xor(sp_x[r]), .mr_cx(sp_mr[r]), .any_sig(sp_any[r]));
    cxd u_mc (.nbr(mc_nbr[r]), .band(band), .first_ref(first_ref[r]),
              .zc_cx(mc_zc[r]), .sc_cx(mc_sc[r]), .sc_xor(mc_x[r]), .mr_cx(mc_mr[r]), .any_sig(mc_any[r]));
  end

  // ---------------- CX-D list ----------------
  always_comb begin
    list_valid = '0;
    for (int e = 0; e < 19; e++) list[e] = '{pass: PASS_SP, cx: 5'd0, d: 1'b0};
    for (int r = 0; r < 4; r++) begin
      list[2*r]         = '{pass: PASS_SP, cx: sp_zc[r], d: sp_bits[r]};
      list_valid[2*r]   = sp_pd1[r];
      list[2*r+1]       = '{pass: PASS_SP, cx: sp_sc[r], d: sgn_q[2'(sn)][sl[CW-1:0]][r] ^ sp_x[r]};
      list_valid[2*r+1] = sp_pd1[r] && sp_bits[r];
    end
    list[8]        = '{pass: PASS_CU, cx: CX_RL,  d: one};
    list_valid[8]  = rl;
    list[9]        = '{pass: PASS_CU, cx: CX_UNI, d: q[1]};
    list_valid[9]  = rl && one;
    list[10]       = '{pass: PASS_CU, cx: CX_UNI, d: q[0]};
    list_valid[10] = rl && one;
    for (int r = 0; r < 4; r++) begin
      if (pd2[r]) begin
        list[11+2*r]       = '{pass: PASS_MR, cx: mc_mr[r], d: cu_v[r]};
        list_valid[11+2*r] = 1'b1;
      end else begin
        list[11+2*r]       = '{pass: PASS_CU, cx: mc_zc[r], d: cu_v[r]};
        list_valid[11+2*r] = pd3[r] && !(rl && (!one || 2'(r) <= q));
      end
      list[12+2*r]       = '{pass: PASS_CU, cx: mc_sc[r], d: cu_sg[r] ^ mc_x[r]};
      list_valid[12+2*r] = newsig_cu[r];
    end
  end
endmodule
