// tb_pp: checks the pre-processor on its own over whole bit-planes.
// The testbench plays the part of the rest of the bit-plane coder: it keeps
// the states of the plane in full arrays, presents them in the stripe-ring
// layout, steps the SP column and the MR/CU column one stripe and one column
// apart, writes the results back and collects the CX-D lists per pass. The
// collected decisions of each pass, and the states handed to the lower plane,
// must equal those of the sequential reference coder for the same plane.
// Both modes and all orientations are covered over several planes.
`timescale 1ns/1ps
module tb_pp;
  import jp2k_pkg::*;
  import ebcot_ref_pkg::*;
  localparam int NC = 32, NSTR = 8, NPL = 10;

  band_e band;
  logic vcausal, sp_act, cu_act, byp_valid;
  logic [3:0] sp_n, cu_n;
  logic [5:0] sp_l, cu_l;
  logic [3:0] sp_bits;
  col_item_t byp_item, low_item;
  cstate_t [3:0] up_q [4][NC], sp_q [4][NC], cu_q [4][NC];
  logic [3:0] sgn_q [4][NC], pd1_q [4][NC], v_q [4][NC];
  cstate_t [3:0] sp_st, cu_st;
  logic [3:0] sp_pd1;
  logic [18:0] list_valid;
  cxd_t list [19];
  int checks = 0, failures = 0;

  pp #(.NC(NC), .NSTR(NSTR)) dut (.*);

  task automatic run_plane(cb_ref r, int p);
    int got [3][$];
    int bad = 0;
    // clear the ring
    for (int sl = 0; sl < 4; sl++)
      for (int x = 0; x < NC; x++) begin
        up_q[sl][x] = '0; sp_q[sl][x] = '0; cu_q[sl][x] = '0;
        sgn_q[sl][x] = '0; pd1_q[sl][x] = '0; v_q[sl][x] = '0;
      end
    for (int s = -(NC + 1); s <= NSTR * NC + NC; s++) begin
      int j, c, sn, sl, cn, cl;
      j = s + NC + 1; c = s - NC - 1;
      // upper-plane column j enters the ring
      byp_valid = (j < NSTR * NC);
      if (byp_valid) begin
        for (int rr = 0; rr < 4; rr++) begin
          int y = (j / NC) * 4 + rr;
          byp_item.st[rr]  = (p == NPL - 1) ? 2'd0 : 2'(r.st_after[p+1][y][j % NC]);
          byp_item.sgn[rr] = r.neg[y][j % NC][0];
        end
      end
      sp_act = (s >= 0 && s < NSTR * NC);
      cu_act = (c >= 0 && c < NSTR * NC);
      sn = (s < 0 ? 0 : s) / NC; sl = (s < 0 ? 0 : s) % NC;
      cn = (c < 0 ? 0 : c) / NC; cl = (c < 0 ? 0 : c) % NC;
      sp_n = 4'(sn); sp_l = 6'(sl); cu_n = 4'(cn); cu_l = 6'(cl);
      for (int rr = 0; rr < 4; rr++) begin
        int mv;
        mv = sp_act ? r.mag[sn * 4 + rr][sl] : 0;
        sp_bits[rr] = mv[p];
      end
      #1;
      for (int e = 0; e < 19; e++)
        if (list_valid[e]) got[int'(list[e].pass)].push_back(int'(list[e].cx) * 2 + int'(list[e].d));
      if (cu_act)
        for (int rr = 0; rr < 4; rr++) begin
          checks++;
          if (int'(low_item.st[rr]) != r.st_after[p][cn * 4 + rr][cl] ||
              low_item.sgn[rr] != r.neg[cn * 4 + rr][cl][0]) begin
            failures++; bad++;
          end
        end
      // write back, as the coder does at the end of the step
      if (byp_valid) begin
        up_q[(j / NC) % 4][j % NC]  = byp_item.st;
        sgn_q[(j / NC) % 4][j % NC] = byp_item.sgn;
      end
      if (sp_act) begin
        sp_q[sn % 4][sl]  = sp_st;
        pd1_q[sn % 4][sl] = sp_pd1;
        v_q[sn % 4][sl]   = sp_bits;
      end
      if (cu_act) cu_q[cn % 4][cl] = cu_st;
      #1;
    end
    for (int q = 0; q < 3; q++) begin
      checks++;
      if (got[q] != r.cxd_log[p][q]) begin
        failures++; bad++;
        $display("plane %0d pass %0d: %0d decisions, expected %0d", p, q, got[q].size(), r.cxd_log[p][q].size());
      end
    end
    if (bad) $display("plane %0d: %0d mismatches", p, bad);
  endtask

  initial begin
    for (int t = 0; t < 6; t++) begin
      cb_ref r;
      band = band_e'(t % 4);
      vcausal = (t >= 4);
      r = new(NC, NSTR * 4, NPL, int'(band), int'(vcausal));
      foreach (r.mag[y, x]) begin
        r.mag[y][x] = ($urandom % 3 == 0) ? $urandom % 1024 : $urandom % 8;
        r.neg[y][x] = $urandom % 2;
      end
      r.run();
      for (int p = NPL - 1; p >= 0; p -= 3) run_plane(r, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
