// tb_bpc: checks one bit-plane coder on its own. For each code-block the
// testbench acts as the upper coder (feeding the states the plane above
// leaves behind through a show-ahead FIFO that is randomly empty), as the
// code-block buffer (returning the magnitude bits of the column asked for)
// and as the lower coder (randomly refusing items). The three pass
// codewords must equal those of the sequential reference coder, and the
// states passed down must equal the reference states after this plane.
`timescale 1ns/1ps
module tb_bpc;
  import jp2k_pkg::*;
  import ebcot_ref_pkg::*;
  localparam int NC = 32, NSTR = 8, NPL = 10, NCOL = NC * NSTR;
  logic clk = 0, rst_n = 0;
  band_e band;
  logic vcausal, u_empty, u_pop, l_full, l_push, bs_clear, done, stall_up, stall_low;
  col_item_t u_item, l_item;
  logic [1:0] cbb_bank, bs_sec;
  logic [7:0] cbb_col;
  logic [3:0] cbb_bits;
  pass_e bs_pass;
  logic [2:0] bs_cnt;
  logic [7:0] bs_byte [4];
  cb_ref r;
  int p, ucol, lcol, blk;
  bit u_hold;
  byte unsigned got [3][$];
  int checks = 0, failures = 0, n_stall_up = 0, n_stall_low = 0;

  bpc #(.NC(NC), .NSTR(NSTR)) dut (.*);
  always #5 clk = ~clk;

  col_item_t uarr [NCOL], larr [NCOL];
  logic [3:0] bitmem [NCOL];

  // fill the column arrays seen by the coder from the reference model
  task automatic load_block();
    for (int j = 0; j < NCOL; j++)
      for (int rr = 0; rr < 4; rr++) begin
        int y, mv;
        y = (j / NC) * 4 + rr;
        mv = r.mag[y][j % NC];
        bitmem[j][rr]   = mv[p];
        uarr[j].st[rr]  = (p == NPL - 1) ? 2'd0 : 2'(r.st_after[p+1][y][j % NC]);
        uarr[j].sgn[rr] = r.neg[y][j % NC][0];
        larr[j].st[rr]  = 2'(r.st_after[p][y][j % NC]);
        larr[j].sgn[rr] = r.neg[y][j % NC][0];
      end
  endtask

  assign cbb_bits = bitmem[cbb_col];
  assign u_empty  = u_hold || ucol >= NCOL;
  assign u_item   = uarr[ucol < NCOL ? ucol : 0];

  always @(posedge clk) if (rst_n) begin
    n_stall_up += stall_up; n_stall_low += stall_low;
    if (u_pop) ucol <= ucol + 1;
    if (l_push) begin
      checks++;
      if (lcol >= NCOL || l_item != larr[lcol]) failures++;
      lcol <= lcol + 1;
    end
    if (bs_cnt != 0) begin
      if (bs_sec != 2'(blk)) failures++;
      for (int k = 0; k < int'(bs_cnt); k++) got[int'(bs_pass)].push_back(bs_byte[k]);
    end
  end

  always @(negedge clk) begin
    u_hold = ($urandom % 4 == 0);
    l_full = ($urandom % 5 == 0);
  end

  initial begin
    band = BAND_LL; vcausal = 0; u_hold = 0; l_full = 0; ucol = 0; lcol = 0;
    repeat (2) @(posedge clk);
    for (blk = 0; blk < 6; blk++) begin
      r = new(NC, NSTR * 4, NPL, blk % 4, blk / 4);
      foreach (r.mag[y, x]) begin
        r.mag[y][x] = ($urandom % 3 == 0) ? $urandom % 1024 : $urandom % 16;
        r.neg[y][x] = $urandom % 2;
      end
      r.run();
      p = (blk == 0) ? NPL - 1 : 1 + $urandom % (NPL - 1);
      band = band_e'(blk % 4); vcausal = (blk >= 4);
      load_block();
      for (int q = 0; q < 3; q++) got[q].delete();
      ucol = 0; lcol = 0;
      rst_n = 1;
      @(posedge clk iff done);
      @(posedge clk);
      for (int q = 0; q < 3; q++) begin
        checks++;
        while (got[q].size() > 0 && got[q][$] == 8'hFF) void'(got[q].pop_back());
        if (got[q] != r.out[p][q]) begin
          failures++;
          $display("block %0d plane %0d pass %0d: %0d bytes, expected %0d", blk, p, q, got[q].size(), r.out[p][q].size());
        end
      end
      checks++;
      if (lcol != NCOL || ucol != NCOL || cbb_bank != 2'(blk + 1)) failures++;
    end
    checks++;
    if (n_stall_up == 0 || n_stall_low == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
