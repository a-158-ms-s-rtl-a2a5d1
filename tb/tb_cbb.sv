// tb_cbb: checks the code-block buffer. Random blocks are written into the
// banks in raster order, read back bit-plane by bit-plane through the
// column read ports, and released by the top and bottom coders. The test
// also fills every bank so that the write side must wait, and checks that
// the ready flag only returns once both releases of the oldest bank are done.
`timescale 1ns/1ps
module tb_cbb;
  import jp2k_pkg::*;
  localparam int NBANKS = 4, NPL = 10, NC = 32, NR = 32, NCOL = NC * NR / 4;
  logic clk = 0, rst_n = 0, ext_ready, ext_we = 0, ext_last = 0;
  logic [$clog2(NC*NR)-1:0] ext_idx;
  logic [NPL:0] ext_coef;
  logic [1:0] rd_bank [NPL+1];
  logic [$clog2(NCOL)-1:0] rd_col [NPL+1];
  logic [3:0] rd_bits [NPL+1];
  logic [NBANKS-1:0] val_top, val_bot;
  logic top_release = 0, bot_release = 0;
  logic [1:0] top_bank = 0, bot_bank = 0;
  logic [NPL:0] blk [NBANKS][NC*NR];
  int checks = 0, failures = 0, n_wait = 0;

  cbb #(.NBANKS(NBANKS), .NPL(NPL), .NC(NC), .NR(NR)) dut (.*);
  always #5 clk = ~clk;

  task automatic write_block(int b);
    for (int i = 0; i < NC * NR; i++) begin
      blk[b][i] = (NPL+1)'($urandom);
      @(negedge clk);
      ext_we = 1; ext_idx = i[$clog2(NC*NR)-1:0]; ext_coef = blk[b][i]; ext_last = (i == NC * NR - 1);
      @(posedge clk);
      while (!ext_ready) begin n_wait++; @(posedge clk); end
    end
    @(negedge clk);
    ext_we = 0; ext_last = 0;
  endtask

  task automatic read_block(int b);
    for (int c = 0; c < NCOL; c++) begin
      for (int p = 0; p <= NPL; p++) begin rd_bank[p] = 2'(b); rd_col[p] = c[$clog2(NCOL)-1:0]; end
      #1;
      for (int p = 0; p <= NPL; p++)
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (rd_bits[p][r] != blk[b][((c / NC) * 4 + r) * NC + c % NC][p]) failures++;
        end
    end
  endtask

  task automatic release_bank(int b, bit top);
    @(negedge clk);
    if (top) begin top_release = 1; top_bank = 2'(b); end
    else begin bot_release = 1; bot_bank = 2'(b); end
    @(negedge clk);
    top_release = 0; bot_release = 0;
  endtask

  initial begin
    for (int p = 0; p <= NPL; p++) begin rd_bank[p] = 0; rd_col[p] = 0; end
    ext_idx = 0; ext_coef = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (!ext_ready || val_top != 0 || val_bot != 0) failures++;
    for (int b = 0; b < NBANKS; b++) begin
      write_block(b);
      checks++; if (!val_top[b] || !val_bot[b]) failures++;
    end
    // all banks full: the writer must wait
    checks++; if (ext_ready) failures++;
    for (int b = 0; b < NBANKS; b++) read_block(b);
    release_bank(0, 1);
    checks++; if (ext_ready || val_top[0] || !val_bot[0]) failures++;
    fork
      write_block(0);
      begin repeat (50) @(posedge clk); release_bank(0, 0); end
    join
    checks++; if (n_wait < 40) failures++;
    read_block(0);
    for (int k = 1; k < 6; k++) begin
      int b;
      b = k % NBANKS;
      release_bank(b, 1); release_bank(b, 0);
      write_block(b);
      read_block(b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
