// tb_bps_feeder: checks the feeder that starts the top bit-plane coder.
// Blocks are made valid in the banks at random times and the FIFO is
// randomly full. For each block the feeder must push every column of the
// sign plane once, in order, with all states insignificant, taking the banks
// in turn and never pushing into a full FIFO or from a bank that is not valid.
`timescale 1ns/1ps
module tb_bps_feeder;
  import jp2k_pkg::*;
  localparam int NCOL = 64, NBANKS = 4, NBLK = 12;
  logic clk = 0, rst_n = 0, f_full, f_push;
  logic [NBANKS-1:0] val_top;
  logic [1:0] rd_bank;
  logic [5:0] rd_col;
  logic [3:0] rd_sign;
  col_item_t f_item;
  int checks = 0, failures = 0, n_full = 0, n_idle = 0;
  int made = 0, blk = 0, col = 0;

  bps_feeder #(.NCOL(NCOL), .NBANKS(NBANKS)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [3:0] sign_of(int b, int c);
    return 4'((b * 37 + c * 11) ^ (c >> 2));
  endfunction
  assign rd_sign = sign_of(int'(rd_bank), int'(rd_col));

  initial begin
    val_top = 0; f_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (blk < NBLK) begin
      @(negedge clk);
      f_full = ($urandom % 3 == 0);
      // a new block arrives now and then if its bank is free
      if (made < NBLK && !val_top[made % NBANKS] && $urandom % 50 == 0) begin
        val_top[made % NBANKS] = 1; made++;
      end
      #1;
      n_full += (f_full && val_top != 0);
      if (val_top == 0) n_idle++;
      if (f_push) begin
        checks++;
        if (f_full || !val_top[rd_bank] || int'(rd_bank) != blk % NBANKS || int'(rd_col) != col ||
            f_item.st != '0 || f_item.sgn != sign_of(blk % NBANKS, col)) begin
          failures++;
          $display("bad push: blk %0d col %0d bank %0d rd_col %0d", blk, col, rd_bank, rd_col);
        end
        col++;
      end
      @(posedge clk);
      if (col == NCOL) begin
        #1 val_top[blk % NBANKS] = 0;
        col = 0; blk++;
      end
    end
    checks++;
    if (n_full == 0 || n_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
