// tb_bpc_fifo: random pushes and pops against a queue model. Checks the
// show-ahead head item and the empty/full flags on every clock, with long
// enough bursts to fill and drain the FIFO repeatedly.
`timescale 1ns/1ps
module tb_bpc_fifo;
  import jp2k_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  col_item_t wr_item, rd_item;
  col_item_t q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  bpc_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    wr_item = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int bias;
      bias = (i / 500) % 2 ? 3 : 1;       // alternate filling and draining phases
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH)) begin
        failures++; $display("flags wrong at %0d: empty=%0b full=%0b size=%0d", i, empty, full, q.size());
      end
      if (!empty) begin
        checks++;
        if (rd_item != q[0]) failures++;
      end
      n_full += full; n_empty += empty;
      push = !full && ($urandom % 4 < bias + 0);
      pop  = !empty && ($urandom % 4 >= bias);
      wr_item = col_item_t'($urandom);
      @(posedge clk); #0.1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wr_item);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
