// tb_ccnv: checks the reversible colour transform. Random RGB pixels go
// through the forward transform, the result is compared with the integer
// formulas, and is then fed through the inverse transform, which must give
// back the original pixel exactly.
`timescale 1ns/1ps
module tb_ccnv;
  localparam int BW = 8;
  logic clk = 0, rst_n = 0, inverse = 0, in_valid = 0, out_valid;
  logic signed [BW+1:0] c0, c1, c2, o0, o1, o2;
  int checks = 0, failures = 0;

  ccnv #(.BW(BW)) dut (.*);
  always #5 clk = ~clk;

  function automatic int fdiv4(int a);
    return (a >= 0) ? a / 4 : -((-a + 3) / 4);
  endfunction

  initial begin
    c0 = 0; c1 = 0; c2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int r, g, b, y, cb, cr;
      r = (i == 0) ? 255 : $urandom % 256;
      g = (i == 1) ? 255 : $urandom % 256;
      b = (i == 2) ? 255 : $urandom % 256;
      @(negedge clk);
      inverse = 0; in_valid = 1; c0 = r; c1 = g; c2 = b;
      @(negedge clk);
      in_valid = 0;
      y = fdiv4(r + 2 * g + b); cb = b - g; cr = r - g;
      checks++;
      if (!out_valid || o0 != y || o1 != cb || o2 != cr) begin
        failures++; $display("fwd %0d %0d %0d -> %0d %0d %0d", r, g, b, o0, o1, o2);
      end
      inverse = 1; in_valid = 1; c0 = o0; c1 = o1; c2 = o2;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || o0 != r || o1 != g || o2 != b) begin
        failures++; $display("inv -> %0d %0d %0d, expected %0d %0d %0d", o0, o1, o2, r, g, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
