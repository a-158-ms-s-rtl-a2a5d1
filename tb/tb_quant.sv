// tb_quant: checks the dead-zone scalar quantiser. Random coefficients and
// step sizes go forward and are compared with sign-magnitude division with
// saturation; the quantised values are then reconstructed by the inverse
// path and compared with midpoint reconstruction.
`timescale 1ns/1ps
module tb_quant;
  localparam int IW = 14, MW = 10;
  logic clk = 0, rst_n = 0, inverse = 0, in_valid = 0, out_valid;
  logic [3:0] shift;
  logic signed [IW-1:0] in_coef, out_coef;
  logic [MW:0] in_q, out_q;
  int checks = 0, failures = 0, n_sat = 0;

  quant #(.IW(IW), .MW(MW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    in_coef = 0; in_q = 0; shift = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int x, a, m, ng, rec;
      x = $urandom_range(0, 1 << IW) - (1 << (IW - 1));
      if (x == (1 << (IW - 1))) x = 0;
      if (i % 3 == 0) x = x / 64;
      @(negedge clk);
      shift = 4'($urandom % 6);
      inverse = 0; in_valid = 1; in_coef = IW'(x);
      @(negedge clk);
      in_valid = 0;
      a = (x < 0 ? -x : x) >> shift;
      if (a > 1023) begin a = 1023; n_sat++; end
      ng = (x < 0) && (a != 0);
      checks++;
      if (!out_valid || out_q != {1'(ng), MW'(a)}) begin
        failures++; $display("fwd %0d >> %0d -> %h", x, shift, out_q);
      end
      inverse = 1; in_valid = 1; in_q = out_q;
      @(negedge clk);
      in_valid = 0;
      rec = (a == 0) ? 0 : (a << shift) + ((1 << shift) >> 1);
      if (ng) rec = -rec;
      checks++;
      if (!out_valid || out_coef != IW'(rec)) begin
        failures++; $display("inv %h -> %0d, expected %0d", in_q, out_coef, rec);
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
