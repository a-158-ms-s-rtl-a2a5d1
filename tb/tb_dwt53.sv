// tb_dwt53: checks the one-dimensional 5/3 lifting transform. Random lines
// are sent forward, with and without gaps between samples and lines, and the
// output (low-pass half, then high-pass half) is compared with an integer
// lifting model with symmetric extension. The coefficients are then sent
// through the inverse transform, which must give back the original samples.
`timescale 1ns/1ps
module tb_dwt53;
  localparam int N = 32, IW = 12, OW = 14;
  logic clk = 0, rst_n = 0, inverse = 0, in_valid = 0, out_valid, out_first;
  logic signed [IW-1:0] in_data;
  logic signed [OW-1:0] out_data;
  int exp_q [$], firsts [$];
  int checks = 0, failures = 0, nout = 0;

  dwt53 #(.N(N), .IW(IW), .OW(OW)) dut (.*);
  always #5 clk = ~clk;

  function automatic int fdiv(int a, int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  function automatic void fwd(int x[N], ref int o[N]);
    int d[N/2], s[N/2];
    for (int i = 0; i < N/2; i++)
      d[i] = x[2*i+1] - fdiv(x[2*i] + ((i < N/2-1) ? x[2*i+2] : x[2*i]), 2);
    for (int i = 0; i < N/2; i++)
      s[i] = x[2*i] + fdiv(((i > 0) ? d[i-1] : d[0]) + d[i] + 2, 4);
    for (int i = 0; i < N/2; i++) begin o[i] = s[i]; o[N/2+i] = d[i]; end
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) failures++;
    else begin
      int e;
      e = exp_q.pop_front();
      if (int'(out_data) != e || out_first != (nout % N == 0)) begin
        failures++;
        if (failures < 10) $display("sample %0d: got %0d expected %0d", nout, out_data, e);
      end
    end
    nout++;
  end

  task automatic send_line(bit inv, int v[N], bit gaps);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      inverse = inv; in_valid = 1; in_data = IW'(v[i]);
      if (gaps && $urandom % 3 == 0) begin
        @(negedge clk); in_valid = 0;
      end
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    int x[N], o[N];
    in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 60; l++) begin
      bit gaps;
      gaps = (l % 2 == 1);
      for (int i = 0; i < N; i++) x[i] = $urandom_range(0, 255) - 128;
      if (l == 0) for (int i = 0; i < N; i++) x[i] = (i % 2) ? 127 : -128;
      fwd(x, o);
      foreach (o[i]) exp_q.push_back(o[i]);
      send_line(0, x, gaps);
      repeat (N + 4) @(posedge clk);
      foreach (x[i]) exp_q.push_back(x[i]);
      send_line(1, o, gaps);
      repeat (N + 4) @(posedge clk);
    end
    repeat (2 * N) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
