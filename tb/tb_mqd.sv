// tb_mqd: checks the MQ decoder. Random context/decision sequences, from
// nearly constant to fully random, are encoded and terminated by the
// byte-oriented reference encoder; the decoder must return the same
// decisions from the bytes, with one decision per clock and the result one
// clock after the request. Streams long enough to hold 0xFF bytes and
// carries, and short ones that end within the first bytes, are both used.
`timescale 1ns/1ps
module tb_mqd;
  import jp2k_pkg::*;
  import ebcot_ref_pkg::*;
  localparam int AW = 11;
  logic clk = 0, rst_n = 0, start = 0, ready, in_valid = 0, out_valid, out_d;
  logic [AW:0] len, rd_addr;
  logic [7:0] rd_win [5];
  logic [4:0] in_cx;
  logic [7:0] mem [1 << AW];
  int checks = 0, failures = 0, n_ff = 0;

  mqd #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  always_comb
    for (int k = 0; k < 5; k++) rd_win[k] = mem[(int'(rd_addr) + k) % (1 << AW)];

  initial begin
    len = 0;
    in_cx = 0;
    foreach (mem[i]) mem[i] = 8'h00;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      mq_ref enc;
      bytes_q bq;
      int cxs [$], ds [$];
      int n, skew, bad;
      enc = new();
      cxs.delete(); ds.delete();
      n = (t % 5 == 0) ? 1 + $urandom % 8 : 200 + $urandom % 3000;
      skew = t % 4;                         // 0: random decisions .. 3: almost always 0
      for (int i = 0; i < n; i++) begin
        int cx, d;
        cx = (t % 3 == 0) ? $urandom % 3 : $urandom % NCTX;
        d  = (skew == 0) ? $urandom % 2 : ($urandom % (8 << skew) == 0);
        cxs.push_back(cx); ds.push_back(d);
        enc.encode(cx, d);
      end
      bq = enc.flush();
      foreach (bq[i]) begin mem[i] = bq[i]; if (bq[i] == 8'hFF) n_ff++; end
      for (int i = bq.size(); i < bq.size() + 8; i++) mem[i % (1 << AW)] = 8'($urandom);
      len = (AW+1)'(bq.size());
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      @(negedge clk);
      checks++;
      if (!ready) failures++;
      bad = 0;
      for (int i = 0; i < n; i++) begin
        in_valid = 1; in_cx = 5'(cxs[i]);
        @(negedge clk);
        checks++;
        if (!out_valid || out_d != ds[i]) begin
          failures++; bad++;
          if (bad < 4) $display("stream %0d decision %0d: got %0d expected %0d", t, i, out_d, ds[i]);
        end
        in_valid = (($urandom % 4) == 0) ? 0 : 1;
        if (!in_valid) begin
          @(negedge clk);
          checks++;
          if (out_valid) failures++;
        end
      end
      in_valid = 0;
    end
    checks++;
    if (n_ff == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
