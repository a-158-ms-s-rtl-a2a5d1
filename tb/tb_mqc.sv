// tb_mqc: checks the three-pass MQ encoder against the byte-pointer reference
// encoder. Random decisions with skewed statistics go to the three passes in
// random interleaving, sometimes two per clock; each pass is then flushed and
// its bytes must equal those of a separate reference encoder fed with the same
// decisions. Several rounds check that a flush restarts a pass cleanly. The
// output must appear exactly one clock after the input.
module tb_mqc;
  import jp2k_pkg::*;
  import ebcot_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid [2];
  cxd_t in_cxd [2];
  logic flush;
  pass_e flush_pass;
  logic [2:0] out_cnt;
  logic [7:0] out_byte [4];
  pass_e out_pass;
  int checks = 0, failures = 0;
  byte unsigned got [3][$];
  mq_ref r [3];
  logic upd_d;

  mqc dut (.*);

  always @(posedge clk) begin
    upd_d <= in_valid[0] || flush;
    if (rst_n) begin
      for (int k = 0; k < int'(out_cnt); k++) got[out_pass].push_back(out_byte[k]);
      if (out_cnt != 0) begin
        checks++;
        if (!upd_d) begin failures++; $display("bytes without input one clock earlier"); end
      end
    end
  end

  initial begin
    in_valid = '{0, 0}; in_cxd = '{default: '0}; flush = 0; flush_pass = PASS_SP;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      int skew;
      skew = (round % 3 == 0) ? 2 : (round % 3 == 1) ? 8 : 50;
      foreach (r[p]) r[p] = new();
      foreach (got[p]) got[p].delete();
      for (int t = 0; t < 3000; t++) begin
        int p, n;
        p = $urandom % 3;
        n = 1 + ($urandom % 2);
        @(negedge clk);
        for (int k = 0; k < 2; k++) begin
          int cx, d;
          cx = (round == 5) ? 18 : $urandom % 19;
          d  = ($urandom % skew == 0);
          in_valid[k] = (k < n);
          in_cxd[k]   = '{pass: pass_e'(p), cx: 5'(cx), d: 1'(d)};
          if (k < n) r[p].encode(cx, d);
        end
      end
      @(negedge clk);
      in_valid = '{0, 0};
      for (int p = 0; p < 3; p++) begin
        flush = 1; flush_pass = pass_e'(p);
        @(negedge clk);
      end
      flush = 0;
      repeat (3) @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        bytes_q e;
        e = r[p].flush();
        checks++;
        if (e.size() != got[p].size()) begin
          failures++;
          $display("round %0d pass %0d: %0d bytes, expected %0d", round, p, got[p].size(), e.size());
        end else
          foreach (e[k]) begin
            checks++;
            if (e[k] != got[p][k]) begin
              failures++;
              if (failures < 10) $display("round %0d pass %0d byte %0d: %02x expected %02x", round, p, k, got[p][k], e[k]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
