// tb_ebc: end-to-end check of the embedded block coder.
// Code-blocks of several kinds (sparse, empty, dense, small, a few large
// values) are written into the code-block buffer back to back. For every block
// the testbench runs the sequential reference coder (plane by plane, pass by
// pass) and compares the length and every byte of all 30 code words with what
// the parallel coder left in the bit-stream buffer. It then repeats with the
// HL table in vertically causal mode and with the HH table. It also reports the
// clocks between finished blocks and requires at most 1.25 clocks per sample
// for back-to-back sparse blocks, and counts stalls on empty and full FIFOs.
`timescale 1ns/1ps
module tb_ebc;
  import jp2k_pkg::*;
  import ebcot_ref_pkg::*;

  localparam int NPL = NBP, NC = CB_W, NR = CB_H, PB = 256;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  band_e band;
  logic  vcausal;
  logic  ext_ready, ext_we, ext_last;
  logic [$clog2(NC*NR)-1:0] ext_idx;
  logic [NPL:0] ext_coef;
  logic cb_done;
  logic [$clog2(NBANK)-1:0] cb_sec, rd_sec;
  logic [$clog2(NPL)-1:0] rd_plane;
  pass_e rd_pass;
  logic [$clog2(PB)-1:0] rd_addr;
  logic [7:0] rd_data;
  logic [1:0] wd_sec;
  logic [$clog2(NPL)-1:0] wd_plane;
  pass_e wd_pass;
  logic [$clog2(PB):0] wd_addr;
  logic [7:0] wd_win [5];
  logic [$clog2(PB):0] len [NBANK][NPL][3];
  logic ovf [NBANK][NPL][3];
  logic [NPL-1:0] stall_up, stall_low;

  ebc dut (.*);

  int checks = 0, failures = 0;
  int n_stall_up = 0, n_stall_low = 0;
  cb_ref exp_q[$];
  int    kind_q[$];
  int    done_cnt = 0, fed = 0;
  logic [$clog2(NBANK)-1:0] got_sec;
  longint cyc = 0, last_done = 0;

  always @(posedge clk) begin
    cyc++;
    if (|stall_up)  n_stall_up++;
    if (|stall_low) n_stall_low++;
  end

  function automatic int gen(int kind);
    int m;
    case (kind)
      0: begin m = $urandom % 100; m = (m < 70) ? 0 : (m < 90) ? ($urandom % 4) : ($urandom % 64); end
      1: m = 0;
      2: m = $urandom % 1024;
      3: m = $urandom % 3;
      default: m = ($urandom % 200 == 0) ? (512 + $urandom % 512) : 0;
    endcase
    return m;
  endfunction

  task automatic feed_block(int kind, int b, int vc);
    cb_ref r = new(NC, NR, NPL, b, vc);
    foreach (r.mag[y, x]) begin
      r.mag[y][x] = gen(kind);
      r.neg[y][x] = $urandom % 2;
    end
    r.run();
    exp_q.push_back(r);
    kind_q.push_back(kind);
    for (int i = 0; i < NC * NR; i++) begin
      @(negedge clk);
      while (!ext_ready) @(negedge clk);
      ext_we   = 1;
      ext_idx  = i[$clog2(NC*NR)-1:0];
      ext_coef = {r.neg[i / NC][i % NC][0], r.mag[i / NC][i % NC][NPL-1:0]};
      ext_last = (i == NC * NR - 1);
    end
    @(negedge clk);
    ext_we = 0; ext_last = 0;
    fed++;
  endtask

  task automatic check_block();
    cb_ref r = exp_q.pop_front();
    int kind = kind_q.pop_front();
    int h = done_cnt % NBANK;
    int bad = 0;
    longint gap = cyc - last_done;
    last_done = cyc;
    rd_sec = h[1:0];
    checks++;
    if (got_sec != h[1:0]) begin failures++; $display("block %0d: section %0d, expected %0d", done_cnt, got_sec, h); end
    for (int p = 0; p < NPL; p++)
      for (int q = 0; q < 3; q++) begin
        checks++;
        if (len[h][p][q] != r.out[p][q].size() || ovf[h][p][q]) begin
          failures++; bad++;
          if (bad < 6) $display("block %0d plane %0d pass %0d: length %0d, expected %0d", done_cnt, p, q, len[h][p][q], r.out[p][q].size());
        end else begin
          rd_plane = p[$clog2(NPL)-1:0];
          rd_pass  = pass_e'(q);
          for (int k = 0; k < r.out[p][q].size(); k++) begin
            rd_addr = k[$clog2(PB)-1:0];
            wd_sec = rd_sec; wd_plane = rd_plane; wd_pass = rd_pass; wd_addr = ($clog2(PB)+1)'(k);
            #0.1;
            checks++;
            if (rd_data != r.out[p][q][k] || wd_win[0] != r.out[p][q][k]) begin
              failures++; bad++;
              if (bad < 6) $display("block %0d plane %0d pass %0d byte %0d: %02x, expected %02x", done_cnt, p, q, k, rd_data, r.out[p][q][k]);
            end
          end
        end
      end
    $display("block %0d (kind %0d) done, %0d clocks after the previous one, %0d mismatches", done_cnt, kind, gap, bad);
    // back-to-back sparse blocks: at most 1.25 clocks per sample (this design
    // sends one modelled bit per clock to the MQ coder)
    if (kind == 0 && done_cnt > 0 && done_cnt < 5) begin
      checks++;
      if (gap > NC * NR * 5 / 4) begin
        failures++;
        $display("block %0d: %0d clocks per block, above 1.25 clocks per sample", done_cnt, gap);
      end
    end
    done_cnt++;
  endtask

  initial begin
    band = BAND_LL; vcausal = 0;
    ext_we = 0; ext_last = 0; ext_idx = '0; ext_coef = '0;
    rd_sec = 0; rd_plane = '0; rd_pass = PASS_SP; rd_addr = '0;
    wd_sec = 0; wd_plane = '0; wd_pass = PASS_SP; wd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        int kinds[] = '{0, 0, 0, 0, 0, 1, 2, 3, 4};
        foreach (kinds[i]) feed_block(kinds[i], 0, 0);
        wait (done_cnt == fed);
        repeat (5) @(posedge clk);
        band = BAND_HL; vcausal = 1;
        feed_block(2, 1, 1);
        feed_block(0, 1, 1);
        wait (done_cnt == fed);
        repeat (5) @(posedge clk);
        band = BAND_HH; vcausal = 0;
        feed_block(2, 3, 0);
        feed_block(3, 3, 0);
        wait (done_cnt == fed);
      end
      forever begin
        @(posedge clk);
        if (cb_done) begin
          got_sec = cb_sec;
          #0.5;
          check_block();
        end
      end
    join_any
    checks++;
    if (n_stall_up == 0 || n_stall_low == 0) begin
      failures++;
      $display("FIFO stalls never seen: empty %0d full %0d", n_stall_up, n_stall_low);
    end
    $display("stall cycles: upper FIFO empty %0d, lower FIFO full %0d", n_stall_up, n_stall_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
