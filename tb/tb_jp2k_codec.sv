// tb_jp2k_codec: end-to-end test of the codec datapath at its default size.
// RGB pixels are streamed in; the testbench models the colour transform, the
// level shift, the 5/3 line transform and the quantiser on its own, assembles
// the expected code-blocks, codes them with the sequential reference coder and
// compares every code word the codec leaves in its bit-stream buffer. It runs
// luminance blocks in regular mode, a chrominance block in vertically causal
// mode with the HH table, and finally a burst without gaps that must trip the
// overrun flag. It counts how often a coder waited on an empty upper FIFO, on
// a full lower FIFO, and how often the external side found no free buffer
// bank; each must happen at least once.
`timescale 1ns/1ps
module tb_jp2k_codec;
  import jp2k_pkg::*;
  import ebcot_ref_pkg::*;

  localparam int PB = 256;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic [1:0] comp_sel;
  logic [3:0] qshift;
  band_e band;
  logic vcausal, px_valid;
  logic [7:0] px_r, px_g, px_b;
  logic cb_done;
  logic [1:0] cb_sec, rd_sec;
  logic [$clog2(NBP)-1:0] rd_plane;
  pass_e rd_pass;
  logic [$clog2(PB)-1:0] rd_addr;
  logic [7:0] rd_data;
  logic [$clog2(PB):0] len [NBANK][NBP][3];
  logic ovf [NBANK][NBP][3];
  logic overrun;
  logic [NBP-1:0] stall_up, stall_low;
  logic dec_start = 0, dec_valid = 0, dec_ready, dec_out_valid, dec_d;
  logic [1:0] dec_sec = 0;
  logic [$clog2(NBP)-1:0] dec_plane = 0;
  pass_e dec_pass = PASS_SP;
  logic [4:0] dec_cx = 0;
  cb_ref last_r;
  int n_decoded = 0;

  jp2k_codec dut (.*);

  int checks = 0, failures = 0;
  int n_stall_up = 0, n_stall_low = 0, n_bank_wait = 0;
  cb_ref exp_q[$];
  int done_cnt = 0, fed = 0;
  logic [1:0] got_sec;

  always @(posedge clk) begin
    if (|stall_up)  n_stall_up++;
    if (|stall_low) n_stall_low++;
    if (dut.u_ebc.ext_ready == 0) n_bank_wait++;
  end

  function automatic int fdiv(int a, int b);   // floor division
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  // expected coefficients of one transformed line
  function automatic void line_model(int x[32], int shift, ref int mag[32], ref int neg[32]);
    int d[16], s[16], o[32];
    for (int i = 0; i < 16; i++)
      d[i] = x[2*i+1] - fdiv(x[2*i] + ((i < 15) ? x[2*i+2] : x[2*i]), 2);
    for (int i = 0; i < 16; i++)
      s[i] = x[2*i] + fdiv(((i > 0) ? d[i-1] : d[0]) + d[i] + 2, 4);
    for (int i = 0; i < 16; i++) begin o[i] = s[i]; o[16+i] = d[i]; end
    for (int i = 0; i < 32; i++) begin
      int a = (o[i] < 0) ? -o[i] : o[i];
      a = a >> shift;
      if (a > 1023) a = 1023;
      mag[i] = a;
      neg[i] = (o[i] < 0) && (a != 0);
    end
  endfunction

  task automatic feed_block(int comp, int shift, int b, int vc, int gap);
    cb_ref r = new(32, 32, NBP, b, vc);
    for (int row = 0; row < 32; row++) begin
      int x[32];
      int m[32], n[32];
      for (int col = 0; col < 32; col++) begin
        int rr, gg, bb, yv;
        rr = (fed * 37 + row * 5 + col * 3 + $urandom % 24) % 256;
        gg = (128 + row * 2 - col + $urandom % 16) % 256;
        bb = (col * 7 + $urandom % 40) % 256;
        yv = fdiv(rr + 2 * gg + bb, 4);
        x[col] = (comp == 0) ? yv - 128 : (comp == 1) ? bb - gg : rr - gg;
        @(negedge clk);
        px_valid = 1; px_r = rr[7:0]; px_g = gg[7:0]; px_b = bb[7:0];
        if (gap) begin @(negedge clk); px_valid = 0; end
      end
      // the quantiser step applies from the first transformed line of this block on
      if (row == 0) qshift = shift[3:0];
      line_model(x, shift, m, n);
      for (int col = 0; col < 32; col++) begin
        r.mag[row][col] = m[col];
        r.neg[row][col] = n[col];
      end
    end
    @(negedge clk);
    px_valid = 0;
    r.run();
    exp_q.push_back(r);
    fed++;
  endtask

  task automatic check_block();
    cb_ref r = exp_q.pop_front();
    int h = done_cnt % NBANK;
    int bad = 0, bytes = 0;
    last_r = r;
    checks++;
    if (got_sec != h[1:0]) begin failures++; $display("block %0d: section %0d, expected %0d", done_cnt, got_sec, h); end
    rd_sec = h[1:0];
    for (int p = 0; p < NBP; p++)
      for (int q = 0; q < 3; q++) begin
        checks++;
        if (len[h][p][q] != r.out[p][q].size() || ovf[h][p][q]) begin
          failures++; bad++;
          if (bad < 6) $display("block %0d plane %0d pass %0d: length %0d, expected %0d", done_cnt, p, q, len[h][p][q], r.out[p][q].size());
        end else begin
          rd_plane = p[$clog2(NBP)-1:0];
          rd_pass  = pass_e'(q);
          for (int k = 0; k < r.out[p][q].size(); k++) begin
            rd_addr = k[$clog2(PB)-1:0];
            #0.1;
            checks++; bytes++;
            if (rd_data != r.out[p][q][k]) begin
              failures++; bad++;
              if (bad < 6) $display("block %0d plane %0d pass %0d byte %0d: %02x, expected %02x", done_cnt, p, q, k, rd_data, r.out[p][q][k]);
            end
          end
        end
      end
    $display("block %0d: %0d code word bytes compared, %0d mismatches", done_cnt, bytes, bad);
    done_cnt++;
  endtask

  // decode every pass of two planes of the last checked block with the pass
  // decoder, giving it the reference contexts; the decisions must come back
  task automatic decode_last();
    int h, bad;
    h = (done_cnt - 1) % NBANK;
    bad = 0;
    for (int p = NBP - 4; p >= NBP - 7; p -= 3)
      for (int q = 0; q < 3; q++) begin
        @(negedge clk);
        dec_sec = 2'(h); dec_plane = 4'(p); dec_pass = pass_e'(q); dec_start = 1;
        @(negedge clk);
        dec_start = 0;
        @(negedge clk);
        checks++;
        if (!dec_ready) failures++;
        foreach (last_r.cxd_log[p][q][i]) begin
          dec_valid = 1; dec_cx = 5'(last_r.cxd_log[p][q][i] / 2);
          @(negedge clk);
          checks++; n_decoded++;
          if (!dec_out_valid || dec_d != 1'(last_r.cxd_log[p][q][i] % 2)) begin
            failures++; bad++;
          end
        end
        dec_valid = 0;
      end
    $display("block %0d: %0d decisions decoded, %0d mismatches", done_cnt - 1, n_decoded, bad);
  endtask

  initial begin
    comp_sel = 0; qshift = 0; band = BAND_LL; vcausal = 0;
    px_valid = 0; px_r = 0; px_g = 0; px_b = 0;
    rd_sec = 0; rd_plane = '0; rd_pass = PASS_SP; rd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        // luminance, regular mode, one pixel every other clock
        feed_block(0, 0, 0, 0, 1);
        feed_block(0, 1, 0, 0, 1);
        feed_block(0, 0, 0, 0, 1);
        wait (done_cnt == fed);
        decode_last();
        checks++;
        if (overrun) begin failures++; $display("overrun at half rate"); end
        // chrominance, vertically causal mode, HH table
        repeat (5) @(posedge clk);
        comp_sel = 1; band = BAND_HH; vcausal = 1; qshift = 0;
        feed_block(1, 0, 3, 1, 1);
        wait (done_cnt == fed);
        decode_last();
        // a long burst at one pixel per clock overruns the buffer banks
        comp_sel = 0; band = BAND_LL; vcausal = 0;
        for (int i = 0; i < 32 * 32 * 7; i++) begin
          @(negedge clk);
          px_valid = 1; px_r = 8'($urandom); px_g = 8'($urandom); px_b = 8'($urandom);
        end
        @(negedge clk);
        px_valid = 0;
        checks++;
        if (!overrun) begin failures++; $display("overrun never flagged"); end
      end
      forever begin
        @(posedge clk);
        if (cb_done && exp_q.size() > 0) begin
          got_sec = cb_sec;
          #0.5;
          check_block();
        end
      end
    join_any
    checks += 4;
    if (n_decoded == 0)   begin failures++; $display("nothing decoded"); end
    if (n_stall_up == 0)  begin failures++; $display("no wait on an empty FIFO"); end
    if (n_stall_low == 0) begin failures++; $display("no wait on a full FIFO"); end
    if (n_bank_wait == 0) begin failures++; $display("no wait for a free bank"); end
    $display("clocks waiting: empty upper FIFO %0d, full lower FIFO %0d, no free bank %0d",
             n_stall_up, n_stall_low, n_bank_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * 300000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
