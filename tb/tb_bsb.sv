// tb_bsb: checks the bit-stream buffer. Every plane port writes random
// groups of 0 to 4 bytes into random sections and passes, sometimes clearing
// a section, while a model tracks the lengths and contents. The lengths,
// overflow flags and every stored byte must match the model; the small pass
// size makes overflow happen often.
`timescale 1ns/1ps
module tb_bsb;
  import jp2k_pkg::*;
  localparam int NPL = 3, NSEC = 4, PB = 32;
  logic clk = 0, rst_n = 0;
  logic wr_clear [NPL];
  logic [1:0] wr_sec [NPL];
  pass_e wr_pass [NPL];
  logic [2:0] wr_cnt [NPL];
  logic [7:0] wr_byte [NPL][4];
  logic [1:0] rd_sec;
  logic [1:0] rd_plane;
  pass_e rd_pass;
  logic [4:0] rd_addr;
  logic [7:0] rd_data;
  logic [1:0] wd_sec;
  logic [1:0] wd_plane;
  pass_e wd_pass;
  logic [5:0] wd_addr;
  logic [7:0] wd_win [5];
  logic [5:0] len [NSEC][NPL][3];
  logic ovf [NSEC][NPL][3];
  int mlen [NSEC][NPL][3];
  bit movf [NSEC][NPL][3];
  byte unsigned mdat [NSEC][NPL][3][PB];
  int checks = 0, failures = 0, n_ovf = 0;

  bsb #(.NPL(NPL), .NSEC(NSEC), .PASS_BYTES(PB)) dut (.*);
  always #5 clk = ~clk;

  task automatic compare();
    for (int h = 0; h < NSEC; h++)
      for (int p = 0; p < NPL; p++)
        for (int q = 0; q < 3; q++) begin
          checks++;
          if (int'(len[h][p][q]) != mlen[h][p][q] || ovf[h][p][q] != movf[h][p][q]) failures++;
          for (int a = 0; a < mlen[h][p][q]; a++) begin
            rd_sec = 2'(h); rd_plane = 2'(p); rd_pass = pass_e'(q); rd_addr = 5'(a);
            wd_sec = 2'(h); wd_plane = 2'(p); wd_pass = pass_e'(q); wd_addr = 6'(a - a % 5);
            #0.01;
            checks++;
            if (rd_data != mdat[h][p][q][a] || wd_win[a % 5] != mdat[h][p][q][a]) failures++;
          end
        end
  endtask

  initial begin
    foreach (mlen[h, p, q]) begin mlen[h][p][q] = 0; movf[h][p][q] = 0; end
    for (int p = 0; p < NPL; p++) begin
      wr_clear[p] = 0; wr_sec[p] = 0; wr_pass[p] = PASS_SP; wr_cnt[p] = 0;
      for (int k = 0; k < 4; k++) wr_byte[p][k] = 0;
    end
    rd_sec = 0; rd_plane = 0; rd_pass = PASS_SP; rd_addr = 0;
    wd_sec = 0; wd_plane = 0; wd_pass = PASS_SP; wd_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NPL; p++) begin
        wr_clear[p] = ($urandom % 40 == 0);
        wr_sec[p]   = 2'($urandom);
        wr_pass[p]  = pass_e'($urandom % 3);
        wr_cnt[p]   = 3'($urandom % 5);
        for (int k = 0; k < 4; k++) wr_byte[p][k] = 8'($urandom);
      end
      @(posedge clk);
      for (int p = 0; p < NPL; p++) begin
        int h, q;
        h = int'(wr_sec[p]); q = int'(wr_pass[p]);
        if (wr_clear[p]) begin
          for (int qq = 0; qq < 3; qq++) begin mlen[h][p][qq] = 0; movf[h][p][qq] = 0; end
        end else begin
          for (int k = 0; k < int'(wr_cnt[p]); k++)
            if (mlen[h][p][q] < PB) begin
              mdat[h][p][q][mlen[h][p][q]] = wr_byte[p][k];
              mlen[h][p][q]++;
            end else if (!movf[h][p][q]) begin
              movf[h][p][q] = 1; n_ovf++;
            end
        end
      end
      #1;
      for (int p = 0; p < NPL; p++) begin wr_clear[p] = 0; wr_cnt[p] = 0; end
      if (i % 50 == 49) compare();
    end
    checks++;
    if (n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
