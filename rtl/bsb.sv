// bsb: bit-stream buffer.
// One area per bit-plane, each split into one code word per coding pass
// (SP, MR, CU), and the whole buffer repeated in NSEC sections, one per
// code-block buffer bank: a block coded from bank b leaves its code words in
// section b. The upper planes run up to a whole block ahead of the lower ones,
// so one section per bank guarantees that no plane reaches a section before
// the block that last used it has been released and rewritten.
// Each bit-plane coder writes up to four bytes per clock into its own area
// (bytes land at consecutive addresses of the selected pass); clear empties the
// three lengths of a plane in a half at the start of a code-block. A byte
// beyond PASS_BYTES is dropped and sets the overflow flag of that code word.
// The read side is combinational: rd_sec/rd_plane/rd_pass/rd_addr select one
// byte, len and ovf give the size of every code word.
module bsb
  import jp2k_pkg::*;
#(
  parameter int NPL        = NBP,
  parameter int NSEC       = NBANK,
  parameter int PASS_BYTES = 256,
  localparam int AW        = $clog2(PASS_BYTES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // write ports, one per plane
  input  logic              wr_clear [NPL],
  input  logic [$clog2(NSEC)-1:0] wr_sec [NPL],
  input  pass_e             wr_pass  [NPL],
  input  logic [2:0]        wr_cnt   [NPL],
  input  logic [7:0]        wr_byte  [NPL][4],
  // read port
  input  logic [$clog2(NSEC)-1:0] rd_sec,
  input  logic [$clog2(NPL)-1:0] rd_plane,
  input  pass_e             rd_pass,
  input  logic [AW-1:0]     rd_addr,
  output logic [7:0]        rd_data,
  // decoder window: five consecutive bytes of one stream
  input  logic [$clog2(NSEC)-1:0] wd_sec,
  input  logic [$clog2(NPL)-1:0] wd_plane,
  input  pass_e             wd_pass,
  input  logic [AW:0]       wd_addr,
  output logic [7:0]        wd_win [5],
  output logic [AW:0]       len [NSEC][NPL][3],
  output logic              ovf [NSEC][NPL][3]
);
  logic [7:0] mem [NSEC][NPL][3][PASS_BYTES];

  assign rd_data = mem[rd_sec][rd_plane][rd_pass][rd_addr];

  for (genvar k = 0; k < 5; k++) begin : g_win
    assign wd_win[k] = mem[wd_sec][wd_plane][wd_pass][AW'(wd_addr + (AW+1)'(k))];
  end

  for (genvar p = 0; p < NPL; p++) begin : g_pl
    logic [AW:0] base;
    assign base = len[wr_sec[p]][p][wr_pass[p]];

    always_ff @(posedge clk) begin
      for (int k = 0; k < 4; k++) begin
        if (3'(k) < wr_cnt[p] && (base + (AW+1)'(k)) < (AW+1)'(PASS_BYTES))
          mem[wr_sec[p]][p][wr_pass[p]][AW'(base + (AW+1)'(k))] <= wr_byte[p][k];
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int h = 0; h < NSEC; h++)
          for (int q = 0; q < 3; q++) begin
            len[h][p][q] <= '0;
            ovf[h][p][q] <= 1'b0;
          end
      end else if (wr_clear[p]) begin
        for (int q = 0; q < 3; q++) begin
          len[wr_sec[p]][p][q] <= '0;
          ovf[wr_sec[p]][p][q] <= 1'b0;
        end
      end else if (wr_cnt[p] != 3'd0) begin
        if (base + (AW+1)'(wr_cnt[p]) > (AW+1)'(PASS_BYTES)) begin
          len[wr_sec[p]][p][wr_pass[p]] <= (AW+1)'(PASS_BYTES);
          ovf[wr_sec[p]][p][wr_pass[p]] <= 1'b1;
        end else begin
          len[wr_sec[p]][p][wr_pass[p]] <= base + (AW+1)'(wr_cnt[p]);
        end
      end
    end
  end
endmodule
