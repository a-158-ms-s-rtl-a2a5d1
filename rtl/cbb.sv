// cbb: code-block buffer.
// NBANK banks, each holding one code-block as NBP magnitude bit-planes plus a
// sign plane. A plane is stored by columns: word (stripe*CB_W + column) holds
// the four bits of that column in a stripe, so each bit-plane coder reads one
// 4-bit word of its own plane per step, all planes in parallel.
// The external side writes one coefficient (sign and NBP-bit magnitude, raster
// order inside the block) per clock into the current write bank.
// Bank ownership uses two valid bits per bank: val_top (most significant plane
// side) and val_bot (least significant plane side). Both are set when the
// external side writes the last coefficient of a block; the most significant
// coder may start a bank whose val_top is 1 and clears it when it is finished;
// the least significant coder clears val_bot when it is finished. A bank may be
// written only when both bits are 0 (ext_ready). Banks are used in round-robin
// order on both sides. Reads are combinational.
module cbb
  import jp2k_pkg::*;
#(
  parameter int NBANKS = NBANK,
  parameter int NPL    = NBP,           // magnitude planes; plane NPL is the sign plane
  parameter int NC     = CB_W,
  parameter int NR     = CB_H,
  localparam int NCOL  = NC * NR / 4,
  localparam int BW    = $clog2(NBANKS),
  localparam int CLW   = $clog2(NCOL)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // external write side
  output logic                       ext_ready,
  input  logic                       ext_we,
  input  logic [$clog2(NC*NR)-1:0]   ext_idx,    // row*NC + column
  input  logic [NPL:0]               ext_coef,   // {sign, magnitude}
  input  logic                       ext_last,
  // internal read ports, one per plane (index NPL = sign plane)
  input  logic [BW-1:0]              rd_bank [NPL+1],
  input  logic [CLW-1:0]             rd_col  [NPL+1],
  output logic [3:0]                 rd_bits [NPL+1],
  // bank synchronisation
  output logic [NBANKS-1:0]          val_top,
  output logic [NBANKS-1:0]          val_bot,
  input  logic                       top_release,
  input  logic [BW-1:0]              top_bank,
  input  logic                       bot_release,
  input  logic [BW-1:0]              bot_bank
);
  logic [3:0]    mem [NBANKS][NPL+1][NCOL];
  logic [BW-1:0] wbank;
  logic [$clog2(NR)-1:0] row;
  logic [$clog2(NC)-1:0] col;
  logic [CLW-1:0] wcol;

  assign ext_ready = !val_top[wbank] && !val_bot[wbank];
  assign row  = ext_idx[$clog2(NC*NR)-1:$clog2(NC)];
  assign col  = ext_idx[$clog2(NC)-1:0];
  assign wcol = CLW'(int'(row[$clog2(NR)-1:2]) * NC + int'(col));

  always_ff @(posedge clk) begin
    if (ext_we && ext_ready)
      for (int p = 0; p <= NPL; p++) mem[wbank][p][wcol][row[1:0]] <= ext_coef[p];
  end

  for (genvar p = 0; p <= NPL; p++) begin : g_rd
    assign rd_bits[p] = mem[rd_bank[p]][p][rd_col[p]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank   <= '0;
      val_top <= '0;
      val_bot <= '0;
    end else begin
      for (int b = 0; b < NBANKS; b++) begin
        if (ext_we && ext_ready && ext_last && wbank == BW'(b)) begin
          val_top[b] <= 1'b1;
          val_bot[b] <= 1'b1;
        end else begin
          if (top_release && top_bank == BW'(b)) val_top[b] <= 1'b0;
          if (bot_release && bot_bank == BW'(b)) val_bot[b] <= 1'b0;
        end
      end
      if (ext_we && ext_ready && ext_last) wbank <= wbank + 1'b1;
    end
  end

  a_release_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                    top_release |-> val_top[top_bank]);
endmodule
