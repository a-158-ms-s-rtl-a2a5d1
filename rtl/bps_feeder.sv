// bps_feeder: sign bit-plane (BPS) reader feeding the most significant BPC.
// When the bank it is due to read next has its val_top bit set, it walks the
// sign plane of that bank column by column and pushes one column item per
// clock into the top coder's U-FIFO: four sign bits with all coefficient
// states 0, since nothing is significant above the most significant plane.
// The signs then travel down the chain of coders with the states. Banks are
// taken in round-robin order. It waits while the FIFO is full.
module bps_feeder
  import jp2k_pkg::*;
#(
  parameter int NCOL   = CB_W * CB_H / 4,
  parameter int NBANKS = NBANK
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NBANKS-1:0]           val_top,
  output logic [$clog2(NBANKS)-1:0]   rd_bank,
  output logic [$clog2(NCOL)-1:0]     rd_col,
  input  logic [3:0]                  rd_sign,
  input  logic                        f_full,
  output logic                        f_push,
  output col_item_t                   f_item
);
  logic active;
  assign f_push = active && !f_full;
  assign f_item = '{st: '0, sgn: rd_sign};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      rd_bank <= '0;
      rd_col  <= '0;
    end else if (!active) begin
      if (val_top[rd_bank]) begin
        active <= 1'b1;
        rd_col <= '0;
      end
    end else if (f_push) begin
      if (rd_col == $clog2(NCOL)'(NCOL - 1)) begin
        active  <= 1'b0;
        rd_bank <= rd_bank + 1'b1;
      end
      rd_col <= rd_col + 1'b1;
    end
  end
endmodule
