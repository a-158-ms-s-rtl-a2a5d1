// bpc_fifo: FIFO between two neighbouring bit-plane coders.
// Carries one column item per entry (four 2-bit coefficient states after the
// upper plane's CU pass and four sign bits). The head entry is visible on
// rd_item while not empty (show-ahead), so the lower coder can use it in the
// same cycle it pops it. A coder stalls on an empty U-FIFO or a full L-FIFO,
// which is what keeps the upper and lower bit-planes in step without any
// central controller. Depth is a free choice of this design.
module bpc_fifo
  import jp2k_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  col_item_t wr_item,
  input  logic      pop,
  output col_item_t rd_item,
  output logic      empty,
  output logic      full
);
  localparam int AW = $clog2(DEPTH);
  col_item_t      mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    cnt;

  assign empty   = (cnt == '0);
  assign full    = (cnt == (AW+1)'(DEPTH));
  assign rd_item = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) begin
        mem[wp] <= wr_item;
        wp      <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
