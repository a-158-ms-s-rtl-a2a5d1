// ebc: embedded block coder (encoding direction).
// A code-block buffer holds up to NBANK code-blocks as separate bit-planes.
// One bit-plane coder (BPC) per magnitude plane codes its plane of every
// code-block; all planes work at the same time. The coders form a chain: the
// sign-plane feeder feeds the most significant coder, and each coder hands the
// final coefficient states and signs of every column to the next lower coder
// through a small FIFO. A coder stalls when its upper FIFO is empty or its
// lower FIFO is full, which keeps each plane about one stripe and one column
// behind the plane above it. Each coder writes three terminated code words
// (SP, MR, CU pass) into its area of the bit-stream buffer.
// The external side writes a block into the buffer when ext_ready is high and
// marks the last coefficient with ext_last; cb_done pulses when the least
// significant plane of a block is finished; cb_sec (valid with cb_done) names
// the bit-stream buffer section, equal to the buffer bank the block came from,
// that holds its code words. A section stays untouched until the external side
// has written a new block into that bank.
module ebc
  import jp2k_pkg::*;
#(
  parameter int NPL        = NBP,
  parameter int NC         = CB_W,
  parameter int NR         = CB_H,
  parameter int FIFO_DEPTH = 8,
  parameter int PASS_BYTES = 256,
  localparam int NSTR      = NR / 4,
  localparam int NCOL      = NC * NSTR,
  localparam int BW        = $clog2(NBANK),
  localparam int AW        = $clog2(PASS_BYTES)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  band_e                    band,
  input  logic                     vcausal,
  // code-block input
  output logic                     ext_ready,
  input  logic                     ext_we,
  input  logic [$clog2(NC*NR)-1:0] ext_idx,
  input  logic [NPL:0]             ext_coef,
  input  logic                     ext_last,
  // code word output
  output logic                     cb_done,
  output logic [BW-1:0]            cb_sec,
  input  logic [BW-1:0]            rd_sec,
  input  logic [$clog2(NPL)-1:0]   rd_plane,
  input  pass_e                    rd_pass,
  input  logic [AW-1:0]            rd_addr,
  output logic [7:0]               rd_data,
  input  logic [BW-1:0]            wd_sec,
  input  logic [$clog2(NPL)-1:0]   wd_plane,
  input  pass_e                    wd_pass,
  input  logic [AW:0]              wd_addr,
  output logic [7:0]               wd_win [5],
  output logic [AW:0]              len [NBANK][NPL][3],
  output logic                     ovf [NBANK][NPL][3],
  // activity of each coder
  output logic [NPL-1:0]           stall_up,
  output logic [NPL-1:0]           stall_low
);
  logic [BW-1:0]         rd_bank [NPL+1];
  logic [$clog2(NCOL)-1:0] rd_col [NPL+1];
  logic [3:0]            rd_bits [NPL+1];
  logic [NBANK-1:0]      val_top, val_bot;
  logic [NPL-1:0]        done;
  logic [BW-1:0]         top_bank, bot_bank;

  // FIFO f[p] feeds coder p; f[NPL-1] is fed by the sign-plane feeder
  logic      f_push  [NPL];
  logic      f_pop   [NPL];
  logic      f_empty [NPL];
  logic      f_full  [NPL];
  col_item_t f_wr    [NPL];
  col_item_t f_rd    [NPL];

  logic              bs_clear [NPL];
  logic [BW-1:0]     bs_sec   [NPL];
  pass_e             bs_pass  [NPL];
  logic [2:0]        bs_cnt   [NPL];
  logic [7:0]        bs_byte  [NPL][4];

  cbb #(.NBANKS(NBANK), .NPL(NPL), .NC(NC), .NR(NR)) u_cbb (
    .clk, .rst_n, .ext_ready, .ext_we, .ext_idx, .ext_coef, .ext_last,
    .rd_bank, .rd_col, .rd_bits, .val_top, .val_bot,
    .top_release(done[NPL-1]), .top_bank, .bot_release(done[0]), .bot_bank);

  bps_feeder #(.NCOL(NCOL), .NBANKS(NBANK)) u_bps (
    .clk, .rst_n, .val_top, .rd_bank(rd_bank[NPL]), .rd_col(rd_col[NPL]),
    .rd_sign(rd_bits[NPL]), .f_full(f_full[NPL-1]), .f_push(f_push[NPL-1]),
    .f_item(f_wr[NPL-1]));

  for (genvar p = 0; p < NPL; p++) begin : g_plane
    logic      l_full, l_push;
    col_item_t l_item;

    bpc_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .push(f_push[p]), .wr_item(f_wr[p]), .pop(f_pop[p]),
      .rd_item(f_rd[p]), .empty(f_empty[p]), .full(f_full[p]));

    if (p > 0) begin : g_link
      assign l_full     = f_full[p-1];
      assign f_push[p-1] = l_push;
      assign f_wr[p-1]   = l_item;
    end else begin : g_last
      // states leaving the least significant plane are not needed for encoding
      assign l_full = 1'b0;
    end

    bpc #(.NC(NC), .NSTR(NSTR)) u_bpc (
      .clk, .rst_n, .band, .vcausal,
      .u_empty(f_empty[p]), .u_item(f_rd[p]), .u_pop(f_pop[p]),
      .l_full, .l_push, .l_item,
      .cbb_bank(rd_bank[p]), .cbb_col(rd_col[p]), .cbb_bits(rd_bits[p]),
      .bs_clear(bs_clear[p]), .bs_sec(bs_sec[p]), .bs_pass(bs_pass[p]),
      .bs_cnt(bs_cnt[p]), .bs_byte(bs_byte[p]),
      .done(done[p]), .stall_up(stall_up[p]), .stall_low(stall_low[p]));
  end

  bsb #(.NPL(NPL), .NSEC(NBANK), .PASS_BYTES(PASS_BYTES)) u_bsb (
    .clk, .rst_n, .wr_clear(bs_clear), .wr_sec(bs_sec), .wr_pass(bs_pass),
    .wr_cnt(bs_cnt), .wr_byte(bs_byte), .rd_sec, .rd_plane, .rd_pass, .rd_addr,
    .rd_data, .wd_sec, .wd_plane, .wd_pass, .wd_addr, .wd_win, .len, .ovf);

  // bank of the block each end of the chain finishes next
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_bank <= '0;
      bot_bank <= '0;
    end else begin
      if (done[NPL-1]) top_bank <= top_bank + 1'b1;
      if (done[0]) bot_bank <= bot_bank + 1'b1;
    end
  end
  assign cb_done = done[0];
  assign cb_sec  = bot_bank;
endmodule
