// jp2k_codec: encoder datapath of the codec, from RGB pixels to code words.
// Pixels (one per clock) go through the colour converter (reversible RGB to
// YCbCr), one component is selected (comp_sel) and DC-shifted, each line of
// CB_W samples is split into low-pass and high-pass halves by the 5/3 wavelet
// transform, quantised to sign-magnitude and written, line by line, into the
// code-block buffer of the embedded block coder: CB_H transformed lines make
// one code-block. The block coder then codes all bit-planes of the block in
// parallel and leaves three terminated code words per bit-plane in its
// bit-stream buffer, read through the rd_* port after cb_done.
// The line-to-code-block writer stands in for the line and wavelet buffers of
// a full codec, which would gather each sub-band of a multi-level 2-D
// transform into its own code-blocks; here a code-block holds the low-pass
// half of its lines in columns 0..CB_W/2-1 and the high-pass half in the
// rest. If the code-block buffer has no free bank when a coefficient arrives
// the coefficient is dropped and overrun is set until reset.
// A pass decoder (mqd) reads a stored pass stream through a second window of
// the bit-stream buffer: dec_start with dec_sec/dec_plane/dec_pass selects
// the stream (held stable while decoding), and after dec_ready each dec_valid
// with a context dec_cx returns a decision dec_d one clock later. The contexts
// come from outside, since the decoding-direction bit-plane coder is not part
// of this design.
module jp2k_codec
  import jp2k_pkg::*;
#(
  parameter int PASS_BYTES = 256,
  localparam int AW = $clog2(PASS_BYTES),
  localparam int BW = $clog2(NBANK)
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic [1:0]       comp_sel,     // 0 Y, 1 Cb, 2 Cr
  input  logic [3:0]       qshift,       // quantiser step 2^qshift
  input  band_e            band,
  input  logic             vcausal,
  // pixel input
  input  logic             px_valid,
  input  logic [7:0]       px_r,
  input  logic [7:0]       px_g,
  input  logic [7:0]       px_b,
  // code word output
  output logic             cb_done,
  output logic [BW-1:0]    cb_sec,
  input  logic [BW-1:0]    rd_sec,
  input  logic [$clog2(NBP)-1:0] rd_plane,
  input  pass_e            rd_pass,
  input  logic [AW-1:0]    rd_addr,
  output logic [7:0]       rd_data,
  output logic [AW:0]      len [NBANK][NBP][3],
  output logic             ovf [NBANK][NBP][3],
  // pass decoder: decodes one stored pass stream, one decision per clock
  input  logic             dec_start,
  input  logic [BW-1:0]    dec_sec,
  input  logic [$clog2(NBP)-1:0] dec_plane,
  input  pass_e            dec_pass,
  output logic             dec_ready,
  input  logic             dec_valid,
  input  logic [4:0]       dec_cx,
  output logic             dec_out_valid,
  output logic             dec_d,
  // status
  output logic             overrun,
  output logic [NBP-1:0]   stall_up,
  output logic [NBP-1:0]   stall_low
);
  logic [AW:0]        dec_addr;
  logic [7:0]         dec_win [5];
  logic               cc_valid;
  logic signed [9:0]  y, cb, cr;
  logic               w_valid, w_first;
  logic signed [13:0] w_data;
  logic               q_valid;
  logic [NBP:0]       q_coef;
  logic signed [11:0] comp;
  logic               ext_ready, ext_we, ext_last;
  logic [$clog2(CB_W*CB_H)-1:0] widx;
  logic signed [13:0] unused_coef;

  ccnv #(.BW(8)) u_ccnv (
    .clk, .rst_n, .inverse(1'b0), .in_valid(px_valid),
    .c0({2'b00, px_r}), .c1({2'b00, px_g}), .c2({2'b00, px_b}),
    .out_valid(cc_valid), .o0(y), .o1(cb), .o2(cr));

  always_comb begin
    case (comp_sel)
      2'd1:    comp = 12'(cb);
      2'd2:    comp = 12'(cr);
      default: comp = 12'(y) - 12'sd128;   // DC level shift of the luminance
    endcase
  end

  dwt53 #(.N(CB_W), .IW(12), .OW(14)) u_dwt (
    .clk, .rst_n, .inverse(1'b0), .in_valid(cc_valid), .in_data(comp),
    .out_valid(w_valid), .out_data(w_data), .out_first(w_first));

  quant #(.IW(14), .MW(NBP)) u_q (
    .clk, .rst_n, .inverse(1'b0), .shift(qshift), .in_valid(w_valid),
    .in_coef(w_data), .in_q('0), .out_valid(q_valid), .out_q(q_coef),
    .out_coef(unused_coef));

  // code-block writer: consecutive transformed lines fill a code-block row by row
  assign ext_we   = q_valid && ext_ready;
  assign ext_last = (widx == '1);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx    <= '0;
      overrun <= 1'b0;
    end else if (q_valid) begin
      if (ext_ready) widx <= widx + 1'b1;
      else           overrun <= 1'b1;
    end
  end

  ebc u_ebc (
    .clk, .rst_n, .band, .vcausal,
    .ext_ready, .ext_we, .ext_idx(widx), .ext_coef(q_coef), .ext_last,
    .cb_done, .cb_sec, .rd_sec, .rd_plane, .rd_pass, .rd_addr, .rd_data,
    .wd_sec(dec_sec), .wd_plane(dec_plane), .wd_pass(dec_pass), .wd_addr(dec_addr), .wd_win(dec_win),
    .len, .ovf, .stall_up, .stall_low);

  mqd #(.AW(AW)) u_mqd (
    .clk, .rst_n, .start(dec_start), .len(len[dec_sec][dec_plane][dec_pass]),
    .rd_addr(dec_addr), .rd_win(dec_win), .ready(dec_ready),
    .in_valid(dec_valid), .in_cx(dec_cx), .out_valid(dec_out_valid), .out_d(dec_d));
endmodule
