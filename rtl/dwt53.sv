// dwt53: one-dimensional reversible 5/3 wavelet transform of lines of N
// samples, forward or inverse, one sample per clock in and out.
// Samples of a line are collected in an input line buffer. When a line is
// complete it is transformed as a whole in one clock into an output buffer,
// which is then streamed out while the next line is collected, so the latency
// is one line plus two clocks. The lifting steps with symmetric extension are
//   predict  d[i] = x[2i+1] - floor((x[2i] + x[2i+2]) / 2)
//   update   s[i] = x[2i]   + floor((d[i-1] + d[i] + 2) / 4)
// and the inverse runs them backwards. Forward output order is the low-pass
// half s[0..N/2-1] followed by the high-pass half d[0..N/2-1]; the inverse
// takes that order and returns the interleaved samples. The 5/3 filter, the
// line organisation and the output order are this design's choices.
module dwt53 #(
  parameter int N  = 128,             // line length (tile width)
  parameter int IW = 12,              // input sample width
  parameter int OW = 14               // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 inverse,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data,
  output logic                 out_first    // first sample of a line
);
  localparam int H  = N / 2;
  localparam int CW = $clog2(N);
  logic signed [OW-1:0] ibuf [N];
  logic signed [OW-1:0] obuf [N];
  logic signed [OW-1:0] res  [N];
  logic [CW-1:0] icnt, ocnt;
  logic          line_rdy, obusy;

  function automatic logic signed [OW-1:0] xa(input logic signed [OW-1:0] v [N], input int i);
    // symmetric extension of an interleaved line
    if (i < 0)  return v[-i];
    if (i >= N) return v[2 * N - 2 - i];
    return v[i];
  endfunction

  always_comb begin
    logic signed [OW-1:0] d [H];
    logic signed [OW-1:0] sv [H];
    logic signed [OW-1:0] x [N];
    if (!inverse) begin
      for (int i = 0; i < H; i++)
        d[i] = ibuf[2*i+1] - ((xa(ibuf, 2*i) + xa(ibuf, 2*i+2)) >>> 1);
      for (int i = 0; i < H; i++)
        sv[i] = ibuf[2*i] + ((d[(i > 0) ? i - 1 : 0] + d[i] + OW'(2)) >>> 2);
      for (int i = 0; i < H; i++) begin
        res[i]     = sv[i];
        res[H + i] = d[i];
      end
      x = ibuf;
    end else begin
      for (int i = 0; i < H; i++) begin
        sv[i] = ibuf[i];
        d[i]  = ibuf[H + i];
      end
      for (int i = 0; i < H; i++)
        x[2*i] = sv[i] - ((d[(i > 0) ? i - 1 : 0] + d[i] + OW'(2)) >>> 2);
      for (int i = 0; i < H; i++)
        x[2*i+1] = d[i] + ((x[2*i] + ((i < H - 1) ? x[2*i+2] : x[2*i])) >>> 1);
      res = x;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt      <= '0;
      ocnt      <= '0;
      line_rdy  <= 1'b0;
      obusy     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_first <= 1'b0;
    end else begin
      line_rdy <= 1'b0;
      if (in_valid) begin
        ibuf[icnt] <= OW'(in_data);
        icnt       <= (icnt == CW'(N - 1)) ? '0 : icnt + 1'b1;
        if (icnt == CW'(N - 1)) line_rdy <= 1'b1;
      end
      out_valid <= 1'b0;
      out_first <= 1'b0;
      if (obusy) begin
        out_valid <= 1'b1;
        out_data  <= obuf[ocnt];
        out_first <= (ocnt == '0);
        ocnt      <= ocnt + 1'b1;
        if (ocnt == CW'(N - 1)) obusy <= 1'b0;
      end
      // a new line takes over right after the last sample of the previous one
      if (line_rdy) begin
        obuf  <= res;
        obusy <= 1'b1;
        ocnt  <= '0;
      end
    end
  end
endmodule
