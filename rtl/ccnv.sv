// ccnv: colour converter between RGB and YCbCr, usable in both directions.
// It uses the reversible integer component transform of JPEG 2000:
//   forward  Y = floor((R + 2G + B) / 4), Cb = B - G, Cr = R - G
//   inverse  G = Y - floor((Cb + Cr) / 4), R = Cr + G, B = Cb + G
// so a forward and an inverse pass give back the input exactly. One pixel per
// clock, result registered one clock after the input. inverse selects the
// direction; in the inverse direction the inputs are read as {Y, Cb, Cr} on
// {c0, c1, c2} and the outputs are {R, G, B}. The choice of the reversible
// transform (rather than the irreversible one) is this design's own.
module ccnv #(
  parameter int BW = 8                  // bits per RGB component
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                inverse,
  input  logic                in_valid,
  input  logic signed [BW+1:0] c0,      // R   or Y
  input  logic signed [BW+1:0] c1,      // G   or Cb
  input  logic signed [BW+1:0] c2,      // B   or Cr
  output logic                out_valid,
  output logic signed [BW+1:0] o0,      // Y   or R
  output logic signed [BW+1:0] o1,      // Cb  or G
  output logic signed [BW+1:0] o2       // Cr  or B
);
  logic signed [BW+3:0] t, g;

  always_comb begin
    if (!inverse) begin
      t = (BW+4)'(c0) + ((BW+4)'(c1) <<< 1) + (BW+4)'(c2);
      g = '0;
    end else begin
      t = (BW+4)'(c1) + (BW+4)'(c2);
      g = (BW+4)'(c0) - (t >>> 2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      o0 <= '0; o1 <= '0; o2 <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (!inverse) begin
          o0 <= (BW+2)'(t >>> 2);
          o1 <= c2 - c1;
          o2 <= c0 - c1;
        end else begin
          o1 <= (BW+2)'(g);
          o0 <= (BW+2)'((BW+4)'(c2) + g);
          o2 <= (BW+2)'((BW+4)'(c1) + g);
        end
      end
    end
  end
endmodule
