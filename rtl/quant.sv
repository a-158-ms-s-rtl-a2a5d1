// quant: dead-zone scalar quantizer and its inverse, one sample per clock.
// Forward: q = sign(x) * floor(|x| / 2^shift), delivered in sign-magnitude
// form with the magnitude saturated to MW bits, as the code-block buffer
// stores it. Inverse: x = sign * (|q| * 2^shift + 2^shift / 2) for q != 0
// (mid-point reconstruction), 0 otherwise. Step sizes are restricted to
// powers of two here; the document does not give the step-size format.
// Result registered one clock after the input.
module quant #(
  parameter int IW = 14,              // transform coefficient width
  parameter int MW = 10               // magnitude bits (bit-planes)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 inverse,
  input  logic [3:0]           shift,     // step size 2^shift
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_coef,   // forward input
  input  logic [MW:0]          in_q,      // inverse input {sign, magnitude}
  output logic                 out_valid,
  output logic [MW:0]          out_q,     // forward output {sign, magnitude}
  output logic signed [IW-1:0] out_coef   // inverse output
);
  logic [IW-1:0] amag, qm;
  logic [IW-1:0] rec;

  always_comb begin
    amag = in_coef[IW-1] ? IW'(-in_coef) : IW'(in_coef);
    qm   = amag >> shift;
    rec  = (IW'(in_q[MW-1:0]) << shift) + ((IW'(1) << shift) >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_q     <= '0;
      out_coef  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (!inverse) begin
          out_q[MW]     <= in_coef[IW-1] && (qm != '0);
          out_q[MW-1:0] <= (qm > IW'((1 << MW) - 1)) ? MW'((1 << MW) - 1) : MW'(qm);
          out_coef      <= '0;
        end else begin
          out_q <= '0;
          if (in_q[MW-1:0] == '0) out_coef <= '0;
          else out_coef <= in_q[MW] ? -rec : rec;
        end
      end
    end
  end
endmodule
