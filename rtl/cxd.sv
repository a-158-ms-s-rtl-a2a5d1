// cxd: context generation for one coefficient bit.
// From the significance and signs of the eight neighbours it forms, in one
// combinational step, the zero-coding context (table chosen by the sub-band
// orientation), the sign-coding context with its XOR bit, and the magnitude
// refinement context. The bit-plane coder feeds one cxd per bit position; the
// pre-processor picks which of the outputs becomes a CX-D pair. The context
// rules are the standard EBCOT ones; the document names this unit but does not
// list its tables. Purely combinational, no clock.
module cxd
  import jp2k_pkg::*;
(
  input  nbr_t       nbr,        // neighbour significance and signs
  input  band_e      band,       // sub-band orientation
  input  logic       first_ref,  // coefficient not refined yet (state 2)
  output logic [4:0] zc_cx,      // zero-coding context 0..8
  output logic [4:0] sc_cx,      // sign-coding context 9..13
  output logic       sc_xor,     // sign prediction bit
  output logic [4:0] mr_cx,      // refinement context 14..16
  output logic       any_sig     // at least one significant neighbour
);
  logic [1:0] h, v, hh, vv;
  logic [2:0] d, hv;
  logic signed [2:0] hc, vc;

  function automatic logic signed [2:0] contrib(input logic s, input logic neg);
    if (!s) return 3'sd0;
    return neg ? -3'sd1 : 3'sd1;
  endfunction

  always_comb begin
    hh     = 2'd0;
    vv     = 2'd0;
    sc_cx  = 5'd9;
    sc_xor = 1'b0;
    mr_cx  = 5'd16;
    h  = 2'(nbr.sig[0]) + 2'(nbr.sig[1]);
    v  = 2'(nbr.sig[2]) + 2'(nbr.sig[3]);
    d  = 3'(nbr.sig[4]) + 3'(nbr.sig[5]) + 3'(nbr.sig[6]) + 3'(nbr.sig[7]);
    hv = 3'(h) + 3'(v);
    any_sig = |nbr.sig;

    // zero coding
    zc_cx = 5'd0;
    if (band == BAND_HH) begin
      if (d >= 3)      zc_cx = 5'd8;
      else if (d == 2) zc_cx = (hv >= 1) ? 5'd7 : 5'd6;
      else if (d == 1) zc_cx = (hv >= 2) ? 5'd5 : (hv == 1) ? 5'd4 : 5'd3;
      else             zc_cx = (hv >= 2) ? 5'd2 : (hv == 1) ? 5'd1 : 5'd0;
    end else begin
      // HL swaps the roles of the horizontal and vertical counts
      hh = (band == BAND_HL) ? v : h;
      vv = (band == BAND_HL) ? h : v;
      if (hh == 2)      zc_cx = 5'd8;
      else if (hh == 1) zc_cx = (vv >= 1) ? 5'd7 : (d >= 1) ? 5'd6 : 5'd5;
      else if (vv == 2) zc_cx = 5'd4;
      else if (vv == 1) zc_cx = 5'd3;
      else              zc_cx = (d >= 2) ? 5'd2 : (d == 1) ? 5'd1 : 5'd0;
    end

    // sign coding
    hc = contrib(nbr.sig[0], nbr.sgn[0]) + contrib(nbr.sig[1], nbr.sgn[1]);
    vc = contrib(nbr.sig[2], nbr.sgn[2]) + contrib(nbr.sig[3], nbr.sgn[3]);
    if (hc > 1)  hc = 3'sd1;
    if (hc < -1) hc = -3'sd1;
    if (vc > 1)  vc = 3'sd1;
    if (vc < -1) vc = -3'sd1;
    sc_xor = 1'b0;
    if (hc == 3'sd1) begin
      sc_cx = (vc == 3'sd1) ? 5'd13 : (vc == 3'sd0) ? 5'd12 : 5'd11;
    end else if (hc == 3'sd0) begin
      sc_cx  = (vc == 3'sd0) ? 5'd9 : 5'd10;
      sc_xor = (vc == -3'sd1);
    end else begin
      sc_cx  = (vc == 3'sd1) ? 5'd11 : (vc == 3'sd0) ? 5'd12 : 5'd13;
      sc_xor = 1'b1;
    end

    // magnitude refinement
    if (!first_ref)   mr_cx = 5'd16;
    else if (any_sig) mr_cx = 5'd15;
    else              mr_cx = 5'd14;
  end
endmodule
