// ssb: stripe buffer of one bit-plane coder.
// Holds, per coefficient of the stripes still in use, the state from the upper
// bit-plane (after its CU pass), the sign, the state after this plane's SP
// pass, a flag that the SP pass modelled the bit, the magnitude bit of this
// plane and the state after this plane's CU pass. Stripes sit in a ring of four
// slots selected by stripe number modulo 4, so only a few stripes are stored,
// never the whole code-block. The four fields groups have their own write ports
// because they are produced at different times: an upper-plane column when it
// is taken from the U-FIFO, SP results when the SP column is processed, and CU
// results when the MR/CU column is processed. All fields are read
// combinationally (registers), writes take effect at the clock edge.
module ssb
  import jp2k_pkg::*;
#(
  parameter int NC    = CB_W,   // columns per stripe
  parameter int NSLOT = 4       // stripe slots in the ring
) (
  input  logic clk,
  // upper-plane column (from U-FIFO)
  input  logic                     up_we,
  input  logic [1:0]               up_slot,
  input  logic [$clog2(NC)-1:0]    up_col,
  input  col_item_t                up_item,
  // SP results
  input  logic                     sp_we,
  input  logic [1:0]               sp_slot,
  input  logic [$clog2(NC)-1:0]    sp_col,
  input  cstate_t [3:0]            sp_st,
  input  logic [3:0]               sp_pd1,
  input  logic [3:0]               sp_v,
  // CU results
  input  logic                     cu_we,
  input  logic [1:0]               cu_slot,
  input  logic [$clog2(NC)-1:0]    cu_col,
  input  cstate_t [3:0]            cu_st,
  // read side
  output cstate_t [3:0] up_q  [NSLOT][NC],
  output logic    [3:0] sgn_q [NSLOT][NC],
  output cstate_t [3:0] sp_q  [NSLOT][NC],
  output logic    [3:0] pd1_q [NSLOT][NC],
  output logic    [3:0] v_q   [NSLOT][NC],
  output cstate_t [3:0] cu_q  [NSLOT][NC]
);
  always_ff @(posedge clk) begin
    if (up_we) begin
      up_q [up_slot][up_col] <= up_item.st;
      sgn_q[up_slot][up_col] <= up_item.sgn;
    end
    if (sp_we) begin
      sp_q [sp_slot][sp_col] <= sp_st;
      pd1_q[sp_slot][sp_col] <= sp_pd1;
      v_q  [sp_slot][sp_col] <= sp_v;
    end
    if (cu_we) begin
      cu_q [cu_slot][cu_col] <= cu_st;
    end
  end
endmodule
