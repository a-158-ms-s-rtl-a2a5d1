// jp2k_pkg: types, sizes and coding tables shared by the embedded block coder.
// The code-block is 32x32 samples with 10 magnitude bit-planes plus a sign
// plane, held in 4 banks (Table 1 sizes of the codec). Code-block columns are
// addressed linearly in scan order: column index = stripe*CB_W + column, each
// column carrying the 4 bits of one stripe. Context numbers follow the usual
// EBCOT numbering: 0-8 zero coding, 9-13 sign coding, 14-16 magnitude
// refinement, 17 run-length, 18 uniform. The MQ probability table is the
// standard 47-state table of the arithmetic coder.
package jp2k_pkg;

  localparam int CB_W   = 32;            // code-block width (columns)
  localparam int CB_H   = 32;            // code-block height (rows)
  localparam int NBP    = 10;            // magnitude bit-planes (bp9..bp0)
  localparam int NBANK  = 4;             // code-block buffer banks
  localparam int NCTX   = 19;            // MQ contexts

  localparam logic [4:0] CX_RL  = 5'd17;
  localparam logic [4:0] CX_UNI = 5'd18;

  // coding pass of a CX-D pair
  typedef enum logic [1:0] {PASS_SP = 2'd0, PASS_MR = 2'd1, PASS_CU = 2'd2} pass_e;

  // sub-band orientation, selects the zero-coding table
  typedef enum logic [1:0] {BAND_LL = 2'd0, BAND_HL = 2'd1, BAND_LH = 2'd2, BAND_HH = 2'd3} band_e;

  // 2-bit coefficient state (0: insignificant, 1: became significant in the SP
  // pass of this bit-plane, 2: significant and not yet refined, 3: refined)
  typedef logic [1:0] cstate_t;

  // one context/decision pair
  typedef struct packed {
    pass_e      pass;
    logic [4:0] cx;
    logic       d;
  } cxd_t;

  // one column of coefficient states and signs, sent from an upper BPC to the lower one
  typedef struct packed {
    cstate_t [3:0] st;
    logic    [3:0] sgn;
  } col_item_t;

  // neighbourhood of one coefficient as seen by context generation
  // sig: [0]=left [1]=right [2]=up [3]=down [4]=up-left [5]=up-right [6]=down-left [7]=down-right
  // sgn: signs of left, right, up, down (1 = negative)
  typedef struct packed {
    logic [7:0] sig;
    logic [3:0] sgn;
  } nbr_t;

  // MQ state table entry
  typedef struct packed {
    logic [15:0] qe;
    logic [5:0]  nmps;
    logic [5:0]  nlps;
    logic        sw;
  } qe_ent_t;

  function automatic qe_ent_t qe_table(input logic [5:0] i);
    case (i)
      6'd0 : return '{16'h5601,  6'd1,  6'd1, 1'b1};
      6'd1 : return '{16'h3401,  6'd2,  6'd6, 1'b0};
      6'd2 : return '{16'h1801,  6'd3,  6'd9, 1'b0};
      6'd3 : return '{16'h0AC1,  6'd4, 6'd12, 1'b0};
      6'd4 : return '{16'h0521,  6'd5, 6'd29, 1'b0};
      6'd5 : return '{16'h0221, 6'd38, 6'd33, 1'b0};
      6'd6 : return '{16'h5601,  6'd7,  6'd6, 1'b1};
      6'd7 : return '{16'h5401,  6'd8, 6'd14, 1'b0};
      6'd8 : return '{16'h4801,  6'd9, 6'd14, 1'b0};
      6'd9 : return '{16'h3801, 6'd10, 6'd14, 1'b0};
      6'd10: return '{16'h3001, 6'd11, 6'd17, 1'b0};
      6'd11: return '{16'h2401, 6'd12, 6'd18, 1'b0};
      6'd12: return '{16'h1C01, 6'd13, 6'd20, 1'b0};
      6'd13: return '{16'h1601, 6'd29, 6'd21, 1'b0};
      6'd14: return '{16'h5601, 6'd15, 6'd14, 1'b1};
      6'd15: return '{16'h5401, 6'd16, 6'd14, 1'b0};
      6'd16: return '{16'h5101, 6'd17, 6'd15, 1'b0};
      6'd17: return '{16'h4801, 6'd18, 6'd16, 1'b0};
      6'd18: return '{16'h3801, 6'd19, 6'd17, 1'b0};
      6'd19: return '{16'h3401, 6'd20, 6'd18, 1'b0};
      6'd20: return '{16'h3001, 6'd21, 6'd19, 1'b0};
      6'd21: return '{16'h2801, 6'd22, 6'd19, 1'b0};
      6'd22: return '{16'h2401, 6'd23, 6'd20, 1'b0};
      6'd23: return '{16'h2201, 6'd24, 6'd21, 1'b0};
      6'd24: return '{16'h1C01, 6'd25, 6'd22, 1'b0};
      6'd25: return '{16'h1801, 6'd26, 6'd23, 1'b0};
      6'd26: return '{16'h1601, 6'd27, 6'd24, 1'b0};
      6'd27: return '{16'h1401, 6'd28, 6'd25, 1'b0};
      6'd28: return '{16'h1201, 6'd29, 6'd26, 1'b0};
      6'd29: return '{16'h1101, 6'd30, 6'd27, 1'b0};
      6'd30: return '{16'h0AC1, 6'd31, 6'd28, 1'b0};
      6'd31: return '{16'h09C1, 6'd32, 6'd29, 1'b0};
      6'd32: return '{16'h08A1, 6'd33, 6'd30, 1'b0};
      6'd33: return '{16'h0521, 6'd34, 6'd31, 1'b0};
      6'd34: return '{16'h0441, 6'd35, 6'd32, 1'b0};
      6'd35: return '{16'h02A1, 6'd36, 6'd33, 1'b0};
      6'd36: return '{16'h0221, 6'd37, 6'd34, 1'b0};
      6'd37: return '{16'h0141, 6'd38, 6'd35, 1'b0};
      6'd38: return '{16'h0111, 6'd39, 6'd36, 1'b0};
      6'd39: return '{16'h0085, 6'd40, 6'd37, 1'b0};
      6'd40: return '{16'h0049, 6'd41, 6'd38, 1'b0};
      6'd41: return '{16'h0025, 6'd42, 6'd39, 1'b0};
      6'd42: return '{16'h0015, 6'd43, 6'd40, 1'b0};
      6'd43: return '{16'h0009, 6'd44, 6'd41, 1'b0};
      6'd44: return '{16'h0005, 6'd45, 6'd42, 1'b0};
      6'd45: return '{16'h0001, 6'd45, 6'd43, 1'b0};
      default: return '{16'h5601, 6'd46, 6'd46, 1'b0};
    endcase
  endfunction

  // initial probability state of each context at the start of a pass
  function automatic logic [5:0] ctx_init(input int cx);
    if (cx == 0)  return 6'd4;
    if (cx == 17) return 6'd3;
    if (cx == 18) return 6'd46;
    return 6'd0;
  endfunction

endpackage
