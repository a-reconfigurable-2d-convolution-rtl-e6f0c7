// rcm_pkg: types and constants shared by the Reconfigurable 2D-Convolution
// Module (RCM).
//
// The RCM multiplies N (feature, weight) pairs per MAC unit and cycle, with
// N = 1, 2 or 4 and each element 16/N bits wide. The three precision modes
// are called 16x, 8x and 4x. Operands travel as 16-bit words made of four
// 4-bit chunks, so a single 4-bit "nibble" is the storage unit of every
// input buffer bank.
//
// The control overheads O1 (per output row) and O2 (per output pixel) are
// the cycle counts quoted for the original design (o1 = 2, o2 = 5); the
// controller in this implementation is built so that its latency follows
// the same formula exactly.
package rcm_pkg;

  // Precision mode carried on the CONFIG signal. The 2-bit encoding is this
  // design's choice.
  typedef enum logic [1:0] {
    CFG_16X = 2'd0,   // N = 1: one 16x16 product
    CFG_8X  = 2'd1,   // N = 2: two 8x8 products summed
    CFG_4X  = 2'd2    // N = 4: four 4x4 products summed
  } rcm_cfg_e;

  localparam int unsigned NIB_W  = 4;    // width of one bank entry
  localparam int unsigned OP_W   = 16;   // op1 / op2 width
  localparam int unsigned PROD_W = 32;   // multiplier output width
  localparam int unsigned OUT_W  = 32;   // output feature-map element width

  // Control-logic overheads of the latency formula
  //   cycles = OH * (O1 + OW * (O2 + IC/N * KS^2))
  localparam int unsigned O1 = 2;
  localparam int unsigned O2 = 5;

  // Number of products computed in one shot for a mode.
  function automatic int unsigned cfg_n(rcm_cfg_e cfg);
    case (cfg)
      CFG_8X:  return 2;
      CFG_4X:  return 4;
      default: return 1;
    endcase
  endfunction

endpackage
