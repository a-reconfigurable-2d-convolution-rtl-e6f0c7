// rcm_st_mult: Sum-Together (ST) reconfigurable multiplier.
//
// Both 16-bit operands are split into four 4-bit chunks, op1 = f3 f2 f1 f0
// and op2 = w3 w2 w1 w0 (f3/w3 most significant). Depending on CONFIG the
// 32-bit result is
//   16x : y = f[3:0] * w[3:0]                     (one 16x16 product)
//   8x  : y = f[3:2] * w[1:0] + f[1:0] * w[3:2]    (two 8x8 products summed)
//   4x  : y = f3*w0 + f2*w1 + f1*w2 + f0*w3        (four 4x4 products summed)
// which is the operation table of the reconfigurable multiplier.
//
// Implementation (this design's choice; the internal arrangement of the
// original multiplier is not spelled out): a grid of sixteen 5x5 signed
// chunk multipliers. Chunk j of op1 times chunk l of op2 is used when
//   16x : always,            weight 2^(4*(j+l))
//   8x  : j, l in opposite halves, weight 2^(4*(j+l-2))
//   4x  : j + l == 3,        weight 1
// A chunk is sign-extended to 5 bits when it is the top chunk of an element
// in the current mode (j==3 in 16x, j==3 or 1 in 8x, every chunk in 4x) and
// zero-extended otherwise, so every element is a two's-complement number.
// Signed operands follow the comparison baseline, whose multipliers extend
// the operands' sign at low precision.
//
// Purely combinational; no clock.
module rcm_st_mult
  import rcm_pkg::*;
(
  input  rcm_cfg_e             cfg,
  input  logic [OP_W-1:0]      op1,
  input  logic [OP_W-1:0]      op2,
  output logic [PROD_W-1:0]    y
);

  // Is chunk c the most significant chunk of an element in this mode?
  function automatic logic chunk_is_top(rcm_cfg_e m, int c);
    case (m)
      CFG_8X:  return (c == 3) || (c == 1);
      CFG_4X:  return 1'b1;
      default: return (c == 3);
    endcase
  endfunction

  logic signed [4:0] fx [4];
  logic signed [4:0] wx [4];

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      fx[c] = {chunk_is_top(cfg, c) & op1[4*c+3], op1[4*c +: 4]};
      wx[c] = {chunk_is_top(cfg, c) & op2[4*c+3], op2[4*c +: 4]};
    end
  end

  always_comb begin
    logic signed [PROD_W-1:0] acc;
    logic signed [9:0]        p;
    logic                     use_it;
    int                       sh;
    acc = '0;
    for (int j = 0; j < 4; j++) begin
      for (int l = 0; l < 4; l++) begin
        p = fx[j] * wx[l];
        case (cfg)
          CFG_8X: begin
            use_it = ((j >= 2) != (l >= 2));
            sh     = 4 * (j + l - 2);
          end
          CFG_4X: begin
            use_it = (j + l == 3);
            sh     = 0;
          end
          default: begin
            use_it = 1'b1;
            sh     = 4 * (j + l);
          end
        endcase
        if (use_it)
          acc = acc + (PROD_W'(p) <<< sh);
      end
    end
    y = acc;
  end

endmodule
