// rcm_concat: concatenating logic of the RCM.
//
// Builds the 16-bit MAC operands from the words read out of the four
// feature banks (A_F..D_F = fbank[0..3]) and the four weight banks
// (A_W..D_W = wbank[0..3]). Each bank word carries four consecutive input
// channels i..i+3 (lane l = bits 4l+3:4l); `lane` is i mod 4 of the
// channel being processed. With X[c] the chunk of channel c in bank X:
//   16x : op1 = A_F[i] B_F[i] C_F[i] D_F[i]
//         op2 = A_W[i] B_W[i] C_W[i] D_W[i]
//   8x  : op1 = C_F[i] D_F[i] C_F[i+1] D_F[i+1]
//         op2 = C_W[i+1] D_W[i+1] C_W[i] D_W[i]
//   4x  : op1 = D_F[i] D_F[i+1] D_F[i+2] D_F[i+3]
//         op2 = D_W[i+3] D_W[i+2] D_W[i+1] D_W[i]
// (leftmost chunk most significant). The weight chunks are placed in
// reverse order so that the ST multiplier pairs every feature element with
// the weight of the same channel. These concatenations are the original
// design's; i is forced to a multiple of N (lane even in 8x, 0 in 4x).
// Purely combinational. Filter o's weights are bits 16*o+15:16*o of each
// weight bank word; op2[o] feeds MAC unit o.
module rcm_concat
  import rcm_pkg::*;
#(
  parameter int unsigned OC_MAX = 32
) (
  input  rcm_cfg_e                 cfg,
  input  logic [1:0]               lane,
  input  logic [OP_W-1:0]          fbank [4],
  input  logic [OC_MAX*OP_W-1:0]   wbank [4],
  output logic [OP_W-1:0]          op1,
  output logic [OP_W-1:0]          op2 [OC_MAX]
);

  localparam int A = 0, B = 1, C = 2, D = 3;

  function automatic logic [NIB_W-1:0] nib(logic [OP_W-1:0] w, int l);
    return w[NIB_W*l +: NIB_W];
  endfunction

  int unsigned l0;   // first lane used in this mode

  always_comb begin
    case (cfg)
      CFG_8X:  l0 = {30'd0, lane[1], 1'b0};
      CFG_4X:  l0 = 0;
      default: l0 = {30'd0, lane};
    endcase
  end

  always_comb begin
    case (cfg)
      CFG_8X:  op1 = {nib(fbank[C], l0),   nib(fbank[D], l0),
                      nib(fbank[C], l0+1), nib(fbank[D], l0+1)};
      CFG_4X:  op1 = {nib(fbank[D], 0), nib(fbank[D], 1),
                      nib(fbank[D], 2), nib(fbank[D], 3)};
      default: op1 = {nib(fbank[A], l0), nib(fbank[B], l0),
                      nib(fbank[C], l0), nib(fbank[D], l0)};
    endcase
  end

  always_comb begin
    for (int o = 0; o < OC_MAX; o++) begin
      logic [OP_W-1:0] wa, wb, wc, wd;
      wa = wbank[A][OP_W*o +: OP_W];
      wb = wbank[B][OP_W*o +: OP_W];
      wc = wbank[C][OP_W*o +: OP_W];
      wd = wbank[D][OP_W*o +: OP_W];
      case (cfg)
        CFG_8X:  op2[o] = {nib(wc, l0+1), nib(wd, l0+1), nib(wc, l0), nib(wd, l0)};
        CFG_4X:  op2[o] = {nib(wd, 3), nib(wd, 2), nib(wd, 1), nib(wd, 0)};
        default: op2[o] = {nib(wa, l0), nib(wb, l0), nib(wc, l0), nib(wd, l0)};
      endcase
    end
  end

endmodule
