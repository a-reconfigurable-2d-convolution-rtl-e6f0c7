// rcm_addr_gen: memory addressing logic of the RCM.
//
// Maps the loop position of the controller -- output pixel (ox, oy),
// kernel position (kx, ky) for run-time kernel size ks, input channel i --
// onto the buffer words to read and write:
//   feature word : ((oy+ky)*W_MAX + ox+kx) * IC_MAX/4 + i/4
//   weight word  : (ky*ks + kx) * IC_MAX/4 + i/4      (k = ky*ks + kx)
//   output word  : oy*W_MAX + ox
//   lane         : i mod 4 (which of the four channels in a word)
// Feature tiles are stored with the fixed W_MAX x H_MAX x IC_MAX strides of
// the buffer; convolution is stride 1 over a tile that already holds its
// padding (stride and padding are not discussed for the module, so stride 1
// is this design's choice). Purely combinational.
module rcm_addr_gen
  import rcm_pkg::*;
#(
  parameter int unsigned W_MAX  = 18,
  parameter int unsigned H_MAX  = 18,
  parameter int unsigned IC_MAX = 32,
  parameter int unsigned KS_MAX = 7,
  localparam int unsigned XW   = $clog2(W_MAX + 1),
  localparam int unsigned YW   = $clog2(H_MAX + 1),
  localparam int unsigned KSW  = $clog2(KS_MAX + 1),
  localparam int unsigned CW   = $clog2(IC_MAX + 1),
  localparam int unsigned FAW  = $clog2(W_MAX * H_MAX * IC_MAX / 4),
  localparam int unsigned WAW  = $clog2(KS_MAX * KS_MAX * IC_MAX / 4),
  localparam int unsigned PW   = $clog2(W_MAX * H_MAX)
) (
  input  logic [XW-1:0]   ox,
  input  logic [YW-1:0]   oy,
  input  logic [KSW-1:0]  kx,
  input  logic [KSW-1:0]  ky,
  input  logic [KSW-1:0]  ks,
  input  logic [CW-1:0]   ch,
  output logic [FAW-1:0]  f_addr,
  output logic [WAW-1:0]  w_addr,
  output logic [PW-1:0]   o_pix,
  output logic [1:0]      lane
);

  localparam int unsigned GROUPS = IC_MAX / 4;

  always_comb begin
    int unsigned px, py, grp;
    px     = 32'(ox) + 32'(kx);
    py     = 32'(oy) + 32'(ky);
    grp    = 32'(ch) / 4;
    f_addr = FAW'((py * W_MAX + px) * GROUPS + grp);
    w_addr = WAW'((32'(ky) * 32'(ks) + 32'(kx)) * GROUPS + grp);
    o_pix  = PW'(32'(oy) * W_MAX + 32'(ox));
    lane   = ch[1:0];
  end

endmodule
