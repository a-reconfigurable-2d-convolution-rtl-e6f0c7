// rcm_top: Reconfigurable 2D-Convolution Module (RCM).
//
// Computes a 2D convolution of one tile, OC_MAX output channels in
// parallel, with operands of 16, 8 or 4 bits (modes 16x, 8x, 4x). Every MAC
// unit processes N = 1, 2 or 4 (feature, weight) pairs per cycle through a
// Sum-Together multiplier, so a pixel needs IC/N * KS^2 MAC cycles.
//
// Structure (as in the module's block diagram): double-buffered feature
// memory (banks A_F..D_F), double-buffered weight memory (A_W..D_W),
// memory addressing logic, concatenating logic, the reconfigurable MAC
// array, and a double-buffered 32-bit output memory. A loop controller
// sequences them; a register between the array and the output memory holds
// the 32-bit results of one pixel while they are written.
//
// Host side (an embedded processor or DMA engine, not part of this RTL):
//   * feature write  : f_we, f_set, f_bank (0=A_F..3=D_F), f_pix = y*W_MAX+x,
//                      f_ch, f_data (one 4-bit chunk per cycle)
//   * weight write   : w_we, w_set, w_bank (0=A_W..3=D_W), w_k = ky*KS+kx,
//                      w_ch, w_oc, w_data
//   * output read    : o_re, o_set, o_pix = y*W_MAX+x, o_oc -> o_data one
//                      cycle later
//   * control        : start with cfg, ow, oh, ic, ks and the buffer sets
//                      to compute from/into; busy while running; done pulse.
// Output pixel (x, y), channel o = sum over ky, kx < ks and c < ic of
//   feature(x+kx, y+ky, c) * weight(k = ky*ks+kx, c, o), cast to 32 bits.
// Latency: busy for OH * (2 + OW * (5 + IC/N * KS^2)) cycles.
module rcm_top
  import rcm_pkg::*;
#(
  parameter int unsigned W_MAX  = 18,
  parameter int unsigned H_MAX  = 18,
  parameter int unsigned KS_MAX = 7,
  parameter int unsigned IC_MAX = 32,
  parameter int unsigned OC_MAX = 32,
  parameter int unsigned ACC_W  = 32,
  localparam int unsigned XW   = $clog2(W_MAX + 1),
  localparam int unsigned YW   = $clog2(H_MAX + 1),
  localparam int unsigned KSW  = $clog2(KS_MAX + 1),
  localparam int unsigned CW   = $clog2(IC_MAX + 1),
  localparam int unsigned PW   = $clog2(W_MAX * H_MAX),
  localparam int unsigned CHW  = (IC_MAX > 1) ? $clog2(IC_MAX) : 1,
  localparam int unsigned OCW  = (OC_MAX > 1) ? $clog2(OC_MAX) : 1,
  localparam int unsigned KW   = $clog2(KS_MAX * KS_MAX)
) (
  input  logic               clk,
  input  logic               rst_n,
  // control
  input  logic               start,
  input  rcm_cfg_e           cfg,
  input  logic [XW-1:0]      ow,
  input  logic [YW-1:0]      oh,
  input  logic [CW-1:0]      ic,
  input  logic [KSW-1:0]     ks,
  input  logic               fset,
  input  logic               wset,
  input  logic               oset,
  output logic               busy,
  output logic               done,
  // feature buffer fill
  input  logic               f_we,
  input  logic               f_set,
  input  logic [1:0]         f_bank,
  input  logic [PW-1:0]      f_pix,
  input  logic [CHW-1:0]     f_ch,
  input  logic [NIB_W-1:0]   f_data,
  // weight buffer fill
  input  logic               w_we,
  input  logic               w_set,
  input  logic [1:0]         w_bank,
  input  logic [KW-1:0]      w_k,
  input  logic [CHW-1:0]     w_ch,
  input  logic [OCW-1:0]     w_oc,
  input  logic [NIB_W-1:0]   w_data,
  // output buffer read
  input  logic               o_re,
  input  logic               o_set,
  input  logic [PW-1:0]      o_pix,
  input  logic [OCW-1:0]     o_oc,
  output logic [OUT_W-1:0]   o_data
);

  localparam int unsigned FAW = $clog2(W_MAX * H_MAX * IC_MAX / 4);
  localparam int unsigned WAW = $clog2(KS_MAX * KS_MAX * IC_MAX / 4);

  // controller outputs
  rcm_cfg_e        cfg_r;
  logic [KSW-1:0]  ks_r;
  logic            fset_r, wset_r, oset_r;
  logic [XW-1:0]   ox;
  logic [YW-1:0]   oy;
  logic [KSW-1:0]  kx, ky;
  logic [CW-1:0]   ch;
  logic            rd_en, mac_clr, mac_en, cast_en, out_we;
  logic [1:0]      lane_q, lane_unused;

  // datapath
  logic [FAW-1:0]          f_addr;
  logic [WAW-1:0]          w_addr;
  logic [PW-1:0]           out_pix;
  logic [OP_W-1:0]         fwords [4];
  logic [OC_MAX*OP_W-1:0]  wwords [4];
  logic [OP_W-1:0]         op1;
  logic [OP_W-1:0]         op2 [OC_MAX];
  logic [OUT_W-1:0]        results [OC_MAX];
  logic [OUT_W-1:0]        res_q   [OC_MAX];

  rcm_ctrl #(
    .W_MAX(W_MAX), .H_MAX(H_MAX), .IC_MAX(IC_MAX), .KS_MAX(KS_MAX)
  ) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .cfg_in  (cfg),
    .ow_in   (ow),
    .oh_in   (oh),
    .ic_in   (ic),
    .ks_in   (ks),
    .fset_in (fset),
    .wset_in (wset),
    .oset_in (oset),
    .busy    (busy),
    .done    (done),
    .cfg     (cfg_r),
    .ks      (ks_r),
    .fset    (fset_r),
    .wset    (wset_r),
    .oset    (oset_r),
    .ox      (ox),
    .oy      (oy),
    .kx      (kx),
    .ky      (ky),
    .ch      (ch),
    .rd_en   (rd_en),
    .mac_clr (mac_clr),
    .mac_en  (mac_en),
    .lane_q  (lane_q),
    .cast_en (cast_en),
    .out_we  (out_we)
  );

  rcm_addr_gen #(
    .W_MAX(W_MAX), .H_MAX(H_MAX), .IC_MAX(IC_MAX), .KS_MAX(KS_MAX)
  ) u_addr (
    .ox     (ox),
    .oy     (oy),
    .kx     (kx),
    .ky     (ky),
    .ks     (ks_r),
    .ch     (ch),
    .f_addr (f_addr),
    .w_addr (w_addr),
    .o_pix  (out_pix),
    .lane   (lane_unused)   // the lane is taken one cycle later from the controller
  );

  rcm_feature_buffer #(
    .W_MAX(W_MAX), .H_MAX(H_MAX), .IC_MAX(IC_MAX)
  ) u_fbuf (
    .clk     (clk),
    .wr_en   (f_we),
    .wr_set  (f_set),
    .wr_bank (f_bank),
    .wr_pix  (f_pix),
    .wr_ch   (f_ch),
    .wr_data (f_data),
    .rd_en   (rd_en),
    .rd_set  (fset_r),
    .rd_addr (f_addr),
    .rd_data (fwords)
  );

  rcm_weight_buffer #(
    .KS_MAX(KS_MAX), .IC_MAX(IC_MAX), .OC_MAX(OC_MAX)
  ) u_wbuf (
    .clk     (clk),
    .wr_en   (w_we),
    .wr_set  (w_set),
    .wr_bank (w_bank),
    .wr_k    (w_k),
    .wr_ch   (w_ch),
    .wr_oc   (w_oc),
    .wr_data (w_data),
    .rd_en   (rd_en),
    .rd_set  (wset_r),
    .rd_addr (w_addr),
    .rd_data (wwords)
  );

  rcm_concat #(.OC_MAX(OC_MAX)) u_concat (
    .cfg   (cfg_r),
    .lane  (lane_q),
    .fbank (fwords),
    .wbank (wwords),
    .op1   (op1),
    .op2   (op2)
  );

  rcm_mac_array #(.OC_MAX(OC_MAX), .ACC_W(ACC_W)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .cfg     (cfg_r),
    .clr     (mac_clr),
    .en      (mac_en),
    .op1     (op1),
    .op2     (op2),
    .results (results)
  );

  // results of one pixel, held for the output-memory write
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < OC_MAX; m++) res_q[m] <= '0;
    end else if (cast_en) begin
      for (int m = 0; m < OC_MAX; m++) res_q[m] <= results[m];
    end
  end

  rcm_output_buffer #(
    .W_MAX(W_MAX), .H_MAX(H_MAX), .OC_MAX(OC_MAX)
  ) u_obuf (
    .clk     (clk),
    .wr_en   (out_we),
    .wr_set  (oset_r),
    .wr_pix  (out_pix),
    .wr_data (res_q),
    .rd_en   (o_re),
    .rd_set  (o_set),
    .rd_pix  (o_pix),
    .rd_oc   (o_oc),
    .rd_data (o_data)
  );

endmodule
