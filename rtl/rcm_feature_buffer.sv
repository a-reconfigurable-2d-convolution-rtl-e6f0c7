// rcm_feature_buffer: double-buffered input feature-map memory.
//
// Two sets (double buffer) of four 4-bit banks, A_F, B_F, C_F and D_F, each
// holding a W_MAX x H_MAX x IC_MAX tile of 4-bit chunks. What a bank holds
// depends on the precision mode and is decided by the host that fills it:
// in 16x the four chunks of a 16-bit element go, most significant first,
// into A_F..D_F; in 8x the two chunks of an 8-bit element go into C_F, D_F;
// in 4x each element goes into D_F.
//
// Organisation (this design's choice): every bank stores four consecutive
// input channels per word, so one read returns channels 4g..4g+3 of one
// pixel from each bank, which is all the concatenating logic needs in any
// mode. Element (pixel p = y*W_MAX + x, channel c) lives in word
// p*IC_MAX/4 + c/4, lane c%4 (lane l = bits 4l+3:4l).
//
// Host port: one 4-bit chunk per cycle into set wr_set, bank wr_bank
// (0 = A_F .. 3 = D_F). Compute port: rd_set selects the set, rd_addr the
// word; rd_data[b] is bank b's 16-bit word one cycle after rd_en.
// The host is expected to fill one set while the array reads the other.
module rcm_feature_buffer
  import rcm_pkg::*;
#(
  parameter int unsigned W_MAX  = 18,
  parameter int unsigned H_MAX  = 18,
  parameter int unsigned IC_MAX = 32,
  localparam int unsigned PIXELS = W_MAX * H_MAX,
  localparam int unsigned WORDS  = PIXELS * IC_MAX / 4,
  localparam int unsigned PW     = $clog2(PIXELS),
  localparam int unsigned CW     = (IC_MAX > 1) ? $clog2(IC_MAX) : 1,
  localparam int unsigned AW     = $clog2(WORDS)
) (
  input  logic                clk,
  // host write port
  input  logic                wr_en,
  input  logic                wr_set,
  input  logic [1:0]          wr_bank,
  input  logic [PW-1:0]       wr_pix,
  input  logic [CW-1:0]       wr_ch,
  input  logic [NIB_W-1:0]    wr_data,
  // compute read port
  input  logic                rd_en,
  input  logic                rd_set,
  input  logic [AW-1:0]       rd_addr,
  output logic [OP_W-1:0]     rd_data [4]
);

  logic [AW-1:0]   waddr;
  logic [3:0]      wlane;
  logic [OP_W-1:0] q [2][4];
  logic            rd_set_q;

  assign waddr = AW'(32'(wr_pix) * (IC_MAX / 4) + 32'(wr_ch) / 4);
  assign wlane = 4'b0001 << wr_ch[1:0];

  for (genvar s = 0; s < 2; s++) begin : g_set
    for (genvar b = 0; b < 4; b++) begin : g_bank
      rcm_sdp_ram #(.WORDS(WORDS), .WIDTH(OP_W), .LANE_W(NIB_W)) u_ram (
        .clk      (clk),
        .we       (wr_en && (wr_set == 1'(s)) && (wr_bank == 2'(b))),
        .waddr    (waddr),
        .wlane_en (wlane),
        .wdata    ({4{wr_data}}),
        .re       (rd_en && (rd_set == 1'(s))),
        .raddr    (rd_addr),
        .rdata    (q[s][b])
      );
    end
  end

  always_ff @(posedge clk)
    if (rd_en) rd_set_q <= rd_set;

  always_comb
    for (int b = 0; b < 4; b++)
      rd_data[b] = q[rd_set_q][b];

endmodule
