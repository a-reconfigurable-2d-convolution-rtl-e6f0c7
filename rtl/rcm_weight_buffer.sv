// rcm_weight_buffer: double-buffered weight memory.
//
// Two sets (double buffer) of four 4-bit banks, A_W, B_W, C_W and D_W, each
// holding KS_MAX^2 x IC_MAX x OC_MAX 4-bit chunks, filled by the host with
// the same chunk placement as the feature banks (16x: A_W..D_W most
// significant first; 8x: C_W, D_W; 4x: D_W).
//
// Organisation: the banks are interleaved over the output channels so that
// all OC_MAX MAC units get their weights in the same cycle. A word holds,
// for one kernel position k and one group of four input channels, the four
// chunks of every filter: element (k, channel c, filter o) lives in word
// k*IC_MAX/4 + c/4, lane 4*o + c%4. The interleaving over output channels is
// as in the original design; the exact word layout is this design's choice.
// k is the position inside the receptive field, k = ky*KS + kx for the
// run-time kernel size KS.
//
// Host port: one chunk per cycle into set wr_set, bank wr_bank (0 = A_W ..
// 3 = D_W). Compute port: rd_data[b] is bank b's OC_MAX*16-bit word one cycle
// after rd_en, filter o in bits 16*o+15:16*o.
module rcm_weight_buffer
  import rcm_pkg::*;
#(
  parameter int unsigned KS_MAX = 7,
  parameter int unsigned IC_MAX = 32,
  parameter int unsigned OC_MAX = 32,
  localparam int unsigned KPOS  = KS_MAX * KS_MAX,
  localparam int unsigned WORDS = KPOS * IC_MAX / 4,
  localparam int unsigned WIDTH = OC_MAX * OP_W,
  localparam int unsigned KW    = $clog2(KPOS),
  localparam int unsigned CW    = (IC_MAX > 1) ? $clog2(IC_MAX) : 1,
  localparam int unsigned OW_   = (OC_MAX > 1) ? $clog2(OC_MAX) : 1,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic                clk,
  // host write port
  input  logic                wr_en,
  input  logic                wr_set,
  input  logic [1:0]          wr_bank,
  input  logic [KW-1:0]       wr_k,
  input  logic [CW-1:0]       wr_ch,
  input  logic [OW_-1:0]      wr_oc,
  input  logic [NIB_W-1:0]    wr_data,
  // compute read port
  input  logic                rd_en,
  input  logic                rd_set,
  input  logic [AW-1:0]       rd_addr,
  output logic [WIDTH-1:0]    rd_data [4]
);

  localparam int unsigned LANES = WIDTH / NIB_W;

  logic [AW-1:0]    waddr;
  logic [LANES-1:0] wlane;
  logic [WIDTH-1:0] q [2][4];
  logic             rd_set_q;

  assign waddr = AW'(32'(wr_k) * (IC_MAX / 4) + 32'(wr_ch) / 4);
  assign wlane = LANES'(1) << (4 * 32'(wr_oc) + 32'(wr_ch[1:0]));

  for (genvar s = 0; s < 2; s++) begin : g_set
    for (genvar b = 0; b < 4; b++) begin : g_bank
      rcm_sdp_ram #(.WORDS(WORDS), .WIDTH(WIDTH), .LANE_W(NIB_W)) u_ram (
        .clk      (clk),
        .we       (wr_en && (wr_set == 1'(s)) && (wr_bank == 2'(b))),
        .waddr    (waddr),
        .wlane_en (wlane),
        .wdata    ({LANES{wr_data}}),
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
