// rcm_output_buffer: double-buffered 32-bit output feature-map memory.
//
// Each set holds W_MAX x H_MAX x OC_MAX 32-bit results. The write port is
// as wide as the MAC array: one write stores the OC_MAX results of one
// output pixel (word = pixel y*W_MAX + x), so a completed pixel costs one
// cycle. The read port serves the host one 32-bit element at a time:
// rd_data is element (rd_pix, rd_oc) of set rd_set one cycle after rd_en.
// The double buffer follows the block diagram (the prose calls the output
// memory a single 32-bit SRAM; this design reads that as "one 32-bit bank"
// and keeps the two sets drawn in the diagram). The wide write port is this
// design's choice.
module rcm_output_buffer
  import rcm_pkg::*;
#(
  parameter int unsigned W_MAX  = 18,
  parameter int unsigned H_MAX  = 18,
  parameter int unsigned OC_MAX = 32,
  localparam int unsigned PIXELS = W_MAX * H_MAX,
  localparam int unsigned PW     = $clog2(PIXELS),
  localparam int unsigned OW_    = (OC_MAX > 1) ? $clog2(OC_MAX) : 1
) (
  input  logic                clk,
  // array write port
  input  logic                wr_en,
  input  logic                wr_set,
  input  logic [PW-1:0]       wr_pix,
  input  logic [OUT_W-1:0]    wr_data [OC_MAX],
  // host read port
  input  logic                rd_en,
  input  logic                rd_set,
  input  logic [PW-1:0]       rd_pix,
  input  logic [OW_-1:0]      rd_oc,
  output logic [OUT_W-1:0]    rd_data
);

  localparam int unsigned WIDTH = OC_MAX * OUT_W;

  logic [WIDTH-1:0] wword;
  logic [WIDTH-1:0] q [2];
  logic             rd_set_q;
  logic [OW_-1:0]   rd_oc_q;

  always_comb
    for (int m = 0; m < OC_MAX; m++)
      wword[m*OUT_W +: OUT_W] = wr_data[m];

  for (genvar s = 0; s < 2; s++) begin : g_set
    rcm_sdp_ram #(.WORDS(PIXELS), .WIDTH(WIDTH), .LANE_W(OUT_W)) u_ram (
      .clk      (clk),
      .we       (wr_en && (wr_set == 1'(s))),
      .waddr    (wr_pix),
      .wlane_en ('1),
      .wdata    (wword),
      .re       (rd_en && (rd_set == 1'(s))),
      .raddr    (rd_pix),
      .rdata    (q[s])
    );
  end

  always_ff @(posedge clk)
    if (rd_en) begin
      rd_set_q <= rd_set;
      rd_oc_q  <= rd_oc;
    end

  assign rd_data = q[rd_set_q][rd_oc_q*OUT_W +: OUT_W];

endmodule
