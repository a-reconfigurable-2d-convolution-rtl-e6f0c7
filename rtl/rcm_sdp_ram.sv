// rcm_sdp_ram: simple dual-port RAM, one write port and one read port.
//
// WORDS words of WIDTH bits, divided into lanes of LANE_W bits. A write
// stores wdata into the lanes of word waddr whose bit in wlane_en is set,
// leaving the other lanes untouched (the buffers use 4-bit lanes so a host
// can fill them one 4-bit chunk at a time). The read is synchronous:
// rdata holds word raddr one cycle after re is high, and keeps its value
// otherwise. A read of a word written in the same cycle returns the old
// contents. Contents are not reset (memory, as an SRAM would be).
// It stands in for the SRAM macros of a chip implementation; the bank
// organisation around it follows the original design, the RAM itself is
// generic.
module rcm_sdp_ram #(
  parameter int unsigned WORDS  = 64,
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned LANE_W = 4,
  localparam int unsigned LANES = WIDTH / LANE_W,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [LANES-1:0]  wlane_en,
  input  logic [WIDTH-1:0]  wdata,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int l = 0; l < LANES; l++)
        if (wlane_en[l])
          mem[waddr][l*LANE_W +: LANE_W] <= wdata[l*LANE_W +: LANE_W];
    end
  end

  always_ff @(posedge clk) begin
    if (re)
      rdata <= mem[raddr];
  end

endmodule
