// rcm_mac_array: the RCM's array of OC_MAX MAC units.
//
// All units receive the same feature operand op1 (one receptive-field
// position and group of input channels) and each unit m receives its own
// weight operand op2[m] from filter m, so OC_MAX output channels of one
// output pixel are accumulated in parallel. clr/en are common to all units;
// results[m] is unit m's accumulator cast to 32 bits.
//
// Timing: as rcm_mac_unit (one cycle from operand to accumulator).
module rcm_mac_array
  import rcm_pkg::*;
#(
  parameter int unsigned OC_MAX = 32,
  parameter int unsigned ACC_W  = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rcm_cfg_e             cfg,
  input  logic                 clr,
  input  logic                 en,
  input  logic [OP_W-1:0]      op1,
  input  logic [OP_W-1:0]      op2     [OC_MAX],
  output logic [OUT_W-1:0]     results [OC_MAX]
);

  for (genvar m = 0; m < OC_MAX; m++) begin : g_mac
    rcm_mac_unit #(.ACC_W(ACC_W)) u_mac (
      .clk    (clk),
      .rst_n  (rst_n),
      .cfg    (cfg),
      .clr    (clr),
      .en     (en),
      .op1    (op1),
      .op2    (op2[m]),
      .result (results[m])
    );
  end

endmodule
