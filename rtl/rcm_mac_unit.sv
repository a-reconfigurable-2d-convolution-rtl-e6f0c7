// rcm_mac_unit: one MAC unit of the RCM array.
//
// Each cycle with `en` high the ST multiplier result for (op1, op2) under
// `cfg` is added to the accumulator register; `clr` empties the accumulator
// (and wins over `en`). `result` is the accumulator cast to 32 bits, the
// value the array writes into the output feature map when a receptive
// field is complete.
//
// Timing: op1/op2/en sampled at the rising edge; result is valid the cycle
// after the last enabled operand. rst_n is an
// active-low asynchronous reset clearing the accumulator (reset style is
// this design's choice). ACC_W defaults to 32, the width printed on the
// accumulator outputs of the MAC-array drawing; a wider accumulator is
// truncated (wrap-around cast) to 32 bits.
module rcm_mac_unit
  import rcm_pkg::*;
#(
  parameter int unsigned ACC_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rcm_cfg_e             cfg,
  input  logic                 clr,
  input  logic                 en,
  input  logic [OP_W-1:0]      op1,
  input  logic [OP_W-1:0]      op2,
  output logic [OUT_W-1:0]     result
);

  logic [PROD_W-1:0] prod;
  logic [ACC_W-1:0]  acc;

  rcm_st_mult u_mult (
    .cfg (cfg),
    .op1 (op1),
    .op2 (op2),
    .y   (prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      acc <= '0;
    else if (clr)
      acc <= '0;
    else if (en)
      acc <= acc + ACC_W'($signed(prod));
  end

  assign result = OUT_W'(acc);

endmodule
