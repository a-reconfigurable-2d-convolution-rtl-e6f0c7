// tb_rcm_st_mult: self-checking test of the ST reconfigurable multiplier.
// Drives directed corner cases and random operands in all three modes and
// compares y with the element-level reference (signed 16x16, two signed
// 8x8 summed, four signed 4x4 summed).
module tb_rcm_st_mult;
  import rcm_pkg::*;
  import tb_rcm_ref_pkg::*;

  rcm_cfg_e    cfg;
  logic [15:0] op1, op2;
  logic [31:0] y;
  int checks = 0, failures = 0;

  rcm_st_mult dut (.cfg(cfg), .op1(op1), .op2(op2), .y(y));

  task automatic check(rcm_cfg_e c, logic [15:0] a, logic [15:0] b);
    logic [31:0] exp;
    cfg = c; op1 = a; op2 = b;
    #1;
    exp = ref_mult(c, a, b);
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL cfg=%s op1=%h op2=%h y=%h exp=%h", c.name(), a, b, y, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rcm_cfg_e modes[3] = '{CFG_16X, CFG_8X, CFG_4X};
    logic [15:0] corners[6] = '{16'h0000, 16'h8000, 16'h7fff, 16'hffff, 16'h8888, 16'h7777};
    foreach (modes[m])
      foreach (corners[i])
        foreach (corners[j])
          check(modes[m], corners[i], corners[j]);
    // a hand-worked 4x case: f = (1,2,3,4), w = (w3..w0) = (8? -> -8,7,-1,2)
    // y = 1*2 + 2*(-1) + 3*7 + 4*(-8) = -11
    cfg = CFG_4X; op1 = 16'h1234; op2 = 16'h87f2; #1;
    checks++;
    if (y !== -32'sd11) begin failures++; $display("FAIL hand 4x y=%0d", $signed(y)); end
    // hand-worked 8x: f = (0x12, 0xff=-1), w = (w3:2=0x03, w1:0=0x80=-128)
    // y = 0x12*(-128) + (-1)*3 = -2307
    cfg = CFG_8X; op1 = 16'h12ff; op2 = 16'h0380; #1;
    checks++;
    if (y !== -32'sd2307) begin failures++; $display("FAIL hand 8x y=%0d", $signed(y)); end
    for (int k = 0; k < 3000; k++)
      foreach (modes[m])
        check(modes[m], 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
