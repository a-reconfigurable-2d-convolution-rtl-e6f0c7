// tb_rcm_mac_unit: self-checking test of one MAC unit.
// Random runs of operands in random modes, with clears in between; the
// accumulator is compared every cycle with a model that sums the
// element-level reference products (32-bit wrap-around).
module tb_rcm_mac_unit;
  import rcm_pkg::*;
  import tb_rcm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  rcm_cfg_e cfg = CFG_16X;
  logic clr = 0, en = 0;
  logic [15:0] op1 = 0, op2 = 0;
  logic [31:0] result;
  logic [31:0] model = 0;
  int checks = 0, failures = 0;

  rcm_mac_unit dut (.clk, .rst_n, .cfg, .clr, .en, .op1, .op2, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rcm_cfg_e modes[3] = '{CFG_16X, CFG_8X, CFG_4X};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++;
    if (result !== 0) begin failures++; $display("FAIL after reset %h", result); end
    for (int run = 0; run < 60; run++) begin
      // clear
      @(negedge clk); clr = 1; en = 1; cfg = modes[run % 3];
      @(negedge clk); clr = 0; model = 0;
      checks++;
      if (result !== 0) begin failures++; $display("FAIL clear"); end
      for (int t = 0; t < 1 + $urandom_range(0, 40); t++) begin
        en  = ($urandom_range(0, 3) != 0);
        op1 = 16'($urandom);
        op2 = 16'($urandom);
        if (run % 7 == 0) begin op1 = 16'h8000; op2 = 16'h8000; end   // overflow wrap
        if (en) model = model + ref_mult(cfg, op1, op2);
        @(negedge clk);
        checks++;
        if (result !== model) begin
          failures++;
          if (failures < 10) $display("FAIL run %0d t %0d got %h exp %h", run, t, result, model);
        end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
