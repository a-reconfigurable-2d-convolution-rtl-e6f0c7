// tb_rcm_mac_array: self-checking test of the MAC array with OC_MAX = 4.
// One shared op1, a different op2 per unit; each unit's result is compared
// with its own reference accumulation.
module tb_rcm_mac_array;
  import rcm_pkg::*;
  import tb_rcm_ref_pkg::*;

  localparam int OC = 4;
  logic clk = 0, rst_n = 0;
  rcm_cfg_e cfg = CFG_16X;
  logic clr = 0, en = 0;
  logic [15:0] op1 = 0;
  logic [15:0] op2 [OC];
  logic [31:0] results [OC];
  logic [31:0] model [OC];
  int checks = 0, failures = 0;

  rcm_mac_array #(.OC_MAX(OC)) dut (.clk, .rst_n, .cfg, .clr, .en, .op1, .op2, .results);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rcm_cfg_e modes[3] = '{CFG_16X, CFG_8X, CFG_4X};
    foreach (op2[m]) op2[m] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 30; run++) begin
      @(negedge clk); clr = 1; cfg = modes[run % 3];
      @(negedge clk); clr = 0;
      foreach (model[m]) model[m] = 0;
      for (int t = 0; t < 20; t++) begin
        en  = 1;
        op1 = 16'($urandom);
        foreach (op2[m]) begin
          op2[m] = 16'($urandom);
          model[m] = model[m] + ref_mult(cfg, op1, op2[m]);
        end
        @(negedge clk);
        foreach (results[m]) begin
          checks++;
          if (results[m] !== model[m]) begin
            failures++;
            if (failures < 10) $display("FAIL unit %0d got %h exp %h", m, results[m], model[m]);
          end
        end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
