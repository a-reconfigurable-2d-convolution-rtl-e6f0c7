// tb_rcm_weight_buffer: self-checking test of the double-buffered weight
// memory at a small size (KS_MAX=3, IC_MAX=8, OC_MAX=4). Fills every chunk
// of both sets and banks, then reads every word and checks that filter o,
// channel c of kernel position k sits in lane 4*o + c%4 of word
// k*IC_MAX/4 + c/4.
module tb_rcm_weight_buffer;
  import rcm_pkg::*;

  localparam int KS = 3, IC = 8, OC = 4;
  localparam int KP = KS * KS, WORDS = KP * IC / 4;
  logic clk = 0;
  logic wr_en = 0, wr_set = 0, rd_en = 0, rd_set = 0;
  logic [1:0] wr_bank = 0;
  logic [$clog2(KP)-1:0] wr_k = 0;
  logic [$clog2(IC)-1:0] wr_ch = 0;
  logic [$clog2(OC)-1:0] wr_oc = 0;
  logic [3:0] wr_data = 0;
  logic [$clog2(WORDS)-1:0] rd_addr = 0;
  logic [OC*16-1:0] rd_data [4];
  logic [3:0] model [2][4][KP][IC][OC];
  int checks = 0, failures = 0;

  rcm_weight_buffer #(.KS_MAX(KS), .IC_MAX(IC), .OC_MAX(OC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int b = 0; b < 4; b++)
        for (int k = 0; k < KP; k++)
          for (int c = 0; c < IC; c++)
            for (int o = 0; o < OC; o++) begin
              @(negedge clk);
              wr_en = 1; wr_set = 1'(s); wr_bank = 2'(b); wr_k = 4'(k);
              wr_ch = 3'(c); wr_oc = 2'(o); wr_data = 4'($urandom);
              model[s][b][k][c][o] = wr_data;
            end
    @(negedge clk); wr_en = 0;
    for (int s = 1; s >= 0; s--)
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk); rd_en = 1; rd_set = 1'(s); rd_addr = 5'(a);
        @(negedge clk); rd_en = 0;
        for (int b = 0; b < 4; b++)
          for (int o = 0; o < OC; o++)
            for (int l = 0; l < 4; l++) begin
              automatic int k = a / (IC / 4), c = (a % (IC / 4)) * 4 + l;
              checks++;
              if (rd_data[b][16*o + 4*l +: 4] !== model[s][b][k][c][o]) begin
                failures++;
                if (failures < 10)
                  $display("FAIL set %0d bank %0d k %0d ch %0d oc %0d", s, b, k, c, o);
              end
            end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
