// tb_rcm_output_buffer: self-checking test of the double-buffered output
// memory (W_MAX=4, H_MAX=3, OC_MAX=4). Writes whole pixels into both sets,
// rewrites some, then reads every 32-bit element back one at a time.
module tb_rcm_output_buffer;
  import rcm_pkg::*;

  localparam int W = 4, H = 3, OC = 4, PIX = W * H;
  logic clk = 0;
  logic wr_en = 0, wr_set = 0, rd_en = 0, rd_set = 0;
  logic [$clog2(PIX)-1:0] wr_pix = 0, rd_pix = 0;
  logic [31:0] wr_data [OC];
  logic [$clog2(OC)-1:0] rd_oc = 0;
  logic [31:0] rd_data;
  logic [31:0] model [2][PIX][OC];
  int checks = 0, failures = 0;

  rcm_output_buffer #(.W_MAX(W), .H_MAX(H), .OC_MAX(OC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int s, int p);
    @(negedge clk);
    wr_en = 1; wr_set = 1'(s); wr_pix = 4'(p);
    foreach (wr_data[m]) begin
      wr_data[m] = $urandom;
      model[s][p][m] = wr_data[m];
    end
  endtask

  initial begin
    foreach (wr_data[m]) wr_data[m] = 0;
    for (int s = 0; s < 2; s++)
      for (int p = 0; p < PIX; p++) wr(s, p);
    for (int k = 0; k < 10; k++) wr($urandom_range(0, 1), $urandom_range(0, PIX - 1));
    @(negedge clk); wr_en = 0;
    for (int s = 0; s < 2; s++)
      for (int p = 0; p < PIX; p++)
        for (int m = 0; m < OC; m++) begin
          @(negedge clk); rd_en = 1; rd_set = 1'(s); rd_pix = 4'(p); rd_oc = 2'(m);
          @(negedge clk); rd_en = 0;
          checks++;
          if (rd_data !== model[s][p][m]) begin
            failures++;
            if (failures < 10) $display("FAIL set %0d pix %0d oc %0d got %h exp %h", s, p, m, rd_data, model[s][p][m]);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
