// tb_rcm_feature_buffer: self-checking test of the double-buffered feature
// memory at a small size (W_MAX=4, H_MAX=3, IC_MAX=8). Fills every chunk of
// both sets and all four banks with random data in random order of sets,
// then reads every word of every set and compares each lane with the chunk
// written for that pixel and channel.
module tb_rcm_feature_buffer;
  import rcm_pkg::*;

  localparam int W = 4, H = 3, IC = 8;
  localparam int PIX = W * H, WORDS = PIX * IC / 4;
  logic clk = 0;
  logic wr_en = 0, wr_set = 0, rd_en = 0, rd_set = 0;
  logic [1:0] wr_bank = 0;
  logic [$clog2(PIX)-1:0] wr_pix = 0;
  logic [$clog2(IC)-1:0] wr_ch = 0;
  logic [3:0] wr_data = 0;
  logic [$clog2(WORDS)-1:0] rd_addr = 0;
  logic [15:0] rd_data [4];
  logic [3:0] model [2][4][PIX][IC];
  int checks = 0, failures = 0;

  rcm_feature_buffer #(.W_MAX(W), .H_MAX(H), .IC_MAX(IC)) dut (.*);

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
        for (int p = 0; p < PIX; p++)
          for (int c = 0; c < IC; c++) begin
            @(negedge clk);
            wr_en = 1; wr_set = 1'(s); wr_bank = 2'(b); wr_pix = 4'(p); wr_ch = 3'(c);
            wr_data = 4'($urandom);
            model[s][b][p][c] = wr_data;
          end
    // overwrite some chunks a second time
    for (int k = 0; k < 50; k++) begin
      automatic int s = $urandom_range(0, 1), b = $urandom_range(0, 3);
      automatic int p = $urandom_range(0, PIX - 1), c = $urandom_range(0, IC - 1);
      @(negedge clk);
      wr_en = 1; wr_set = 1'(s); wr_bank = 2'(b); wr_pix = 4'(p); wr_ch = 3'(c);
      wr_data = 4'($urandom);
      model[s][b][p][c] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk); rd_en = 1; rd_set = 1'(s); rd_addr = 5'(a);
        @(negedge clk); rd_en = 0; rd_set = ~rd_set; #1;   // data must hold
        for (int b = 0; b < 4; b++)
          for (int l = 0; l < 4; l++) begin
            automatic int p = a / (IC / 4), c = (a % (IC / 4)) * 4 + l;
            checks++;
            if (rd_data[b][4*l +: 4] !== model[s][b][p][c]) begin
              failures++;
              if (failures < 10)
                $display("FAIL set %0d bank %0d pix %0d ch %0d got %h exp %h",
                         s, b, p, c, rd_data[b][4*l +: 4], model[s][b][p][c]);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
