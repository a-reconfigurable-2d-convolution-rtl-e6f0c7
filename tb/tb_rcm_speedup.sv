// tb_rcm_speedup: speed-up sweep of the RCM controller at output width
// OW = 18 for IC in {4, 8, 16, 32}, KS in {1, 3, 5, 7} and N = 2, 4.
//
// For each point the controller runs one output row in 16x and in the
// N-element mode; the busy cycles of both are counted and must equal
// O1 + OW*(O2 + IC/N*KS^2). The measured speed-up s(N) = cycles(16x) /
// cycles(N) is printed next to the value published with the original
// design (copied below) and the number of points agreeing to two decimals
// is reported. OW = 18 with KS > 1 needs a tile wider than 18, so the
// controller is instantiated with W_MAX = H_MAX = 24; the cycle count
// does not depend on W_MAX.
module tb_rcm_speedup;
  import rcm_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  rcm_cfg_e cfg_in = CFG_16X;
  logic [4:0] ow_in = 0, oh_in = 0;
  logic [5:0] ic_in = 0;
  logic [2:0] ks_in = 0;
  logic fset_in = 0, wset_in = 0, oset_in = 0;
  logic busy, done;
  rcm_cfg_e cfg;
  logic [2:0] ks;
  logic fset, wset, oset;
  logic [4:0] ox, oy;
  logic [2:0] kx, ky;
  logic [5:0] ch;
  logic rd_en, mac_clr, mac_en, cast_en, out_we;
  logic [1:0] lane_q;
  int checks = 0, failures = 0;

  rcm_ctrl #(.W_MAX(24), .H_MAX(24)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int n, int ic, int ksv);
    return O1 + 18 * (O2 + ic / n * ksv * ksv);
  endfunction

  task automatic measure(rcm_cfg_e c, int ic, int ksv, output int cyc);
    @(negedge clk);
    cfg_in = c; ow_in = 5'd18; oh_in = 5'd1; ic_in = 6'(ic); ks_in = 3'(ksv); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (busy) begin cyc++; @(negedge clk); end
    checks++;
    if (cyc != expected(cfg_n(c), ic, ksv)) begin
      failures++;
      $display("FAIL %s IC=%0d KS=%0d: %0d cycles, expected %0d", c.name(), ic, ksv, cyc,
               expected(cfg_n(c), ic, ksv));
    end
  endtask

  // published s(N) x 100, [mode 8x/4x][KS 7,5,3,1][IC 4,8,16,32]
  int pub [2][4][4] = '{
    '{'{195, 195, 198, 199}, '{191, 195, 198, 199}, '{178, 188, 193, 197}, '{128, 144, 161, 176}},
    '{'{372, 385, 392, 396}, '{349, 385, 392, 396}, '{291, 385, 392, 396}, '{149, 184, 232, 283}}
  };

  initial begin
    automatic int ics[4] = '{4, 8, 16, 32};
    automatic int kss[4] = '{7, 5, 3, 1};
    automatic rcm_cfg_e md[2] = '{CFG_8X, CFG_4X};
    automatic int agree = 0, points = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++)
      for (int k = 0; k < 4; k++)
        for (int i = 0; i < 4; i++) begin
          automatic int c1, cn, s100;
          measure(CFG_16X, ics[i], kss[k], c1);
          measure(md[m], ics[i], kss[k], cn);
          s100 = (200 * c1 / cn + 1) / 2;    // rounded to two decimals
          points++;
          if (s100 == pub[m][k][i]) agree++;
          $display("N=%0d KS=%0d IC=%2d  cycles %5d / %5d  s=%0d.%02d  published %0d.%02d%s",
                   cfg_n(md[m]), kss[k], ics[i], c1, cn, s100 / 100, s100 % 100,
                   pub[m][k][i] / 100, pub[m][k][i] % 100, (s100 == pub[m][k][i]) ? "" : "  (differs)");
        end
    $display("speed-up points agreeing with the published values: %0d of %0d", agree, points);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
