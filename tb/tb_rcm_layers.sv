// tb_rcm_layers: runs two complete convolution layers through the RCM at
// its default size, tile by tile, as a host would.
//   layer A: 16x16x256 input (padding included), 3x3x256x256 weights, 4x
//            mode: 8 input-channel tiles x 8 filter tiles of 14x14 outputs
//   layer B: 7x7x1024 input, 1x1x1024x1024 weights (point-wise), 8x mode:
//            32 x 32 tiles of 7x7 outputs
// For every tile the testbench writes the channel slice of the features
// and weights (only the banks the mode uses), runs the module, checks the
// busy time against OH*(2 + OW*(5 + IC/N*KS^2)) and adds the 32-bit
// results to the partial sums of the layer, alternating the buffer sets
// from tile to tile. At the end every output of the layer is compared with
// a direct convolution. The total cycle count of each layer is printed.
module tb_rcm_layers;
  import rcm_pkg::*;
  import tb_rcm_ref_pkg::*;

  localparam int W = 18, IC = 32, OC = 32;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  rcm_cfg_e cfg = CFG_16X;
  logic [4:0] ow = 0, oh = 0;
  logic [5:0] ic = 0;
  logic [2:0] ks = 0;
  logic fset = 0, wset = 0, oset = 0;
  logic busy, done;
  logic f_we = 0, f_set = 0;
  logic [1:0] f_bank = 0;
  logic [8:0] f_pix = 0;
  logic [4:0] f_ch = 0;
  logic [3:0] f_data = 0;
  logic w_we = 0, w_set = 0;
  logic [1:0] w_bank = 0;
  logic [5:0] w_k = 0;
  logic [4:0] w_ch = 0;
  logic [4:0] w_oc = 0;
  logic [3:0] w_data = 0;
  logic o_re = 0, o_set = 0;
  logic [8:0] o_pix = 0;
  logic [4:0] o_oc = 0;
  logic [31:0] o_data;

  rcm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int feat [];     // [(y*win + x)*cin + c]
  int wt [];       // [(k*cin + c)*cout + o]
  int psum [];     // [(y*ow + x)*cout + o]

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(string name, rcm_cfg_e c, int win, int cin, int ksv, int cout);
    int n = cfg_n(c), bw = 16 / n, first = 4 - bw / 4;
    int owv = win - ksv + 1, tiles = 0, bad = 0;
    longint total = 0;
    feat = new[win * win * cin];
    wt   = new[ksv * ksv * cin * cout];
    psum = new[owv * owv * cout];
    foreach (feat[i]) feat[i] = sext($urandom, bw);
    foreach (wt[i])   wt[i]   = sext($urandom, bw);
    foreach (psum[i]) psum[i] = 0;
    for (int ot = 0; ot < cout / OC; ot++)
      for (int it = 0; it < cin / IC; it++) begin
        int s = tiles % 2, cyc = 0, exp_cyc;
        // features of the input-channel slice
        for (int p = 0; p < win * win; p++)
          for (int ch = 0; ch < IC; ch++)
            for (int b = first; b < 4; b++) begin
              @(negedge clk);
              f_we = 1; f_set = 1'(s); f_bank = 2'(b);
              f_pix = 9'((p / win) * W + p % win); f_ch = 5'(ch);
              f_data = 4'(feat[p * cin + it * IC + ch] >> (4 * (3 - b)));
            end
        @(negedge clk); f_we = 0;
        // weights of the slice for the filter tile
        for (int k = 0; k < ksv * ksv; k++)
          for (int ch = 0; ch < IC; ch++)
            for (int o = 0; o < OC; o++)
              for (int b = first; b < 4; b++) begin
                @(negedge clk);
                w_we = 1; w_set = 1'(s); w_bank = 2'(b); w_k = 6'(k); w_ch = 5'(ch); w_oc = 5'(o);
                w_data = 4'(wt[(k * cin + it * IC + ch) * cout + ot * OC + o] >> (4 * (3 - b)));
              end
        @(negedge clk); w_we = 0;
        // compute
        cfg = c; ow = 5'(owv); oh = 5'(owv); ic = 6'(IC); ks = 3'(ksv);
        fset = 1'(s); wset = 1'(s); oset = 1'(s); start = 1;
        @(negedge clk); start = 0;
        while (busy) begin cyc++; @(negedge clk); end
        exp_cyc = owv * (O1 + owv * (O2 + IC / n * ksv * ksv));
        total += longint'(cyc);
        checks++;
        if (cyc != exp_cyc) begin
          failures++;
          $display("FAIL %s tile %0d: %0d cycles, expected %0d", name, tiles, cyc, exp_cyc);
        end
        // collect partial sums
        for (int y = 0; y < owv; y++)
          for (int x = 0; x < owv; x++)
            for (int o = 0; o < OC; o++) begin
              @(negedge clk);
              o_re = 1; o_set = 1'(s); o_pix = 9'(y * W + x); o_oc = 5'(o);
              @(negedge clk);
              o_re = 0;
              psum[(y * owv + x) * cout + ot * OC + o] += int'(o_data);
            end
        tiles++;
      end
    // direct convolution
    for (int y = 0; y < owv; y++)
      for (int x = 0; x < owv; x++)
        for (int o = 0; o < cout; o++) begin
          int e = 0;
          for (int ky = 0; ky < ksv; ky++)
            for (int kx = 0; kx < ksv; kx++)
              for (int ch = 0; ch < cin; ch++)
                e += feat[((y + ky) * win + x + kx) * cin + ch] *
                     wt[((ky * ksv + kx) * cin + ch) * cout + o];
          checks++;
          if (psum[(y * owv + x) * cout + o] != e) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL %s (x%0d,y%0d,o%0d) got %0d exp %0d", name, x, y, o,
                                  psum[(y * owv + x) * cout + o], e);
          end
        end
    $display("%s: %0d tiles, %0d busy cycles, %0d wrong outputs", name, tiles, total, bad);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_layer("layer A 16x16x256 * 3x3x256x256, 4x", CFG_4X, 16, 256, 3, 256);
    run_layer("layer B 7x7x1024 * 1x1x1024x1024, 8x", CFG_8X, 7, 1024, 1, 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
