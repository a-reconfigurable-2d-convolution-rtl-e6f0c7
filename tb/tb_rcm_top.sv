// tb_rcm_top: end-to-end test of the RCM at reduced size
// (W_MAX=6, H_MAX=5, KS_MAX=3, IC_MAX=8, OC_MAX=4).
//
// The testbench plays the host: it generates random signed tensors, splits
// every element into 4-bit chunks and writes them into the banks the mode
// prescribes (16x: A..D, 8x: C, D, 4x: D; the unused banks get random junk),
// starts the module, checks the busy time against
// OH * (2 + OW * (5 + IC/N * KS^2)), reads the output buffer back and
// compares every 32-bit result with a direct convolution of the tensors.
// Tiles are chained so that the next tile is written into the other set of
// the double buffers while the current one computes, and the previous
// results are read from the other output set meanwhile. Mechanisms counted
// (each must happen): every mode, a kernel of size 1 and one above 1, a
// buffer fill overlapping a computation, an output read overlapping a
// computation, and computing from both buffer sets.
module tb_rcm_top;
  import rcm_pkg::*;
  import tb_rcm_ref_pkg::*;

  localparam int W = 6, H = 5, KSM = 3, IC = 8, OC = 4;
  localparam int PIX = W * H, KP = KSM * KSM;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  rcm_cfg_e cfg = CFG_16X;
  logic [2:0] ow = 0, oh = 0;
  logic [3:0] ic = 0;
  logic [1:0] ks = 0;
  logic fset = 0, wset = 0, oset = 0;
  logic busy, done;
  logic f_we = 0, f_set = 0;
  logic [1:0] f_bank = 0;
  logic [4:0] f_pix = 0;
  logic [2:0] f_ch = 0;
  logic [3:0] f_data = 0;
  logic w_we = 0, w_set = 0;
  logic [1:0] w_bank = 0;
  logic [3:0] w_k = 0;
  logic [2:0] w_ch = 0;
  logic [1:0] w_oc = 0;
  logic [3:0] w_data = 0;
  logic o_re = 0, o_set = 0;
  logic [4:0] o_pix = 0;
  logic [1:0] o_oc = 0;
  logic [31:0] o_data;

  rcm_top #(.W_MAX(W), .H_MAX(H), .KS_MAX(KSM), .IC_MAX(IC), .OC_MAX(OC)) dut (.*);

  always #5 clk = ~clk;

  // tile descriptions, indexed by buffer set
  int feat [2][PIX][IC];
  int wt   [2][KP][IC][OC];
  typedef struct { rcm_cfg_e cfg; int ow, oh, ic, ks; } tile_t;
  tile_t tile [2];

  int checks = 0, failures = 0;
  int n_mode [3];
  int n_ks1 = 0, n_ksbig = 0, n_fill_overlap = 0, n_read_overlap = 0;
  int n_set [2];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bits_of(rcm_cfg_e c);
    return 16 / cfg_n(c);
  endfunction

  // chunk of element v that goes to bank b in mode c (junk if unused)
  function automatic logic [3:0] chunk(rcm_cfg_e c, int v, int b);
    int first = 4 - bits_of(c) / 4;    // first bank used: A (16x), C (8x), D (4x)
    if (b < first) return 4'($urandom);
    return 4'(v >> (4 * (3 - b)));
  endfunction

  task automatic fill(int s);
    tile_t t = tile[s];
    int bw = bits_of(t.cfg);
    for (int p = 0; p < PIX; p++)
      for (int c = 0; c < IC; c++) begin
        feat[s][p][c] = sext($urandom, bw);
        for (int b = 0; b < 4; b++) begin
          @(negedge clk);
          if (busy) n_fill_overlap++;
          f_we = 1; f_set = 1'(s); f_bank = 2'(b); f_pix = 5'(p); f_ch = 3'(c);
          f_data = chunk(t.cfg, feat[s][p][c], b);
        end
      end
    @(negedge clk); f_we = 0;
    for (int k = 0; k < KP; k++)
      for (int c = 0; c < IC; c++)
        for (int o = 0; o < OC; o++) begin
          wt[s][k][c][o] = sext($urandom, bw);
          for (int b = 0; b < 4; b++) begin
            @(negedge clk);
            w_we = 1; w_set = 1'(s); w_bank = 2'(b); w_k = 4'(k); w_ch = 3'(c); w_oc = 2'(o);
            w_data = chunk(t.cfg, wt[s][k][c][o], b);
          end
        end
    @(negedge clk); w_we = 0;
  endtask

  task automatic compute(int s);
    tile_t t = tile[s];
    int cyc = 0, exp_cyc;
    exp_cyc = t.oh * (O1 + t.ow * (O2 + t.ic / cfg_n(t.cfg) * t.ks * t.ks));
    @(negedge clk);
    cfg = t.cfg; ow = 3'(t.ow); oh = 3'(t.oh); ic = 4'(t.ic); ks = 2'(t.ks);
    fset = 1'(s); wset = 1'(s); oset = 1'(s); start = 1;
    @(negedge clk); start = 0;
    while (busy) begin cyc++; @(negedge clk); end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc, exp_cyc);
    end
    n_mode[cfg_n(t.cfg) == 1 ? 0 : cfg_n(t.cfg) == 2 ? 1 : 2]++;
    if (t.ks == 1) n_ks1++; else n_ksbig++;
    n_set[s]++;
  endtask

  task automatic readback(int s);
    tile_t t = tile[s];
    for (int y = 0; y < t.oh; y++)
      for (int x = 0; x < t.ow; x++)
        for (int o = 0; o < OC; o++) begin
          logic [31:0] e = 0;
          for (int ky = 0; ky < t.ks; ky++)
            for (int kx = 0; kx < t.ks; kx++)
              for (int c = 0; c < t.ic; c++)
                e += 32'(feat[s][(y + ky) * W + x + kx][c] * wt[s][ky * t.ks + kx][c][o]);
          @(negedge clk);
          o_re = 1; o_set = 1'(s); o_pix = 5'(y * W + x); o_oc = 2'(o);
          @(negedge clk);
          o_re = 0;
          if (busy) n_read_overlap++;
          checks++;
          if (o_data !== e) begin
            failures++;
            if (failures < 10)
              $display("FAIL set %0d %s (x%0d,y%0d,o%0d) got %0d exp %0d",
                       s, t.cfg.name(), x, y, o, $signed(o_data), $signed(e));
          end
        end
  endtask

  initial begin
    tile_t seq [6];
    seq[0] = '{CFG_16X, 4, 3, 8, 3};
    seq[1] = '{CFG_8X,  6, 5, 8, 1};
    seq[2] = '{CFG_4X,  4, 3, 8, 3};
    seq[3] = '{CFG_8X,  5, 4, 6, 2};
    seq[4] = '{CFG_4X,  6, 5, 4, 1};
    seq[5] = '{CFG_16X, 5, 4, 3, 2};
    repeat (3) @(posedge clk);
    rst_n = 1;
    tile[0] = seq[0];
    fill(0);
    for (int j = 0; j < 6; j++) begin
      automatic int s = j % 2;
      fork
        compute(s);
        begin
          if (j > 0) readback(1 - s);
          if (j < 5) begin tile[1 - s] = seq[j + 1]; fill(1 - s); end
        end
      join
    end
    readback(1);
    // every mechanism must have happened
    foreach (n_mode[m]) begin checks++; if (n_mode[m] == 0) begin failures++; $display("FAIL mode %0d never ran", m); end end
    foreach (n_set[s])  begin checks++; if (n_set[s] == 0)  begin failures++; $display("FAIL set %0d never used", s); end end
    checks += 4;
    if (n_ks1 == 0)          begin failures++; $display("FAIL no KS=1 tile"); end
    if (n_ksbig == 0)        begin failures++; $display("FAIL no KS>1 tile"); end
    if (n_fill_overlap == 0) begin failures++; $display("FAIL no fill during compute"); end
    if (n_read_overlap == 0) begin failures++; $display("FAIL no read during compute"); end
    $display("mechanisms: 16x=%0d 8x=%0d 4x=%0d ks1=%0d ks>1=%0d set0=%0d set1=%0d fill_overlap=%0d read_overlap=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_ks1, n_ksbig, n_set[0], n_set[1], n_fill_overlap, n_read_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
