// tb_rcm_ctrl: self-checking test of the loop controller at the default
// sizes. For a set of tile configurations (all modes, KS = 1, 3, 5, 7,
// several IC, OW, OH) it checks
//  * busy lasts exactly OH * (2 + OW * (5 + IC/N * KS^2)) cycles, and done
//    pulses once right after;
//  * the MAC cycles visit (oy, ox, ky, kx, i) in loop order, i stepping by N;
//  * mac_en repeats rd_en one cycle later, lane_q the channel lane;
//  * one accumulator clear before and one cast + one write after each pixel,
//    the write addressed to the pixel just computed;
//  * the buffer-set selections and the mode are latched at start.
module tb_rcm_ctrl;
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

  rcm_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  task automatic run(rcm_cfg_e c, int owv, int ohv, int icv, int ksv, bit fs, bit ws, bit os);
    int n, exp_cycles, busy_cycles, macs, clrs, casts, writes, dones;
    int ey, ex, eky, ekx, ei;
    logic prev_rd;
    logic [1:0] prev_lane;
    n = cfg_n(c);
    exp_cycles = ohv * (O1 + owv * (O2 + icv / n * ksv * ksv));
    @(negedge clk);
    cfg_in = c; ow_in = 5'(owv); oh_in = 5'(ohv); ic_in = 6'(icv); ks_in = 3'(ksv);
    fset_in = fs; wset_in = ws; oset_in = os; start = 1;
    @(negedge clk);
    start = 0;
    cfg_in = CFG_16X; fset_in = ~fs; wset_in = ~ws; oset_in = ~os;  // must be ignored
    busy_cycles = 0; macs = 0; clrs = 0; casts = 0; writes = 0; dones = 0;
    ey = 0; ex = 0; eky = 0; ekx = 0; ei = 0;
    prev_rd = 0; prev_lane = 0;
    while (busy) begin
      busy_cycles++;
      if (cfg != c || fset != fs || wset != ws || oset != os) fail("latched configuration");
      if (mac_en !== prev_rd) fail("mac_en is not rd_en delayed");
      if (prev_rd && lane_q !== prev_lane) fail("lane_q");
      if (mac_clr) clrs++;
      if (cast_en) casts++;
      if (rd_en) begin
        macs++;
        if (32'(oy) != ey || 32'(ox) != ex || 32'(ky) != eky || 32'(kx) != ekx || 32'(ch) != ei)
          fail($sformatf("order: got (%0d,%0d,%0d,%0d,%0d) exp (%0d,%0d,%0d,%0d,%0d)",
                         oy, ox, ky, kx, ch, ey, ex, eky, ekx, ei));
        ei += n;
        if (ei >= icv) begin
          ei = 0; ekx++;
          if (ekx == ksv) begin
            ekx = 0; eky++;
            if (eky == ksv) begin
              eky = 0; ex++;
              if (ex == owv) begin ex = 0; ey++; end
            end
          end
        end
      end
      if (out_we) begin
        // the pixel before the next expected one
        int wx, wy;
        wx = (ex == 0) ? owv - 1 : ex - 1;
        wy = (ex == 0) ? ey - 1 : ey;
        writes++;
        if (32'(ox) != wx || 32'(oy) != wy) fail("write pixel");
      end
      prev_rd = rd_en; prev_lane = ch[1:0];
      @(negedge clk);
      if (done) dones++;
    end
    checks += 5;
    if (busy_cycles != exp_cycles)
      fail($sformatf("%s OW=%0d OH=%0d IC=%0d KS=%0d: %0d cycles, expected %0d",
                     c.name(), owv, ohv, icv, ksv, busy_cycles, exp_cycles));
    if (macs != ohv * owv * icv / n * ksv * ksv) fail("MAC cycle count");
    if (clrs != ohv * owv || casts != ohv * owv) fail("clear/cast count");
    if (writes != ohv * owv) fail("write count");
    if (dones != 1) fail("done pulse");
  endtask

  initial begin
    rcm_cfg_e modes[3] = '{CFG_16X, CFG_8X, CFG_4X};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy || rd_en || out_we) fail("idle after reset");
    foreach (modes[m]) begin
      run(modes[m], 1, 1, 4, 1, 0, 0, 0);
      run(modes[m], 18, 1, 32, 1, 1, 0, 1);
      run(modes[m], 16, 2, 8, 3, 0, 1, 1);
      run(modes[m], 3, 2, 16, 5, 1, 1, 0);
      run(modes[m], 12, 2, 32, 7, 1, 0, 0);
      run(modes[m], 5, 3, 12, 3, 0, 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
