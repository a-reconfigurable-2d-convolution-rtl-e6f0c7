// tb_rcm_addr_gen: self-checking test of the addressing logic at the
// default sizes (W_MAX=H_MAX=18, IC_MAX=32, KS_MAX=7). For random loop
// positions it derives the expected word from the flat element index of
// the input pixel (x+kx, y+ky) and channel i (element index / 4), the
// weight word from k = ky*KS + kx, and the output pixel y*W_MAX + x.
module tb_rcm_addr_gen;
  localparam int W = 18, H = 18, IC = 32, KS = 7;
  logic [4:0] ox, oy;
  logic [2:0] kx, ky, ks;
  logic [5:0] ch;
  logic [12:0] f_addr;
  logic [8:0]  w_addr;
  logic [8:0]  o_pix;
  logic [1:0]  lane;
  int checks = 0, failures = 0;

  rcm_addr_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int kse, owe, ohe, x, y, a, b, c, e_f, e_w, e_o;
      kse = $urandom_range(1, KS);
      owe = W - kse + 1;
      ohe = H - kse + 1;
      x = $urandom_range(0, owe - 1); y = $urandom_range(0, ohe - 1);
      a = $urandom_range(0, kse - 1); b = $urandom_range(0, kse - 1);
      c = $urandom_range(0, IC - 1);
      if (t == 0) begin kse = 7; x = 11; y = 11; a = 6; b = 6; c = 31; end  // last element
      ox = 5'(x); oy = 5'(y); kx = 3'(a); ky = 3'(b); ks = 3'(kse); ch = 6'(c);
      #1;
      e_f = (((y + b) * W + (x + a)) * IC + c) / 4;
      e_w = ((b * kse + a) * IC + c) / 4;
      e_o = y * W + x;
      checks += 4;
      if (f_addr !== 13'(e_f)) begin failures++; if (failures < 10) $display("FAIL f_addr %0d exp %0d", f_addr, e_f); end
      if (w_addr !== 9'(e_w))  begin failures++; if (failures < 10) $display("FAIL w_addr %0d exp %0d", w_addr, e_w); end
      if (o_pix !== 9'(e_o))   begin failures++; if (failures < 10) $display("FAIL o_pix %0d exp %0d", o_pix, e_o); end
      if (lane !== 2'(c % 4))  begin failures++; if (failures < 10) $display("FAIL lane"); end
      if (t == 0 && (e_f != 18 * 18 * 32 / 4 - 1)) begin failures++; $display("FAIL last word"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
