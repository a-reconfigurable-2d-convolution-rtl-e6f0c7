// tb_rcm_concat: self-checking test of the concatenating logic
// (OC_MAX = 4). For random bank words, modes and channel positions i, the
// expected operands are assembled chunk by chunk from the per-mode
// formulas (16x: A B C D at channel i; 8x: C[i] D[i] C[i+1] D[i+1] and
// C_W[i+1] D_W[i+1] C_W[i] D_W[i]; 4x: D[i..i+3] and D_W[i+3..i]).
module tb_rcm_concat;
  import rcm_pkg::*;

  localparam int OC = 4;
  rcm_cfg_e cfg;
  logic [1:0] lane;
  logic [15:0] fbank [4];
  logic [OC*16-1:0] wbank [4];
  logic [15:0] op1;
  logic [15:0] op2 [OC];
  int checks = 0, failures = 0;

  rcm_concat #(.OC_MAX(OC)) dut (.*);

  // chunk of channel i (within the current group of four) in bank b
  function automatic logic [3:0] F(int b, int i);
    return fbank[b][4*(i%4) +: 4];
  endfunction
  function automatic logic [3:0] Wt(int b, int o, int i);
    return wbank[b][16*o + 4*(i%4) +: 4];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rcm_cfg_e modes[3] = '{CFG_16X, CFG_8X, CFG_4X};
    localparam int A = 0, B = 1, C = 2, D = 3;
    for (int t = 0; t < 600; t++) begin
      logic [15:0] e1;
      logic [15:0] e2 [OC];
      int i;
      cfg = modes[t % 3];
      i = (cfg == CFG_16X) ? $urandom_range(0, 3) :
          (cfg == CFG_8X)  ? 2 * $urandom_range(0, 1) : 0;
      lane = 2'(i);
      foreach (fbank[b]) fbank[b] = 16'($urandom);
      foreach (wbank[b]) wbank[b] = {$urandom, $urandom};
      #1;
      case (cfg)
        CFG_16X: e1 = {F(A, i), F(B, i), F(C, i), F(D, i)};
        CFG_8X:  e1 = {F(C, i), F(D, i), F(C, i + 1), F(D, i + 1)};
        default: e1 = {F(D, i), F(D, i + 1), F(D, i + 2), F(D, i + 3)};
      endcase
      for (int o = 0; o < OC; o++)
        case (cfg)
          CFG_16X: e2[o] = {Wt(A, o, i), Wt(B, o, i), Wt(C, o, i), Wt(D, o, i)};
          CFG_8X:  e2[o] = {Wt(C, o, i + 1), Wt(D, o, i + 1), Wt(C, o, i), Wt(D, o, i)};
          default: e2[o] = {Wt(D, o, i + 3), Wt(D, o, i + 2), Wt(D, o, i + 1), Wt(D, o, i)};
        endcase
      checks++;
      if (op1 !== e1) begin
        failures++;
        if (failures < 10) $display("FAIL op1 cfg %s i %0d got %h exp %h", cfg.name(), i, op1, e1);
      end
      for (int o = 0; o < OC; o++) begin
        checks++;
        if (op2[o] !== e2[o]) begin
          failures++;
          if (failures < 10) $display("FAIL op2[%0d] cfg %s i %0d got %h exp %h", o, cfg.name(), i, op2[o], e2[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
