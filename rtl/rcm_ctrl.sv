// rcm_ctrl: loop controller of the RCM.
//
// On `start` (while idle) it latches the run-time tile configuration --
// precision mode cfg, output width ow, output height oh, input channels ic,
// kernel size ks, and which set of each double buffer to use -- and walks
//   for oy < oh:                 2 row cycles        (overhead o1 = 2)
//     for ox < ow:               1 setup cycle       (clear accumulators)
//       for ky, kx < ks:
//         for i < ic step N:     1 MAC cycle         (IC/N * KS^2 cycles)
//                                1 drain, 1 cast, 1 write, 1 advance
//                                                    (overhead o2 = 5 with setup)
// so a tile takes exactly  OH * (2 + OW * (5 + IC/N * KS^2))  cycles with
// `busy` high, the latency formula of the original design with its o1 = 2
// and o2 = 5. How those overhead cycles are spent, and the per-row meaning
// of o1, are this design's choices; the formula gives only their number.
// `done` pulses for one cycle after the last busy cycle.
//
// Pipeline: in a MAC cycle the counters address the buffers (rd_en); the
// bank words arrive the next cycle, when mac_en is high and lane_q gives the
// channel lane. The setup cycle raises mac_clr. In the cast cycle cast_en
// loads the 32-bit results into the output register; in the write cycle
// out_we writes them to output pixel (ox, oy).
//
// Requirements on the configuration (checked by assertions): ic a non-zero
// multiple of N and at most IC_MAX, 1 <= ks <= KS_MAX, ow + ks - 1 <= W_MAX,
// oh + ks - 1 <= H_MAX, ow, oh >= 1.
module rcm_ctrl
  import rcm_pkg::*;
#(
  parameter int unsigned W_MAX  = 18,
  parameter int unsigned H_MAX  = 18,
  parameter int unsigned IC_MAX = 32,
  parameter int unsigned KS_MAX = 7,
  localparam int unsigned XW   = $clog2(W_MAX + 1),
  localparam int unsigned YW   = $clog2(H_MAX + 1),
  localparam int unsigned KSW  = $clog2(KS_MAX + 1),
  localparam int unsigned CW   = $clog2(IC_MAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // run-time configuration, sampled with start
  input  logic            start,
  input  rcm_cfg_e        cfg_in,
  input  logic [XW-1:0]   ow_in,
  input  logic [YW-1:0]   oh_in,
  input  logic [CW-1:0]   ic_in,
  input  logic [KSW-1:0]  ks_in,
  input  logic            fset_in,
  input  logic            wset_in,
  input  logic            oset_in,
  output logic            busy,
  output logic            done,
  // latched configuration
  output rcm_cfg_e        cfg,
  output logic [KSW-1:0]  ks,
  output logic            fset,
  output logic            wset,
  output logic            oset,
  // loop position
  output logic [XW-1:0]   ox,
  output logic [YW-1:0]   oy,
  output logic [KSW-1:0]  kx,
  output logic [KSW-1:0]  ky,
  output logic [CW-1:0]   ch,
  // datapath control
  output logic            rd_en,
  output logic            mac_clr,
  output logic            mac_en,
  output logic [1:0]      lane_q,
  output logic            cast_en,
  output logic            out_we
);

  typedef enum logic [3:0] {
    S_IDLE, S_ROW0, S_ROW1, S_SETUP, S_MAC, S_DRAIN, S_CAST, S_WRITE, S_NEXT
  } state_e;

  state_e        state;
  logic [XW-1:0] ow;
  logic [YW-1:0] oh;
  logic [CW-1:0] ic;
  logic [CW-1:0] n_step;

  always_comb begin
    case (cfg)
      CFG_8X:  n_step = CW'(2);
      CFG_4X:  n_step = CW'(4);
      default: n_step = CW'(1);
    endcase
  end

  wire last_ch = (ch + n_step >= ic);
  wire last_kx = (kx == ks - 1'b1);
  wire last_ky = (ky == ks - 1'b1);
  wire last_ox = (ox == ow - 1'b1);
  wire last_oy = (oy == oh - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cfg   <= CFG_16X;
      ow    <= '0;
      oh    <= '0;
      ic    <= '0;
      ks    <= '0;
      fset  <= 1'b0;
      wset  <= 1'b0;
      oset  <= 1'b0;
      ox    <= '0;
      oy    <= '0;
      kx    <= '0;
      ky    <= '0;
      ch    <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          cfg   <= cfg_in;
          ow    <= ow_in;
          oh    <= oh_in;
          ic    <= ic_in;
          ks    <= ks_in;
          fset  <= fset_in;
          wset  <= wset_in;
          oset  <= oset_in;
          oy    <= '0;
          state <= S_ROW0;
        end
        S_ROW0: begin
          ox    <= '0;
          state <= S_ROW1;
        end
        S_ROW1: state <= S_SETUP;
        S_SETUP: begin
          kx    <= '0;
          ky    <= '0;
          ch    <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          if (!last_ch) begin
            ch <= ch + n_step;
          end else begin
            ch <= '0;
            if (!last_kx) begin
              kx <= kx + 1'b1;
            end else begin
              kx <= '0;
              if (!last_ky) ky <= ky + 1'b1;
              else          state <= S_DRAIN;
            end
          end
        end
        S_DRAIN: state <= S_CAST;
        S_CAST:  state <= S_WRITE;
        S_WRITE: state <= S_NEXT;
        S_NEXT: begin
          if (!last_ox) begin
            ox    <= ox + 1'b1;
            state <= S_SETUP;
          end else if (!last_oy) begin
            oy    <= oy + 1'b1;
            state <= S_ROW0;
          end else begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // one-cycle delay from buffer address to MAC operand
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_en <= 1'b0;
      lane_q <= '0;
    end else begin
      mac_en <= rd_en;
      lane_q <= ch[1:0];
    end
  end

  assign busy    = (state != S_IDLE);
  assign rd_en   = (state == S_MAC);
  assign mac_clr = (state == S_SETUP);
  assign cast_en = (state == S_CAST);
  assign out_we  = (state == S_WRITE);

  // Configuration rules of a tile.
  a_cfg_ok: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state == S_IDLE) |->
      (ic_in != 0) && (ic_in <= CW'(IC_MAX)) &&
      (ic_in % CW'(cfg_n(cfg_in)) == 0) &&
      (ks_in != 0) && (ks_in <= KSW'(KS_MAX)) &&
      (ow_in != 0) && (32'(ow_in) + 32'(ks_in) - 1 <= W_MAX) &&
      (oh_in != 0) && (32'(oh_in) + 32'(ks_in) - 1 <= H_MAX))
    else $error("rcm_ctrl: tile configuration out of range");

endmodule
