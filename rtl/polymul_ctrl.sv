// polymul_ctrl: sequencer and address generator of the accelerator.
//
// A command (NTT, INTT or point-wise multiplication) runs as a list of
// rounds.  Each round streams the 64 groups of a polynomial, one per cycle,
// through the datapath and writes them back in place:
//   NTT : CT s=64 | CT s=16 | CT s=4 | bypass-CT s=1   (layers 1-2,3-4,5-6,7)
//   INTT: bypass-GS s=1 | GS s=4 | GS s=16 | GS s=64   (the same, mirrored)
//   PWM : one round, s=1, point-wise unit instead of the butterfly core
// Group c (0..63) of a round with group spacing s = 4^p has base index j
// = c with two zero bits inserted at bit 2p, and lanes j, j+s, j+2s, j+3s.
// The four twiddle indices follow the Kyber table order (forward rounds
// count up from 1, inverse rounds count down from 127).
//
// Timing: the read is issued in cycle t; mode and twiddle indices leave the
// controller delayed by RAM_LAT to meet the read data; the write-back enable
// and indices leave delayed by RAM_LAT + datapath latency (8 for the
// butterfly core, 4 for the point-wise unit).  A round starts only when the
// previous one has fully written back, so a round always reads finished
// data; each round costs 64 + 11 cycles.  cmd_ready is high in idle;
// done pulses for one cycle when the last write of a command has happened.
// The round structure (two layers per pass, a bypass pass for the odd
// layer, four coefficients per cycle) follows the source architecture; the
// address sequence, the drain between rounds and the handshake are this
// design's own.
module polymul_ctrl
  import ntt_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // command
  input  logic      cmd_valid,
  output logic      cmd_ready,
  input  op_e       cmd_op,
  output logic      busy,
  output op_e       op,          // operation in progress
  output logic      done,
  // read side (issue cycle)
  output logic      rd_en,
  output gidx_t     rd_idx,
  // datapath control, aligned with the read data
  output pmc_mode_e dp_mode,
  output tidx_t [3:0] dp_tw_idx,
  // write back, aligned with the datapath result
  output logic      wb_en,
  output gidx_t     wb_idx
);
  localparam int unsigned WB_LAT_PMC = RAM_LAT + PMC_LAT;
  localparam int unsigned WB_LAT_PWM = RAM_LAT + PWM_LAT;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_e;

  state_e      state;
  logic [1:0]  round;       // round number within the command
  logic [5:0]  cnt;         // group counter
  logic [1:0]  p;           // stride exponent, s = 4^p
  pmc_mode_e   mode;
  cidx_t       j;
  tidx_t [3:0] tw;
  logic        last_round;

  // delay lines
  pmc_mode_e   mode_d [RAM_LAT];
  tidx_t [3:0] tw_d   [RAM_LAT];
  logic        v_d    [WB_LAT_PMC];
  gidx_t       idx_d  [WB_LAT_PMC];
  logic        inflight;

  // round table
  always_comb begin
    unique case (op)
      OP_NTT: begin
        p    = 2'(3 - round);
        mode = (round == 2'd3) ? MODE_BYPASS_CT : MODE_CT;
        if (round == 2'd3) p = 2'd0;
      end
      OP_INTT: begin
        p    = round;
        mode = (round == 2'd0) ? MODE_BYPASS_GS : MODE_GS;
      end
      default: begin
        p    = 2'd0;
        mode = MODE_BYPASS_CT;
      end
    endcase
    last_round = (op == OP_PWM) || (round == 2'd3);
  end

  // group base and lanes
  always_comb begin
    unique case (p)
      2'd0:    j = {cnt, 2'b00};
      2'd1:    j = {cnt[5:2], 2'b00, cnt[1:0]};
      2'd2:    j = {cnt[5:4], 2'b00, cnt[3:0]};
      default: j = {2'b00, cnt};
    endcase
    for (int l = 0; l < LANES; l++) rd_idx[l] = j + (cidx_t'(l) << (2*p));
  end

  // twiddle indices (see header); s = 4^p
  always_comb begin
    int unsigned s, l1, k1, k2a, jj;
    s   = 1 << (2*p);
    jj  = 32'(j);
    l1  = 0;
    k1  = 0;
    k2a = 0;
    tw  = '0;
    if (op == OP_PWM) begin
      tw[0] = tidx_t'(64 + (jj >> 2));
    end else if (mode == MODE_BYPASS_CT) begin
      tw[2] = tidx_t'(64 + (jj >> 2));
      tw[3] = tw[2];
    end else if (mode == MODE_BYPASS_GS) begin
      tw[2] = tidx_t'(127 - (jj >> 2));
      tw[3] = tw[2];
    end else if (mode == MODE_CT) begin
      l1  = 6 - 2*p;                          // layer of distance 2s
      k1  = (1 << l1) + jj / (4*s);
      k2a = (2 << l1) + jj / (2*s);
      tw  = {tidx_t'(k2a + 1), tidx_t'(k2a), tidx_t'(k1), tidx_t'(k1)};
    end else begin
      k1  = 2 * (128 / s) - 1 - jj / (2*s);    // layer of distance s
      k2a = 2 * (64 / s)  - 1 - jj / (4*s);    // layer of distance 2s
      tw  = {tidx_t'(k2a), tidx_t'(k2a), tidx_t'(k1 - 1), tidx_t'(k1)};
    end
  end

  assign rd_en     = (state == S_ISSUE);
  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);

  always_comb begin
    inflight = 1'b0;
    for (int i = 0; i < WB_LAT_PMC; i++) inflight |= v_d[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      round <= '0;
      cnt   <= '0;
      op    <= OP_NTT;
      done  <= 1'b0;
      for (int i = 0; i < WB_LAT_PMC; i++) v_d[i] <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (cmd_valid) begin
            op    <= cmd_op;
            round <= '0;
            cnt   <= '0;
            state <= S_ISSUE;
          end
        S_ISSUE: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'(WORDS - 1)) state <= S_DRAIN;
        end
        default:   // S_DRAIN: wait for the last write of the round
          if (!inflight && !rd_en) begin
            if (last_round) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              round <= round + 2'd1;
              state <= S_ISSUE;
            end
          end
      endcase
      // valid shift register; point-wise results leave it earlier
      v_d[0] <= rd_en;
      for (int i = 1; i < WB_LAT_PMC; i++) v_d[i] <= v_d[i-1];
    end
  end

  always_ff @(posedge clk) begin
    mode_d[0] <= mode;
    tw_d[0]   <= tw;
    for (int i = 1; i < RAM_LAT; i++) begin
      mode_d[i] <= mode_d[i-1];
      tw_d[i]   <= tw_d[i-1];
    end
    idx_d[0] <= rd_idx;
    for (int i = 1; i < WB_LAT_PMC; i++) idx_d[i] <= idx_d[i-1];
  end

  assign dp_mode   = mode_d[RAM_LAT-1];
  assign dp_tw_idx = tw_d[RAM_LAT-1];
  assign wb_en     = (op == OP_PWM) ? v_d[WB_LAT_PWM-1] : v_d[WB_LAT_PMC-1];
  assign wb_idx    = (op == OP_PWM) ? idx_d[WB_LAT_PWM-1] : idx_d[WB_LAT_PMC-1];

  a_no_cmd_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                        busy |-> !cmd_valid);
endmodule
