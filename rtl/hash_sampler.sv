// hash_sampler: the hashing and sampling unit of the Kyber co-processor:
// SIPO -> Keccak core -> PISO -> {host, rejection sampler, binomial sampler}.
//
// Commands (cmd_valid while cmd_ready):
//   HS_ABSORB      XOR the SIPO block into the state and permute
//                  (cmd_init: clear the state first); the SIPO is cleared.
//   HS_SQUEEZE     stream one block (rate_words words) to the host port
//   HS_SAMPLE_REJ  fill a polynomial with the rejection sampler
//   HS_SAMPLE_CBD  fill a polynomial with the binomial sampler (cmd_eta3)
// The host loads a padded message block into the SIPO word by word and
// absorbs it; after the last absorb the rate part of the state is the first
// output block.  A squeeze or sample command copies that block into the PISO
// and at once starts the next permutation, so the Keccak core computes block
// k+1 while the PISO and the sampler work on block k; the sampler's time
// hides behind the 24-cycle permutation.  Samplers keep asking for blocks
// until 256 coefficients are written, then done pulses.  The sampled
// groups leave on samp_we/samp_addr/samp_data for the polynomial memory.
// Note that every squeeze leaves one block computed ahead: a later
// HS_SQUEEZE continues with that block, as SHAKE's output stream requires.
// The parallel operation of samplers and Keccak core follows the source
// architecture; commands and handshakes are this design's choice.
module hash_sampler
  import ntt_pkg::*;
  import keccak_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // message words into the SIPO
  input  logic   in_valid,
  input  word_t  in_data,
  // commands
  input  logic   cmd_valid,
  output logic   cmd_ready,
  input  logic [1:0] cmd,
  input  logic   cmd_init,
  input  logic   cmd_eta3,
  input  logic [$clog2(RATE_WORDS+1)-1:0] rate_words,
  output logic   done,
  // squeezed words to the host
  output logic   out_valid,
  output word_t  out_data,
  input  logic   out_ready,
  // sampled polynomial, one group per write
  output logic   samp_we,
  output logic [AW-1:0] samp_addr,
  output group_t samp_data
);
  localparam logic [1:0] HS_ABSORB = 2'd0, HS_SQUEEZE = 2'd1,
                         HS_SAMPLE_REJ = 2'd2, HS_SAMPLE_CBD = 2'd3;

  typedef enum logic [2:0] {S_IDLE, S_ABSORB, S_LOAD, S_STREAM, S_FINISH} state_e;
  state_e state;
  logic [1:0] cur;
  logic [$clog2(RATE_WORDS+1)-1:0] nw_q;

  block_t sipo_block, rate_blk;
  logic   sipo_clear, sipo_full;
  logic   kc_start, kc_init, kc_absorb, kc_busy, kc_done;
  logic   piso_load, piso_valid, piso_ready, piso_empty;
  word_t  piso_data;
  logic   rej_start, rej_busy, rej_ready, rej_we;
  logic   cbd_start, cbd_busy, cbd_ready, cbd_we;
  logic [AW-1:0] rej_addr, cbd_addr;
  group_t rej_data, cbd_data;
  logic   sampling;

  sipo u_sipo (.clk, .rst_n, .clear(sipo_clear), .in_valid, .in_data,
               .block(sipo_block), .full(sipo_full), .count());

  keccak_core u_keccak (.clk, .rst_n, .start(kc_start), .init(kc_init),
                        .absorb(kc_absorb), .block(sipo_block), .busy(kc_busy),
                        .done(kc_done), .rate_out(rate_blk));

  piso u_piso (.clk, .rst_n, .load(piso_load), .load_block(rate_blk),
               .n_words(nw_q), .out_valid(piso_valid), .out_ready(piso_ready),
               .out_data(piso_data), .empty(piso_empty));

  rej_sampler u_rej (.clk, .rst_n, .start(rej_start), .busy(rej_busy),
                     .done(), .in_valid(piso_valid && cur == HS_SAMPLE_REJ),
                     .in_data(piso_data), .in_ready(rej_ready), .wr_en(rej_we),
                     .wr_addr(rej_addr), .wr_data(rej_data));

  cbd_sampler u_cbd (.clk, .rst_n, .start(cbd_start), .eta3(cmd_eta3),
                     .busy(cbd_busy), .done(),
                     .in_valid(piso_valid && cur == HS_SAMPLE_CBD),
                     .in_data(piso_data), .in_ready(cbd_ready), .wr_en(cbd_we),
                     .wr_addr(cbd_addr), .wr_data(cbd_data));

  // PISO sink
  always_comb begin
    unique case (cur)
      HS_SAMPLE_REJ: piso_ready = rej_ready && rej_busy;
      HS_SAMPLE_CBD: piso_ready = cbd_ready && cbd_busy;
      HS_SQUEEZE:    piso_ready = out_ready && (state == S_STREAM);
      default:       piso_ready = 1'b0;
    endcase
  end
  assign out_valid = piso_valid && (cur == HS_SQUEEZE) && (state == S_STREAM);
  assign out_data  = piso_data;

  assign samp_we   = rej_we || cbd_we;
  assign samp_addr = rej_we ? rej_addr : cbd_addr;
  assign samp_data = rej_we ? rej_data : cbd_data;
  assign sampling  = rej_busy || cbd_busy;

  assign cmd_ready = (state == S_IDLE);

  // control
  always_comb begin
    kc_start   = 1'b0;
    kc_init    = 1'b0;
    kc_absorb  = 1'b0;
    piso_load  = 1'b0;
    sipo_clear = 1'b0;
    rej_start  = 1'b0;
    cbd_start  = 1'b0;
    unique case (state)
      S_IDLE:
        if (cmd_valid) begin
          if (cmd == HS_ABSORB) begin
            kc_start  = 1'b1;
            kc_init   = cmd_init;
            kc_absorb = 1'b1;
          end
          rej_start = (cmd == HS_SAMPLE_REJ);
          cbd_start = (cmd == HS_SAMPLE_CBD);
        end
      S_LOAD:     // copy the current block out and compute the next one
        if (!kc_busy) begin
          piso_load = 1'b1;
          kc_start  = 1'b1;
        end
      S_ABSORB:
        sipo_clear = kc_done;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cur   <= HS_ABSORB;
      nw_q  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (cmd_valid) begin
            cur   <= cmd;
            nw_q  <= rate_words;
            state <= (cmd == HS_ABSORB) ? S_ABSORB : S_LOAD;
          end
        S_ABSORB:
          if (kc_done) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        S_LOAD:
          if (!kc_busy) state <= S_STREAM;
        S_STREAM:
          if (cur == HS_SQUEEZE) begin
            if (piso_empty) state <= S_FINISH;
          end else if (!sampling) begin
            state <= S_FINISH;
          end else if (piso_empty) begin
            state <= S_LOAD;       // sampler wants the next block
          end
        default:   // S_FINISH: let the look-ahead permutation end
          if (!kc_busy) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
      endcase
    end
  end

  a_sipo_not_overfilled: assert property (@(posedge clk) disable iff (!rst_n)
                                          in_valid |-> !sipo_full);
endmodule
