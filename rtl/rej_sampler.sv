// rej_sampler: Kyber's uniform sampler (Parse), turning the SHAKE-128
// output stream into a polynomial with coefficients uniform in [0, q).
//
// Every three stream bytes b0 b1 b2 give two 12-bit candidates,
// d1 = b0 + 256*(b1 mod 16) and d2 = (b1 >> 4) + 16*b2 (the low and high
// 12 bits of the little-endian 24-bit value); a candidate is kept if it is
// below q.  The unit takes three triples (72 bits, six candidates) per cycle
// from a bit buffer fed by 64-bit words, packs the kept candidates in order
// and writes one group of four coefficients (4*addr .. 4*addr+3) whenever
// four are ready.  It takes no new triples while more than three
// coefficients wait, so the pack buffer never holds more than nine.  After
// 64 groups (256 coefficients) it stops, pulses done, and discards what is
// left of the stream.
// The function is Kyber's; the 72-bit step and the packing are this
// design's choice.  A 1344-bit SHAKE-128 block is 112 candidates, about 91
// of them kept: the unit is then limited by the 64-bit stream (21 cycles per
// block) and by its four-coefficient write port (about 23 cycles), both
// below the 24 cycles the Keccak core takes for the next block.
module rej_sampler
  import ntt_pkg::*;
  import keccak_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   busy,
  output logic   done,
  // word stream from the PISO
  input  logic   in_valid,
  input  word_t  in_data,
  output logic   in_ready,
  // polynomial write port
  output logic   wr_en,
  output logic [AW-1:0] wr_addr,
  output group_t wr_data
);
  localparam int unsigned TRIPLES = 3;
  localparam int unsigned NCAND   = 2 * TRIPLES;
  localparam int unsigned STEP    = 24 * TRIPLES;
  localparam int unsigned PEND    = 3 + NCAND;    // pack buffer entries
  logic [STEP-1:0] window;
  logic [7:0]      avail;
  logic            take;
  coef_t           cand [NCAND];
  logic [NCAND-1:0] keep;
  coef_t           pend [PEND], merged [PEND];
  logic [3:0]      npend, nmerged;
  logic [AW:0]     groups;     // groups written so far, 0..64

  bitbuf #(.OUT_W(STEP), .DEPTH(128)) u_buf (
    .clk, .rst_n, .flush(start), .in_valid(in_valid && busy), .in_data,
    .in_ready, .take, .take_n(7'(STEP)), .window, .avail
  );

  assign take = busy && (avail >= 8'(STEP)) && (npend <= 4'd3);

  always_comb begin
    for (int t = 0; t < TRIPLES; t++) begin
      cand[2*t]   = window[24*t +: 12];
      cand[2*t+1] = window[24*t+12 +: 12];
    end
    for (int i = 0; i < NCAND; i++) keep[i] = take && (cand[i] < coef_t'(Q));
    // append the kept candidates behind the pending ones
    merged  = pend;
    nmerged = npend;
    for (int i = 0; i < NCAND; i++)
      if (keep[i]) begin
        merged[nmerged] = cand[i];
        nmerged = nmerged + 4'd1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      npend  <= '0;
      groups <= '0;
      wr_en  <= 1'b0;
      for (int i = 0; i < PEND; i++) pend[i] <= '0;
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      if (start) begin
        busy   <= 1'b1;
        npend  <= '0;
        groups <= '0;
      end else if (busy) begin
        if (nmerged >= 4'd4) begin
          wr_en   <= 1'b1;
          wr_addr <= AW'(groups);
          for (int l = 0; l < 4; l++) wr_data[l] <= merged[l];
          for (int i = 0; i < PEND - 4; i++) pend[i] <= merged[i+4];
          npend   <= nmerged - 4'd4;
          groups  <= groups + 1'b1;
          if (groups == (AW+1)'(WORDS - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          pend  <= merged;
          npend <= nmerged;
        end
      end
    end
  end
endmodule
