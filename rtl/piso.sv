// piso: parallel-in serial-out buffer that takes a 1344-bit squeeze block
// from the Keccak core and streams it as 64-bit words, lowest word first,
// with a valid/ready handshake.
//
// load copies the block and the number of words to send (n_words: 21 for
// SHAKE-128, 17 for SHAKE-256, fewer for SHA3); while it drains, the
// Keccak core can already compute the next block, which is how the
// samplers overlap with hashing.  empty is high when no word is left.
// load while words are still pending restarts the buffer.
// Widths follow the source architecture; the handshake is this design's.
module piso
  import keccak_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t load_block,
  input  logic [$clog2(RATE_WORDS+1)-1:0] n_words,
  output logic   out_valid,
  input  logic   out_ready,
  output word_t  out_data,
  output logic   empty
);
  block_t sreg;
  logic [$clog2(RATE_WORDS+1)-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '0;
      left <= '0;
    end else if (load) begin
      sreg <= load_block;
      left <= n_words;
    end else if (out_valid && out_ready) begin
      sreg <= sreg >> LANE_W;
      left <= left - 1'b1;
    end
  end

  assign out_valid = (left != '0);
  assign empty     = (left == '0);
  assign out_data  = sreg[LANE_W-1:0];

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 n_words <= $bits(n_words)'(RATE_WORDS));
endmodule
