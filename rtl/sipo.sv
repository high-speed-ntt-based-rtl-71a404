// sipo: serial-in parallel-out buffer between the 64-bit host port and the
// 1344-bit rate input of the Keccak core.
//
// Each accepted word is stored at the next 64-bit position, word 0 at
// bits 63:0 (the first bytes of the sponge block).  A block narrower than
// 1344 bits (SHAKE-256, SHA3) is written with fewer words; the positions
// not written stay zero.  clear empties the buffer (all zero) and is given
// after each absorb.  A word written into a full buffer is dropped.
// Widths follow the source architecture (64-bit in, 1344-bit out); the
// clear/count interface is this design's choice.
module sipo
  import keccak_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   in_valid,
  input  word_t  in_data,
  output block_t block,
  output logic   full,
  output logic [$clog2(RATE_WORDS+1)-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      block <= '0;
      count <= '0;
    end else if (clear) begin
      block <= '0;
      count <= '0;
    end else if (in_valid && !full) begin
      block[LANE_W*count +: LANE_W] <= in_data;
      count <= count + 1'b1;
    end
  end

  assign full = (count == $bits(count)'(RATE_WORDS));
endmodule
