// keccak_pkg: sizes shared by the Keccak core, the SIPO/PISO buffers and the
// samplers of the Kyber co-processor.  RATE_BITS = 1344 is the SHAKE-128
// rate, the widest rate Kyber uses; narrower rates (SHAKE-256 and
// SHA3-256: 1088, SHA3-512: 576) use the low bits of the same block.
package keccak_pkg;
  localparam int unsigned LANE_W     = 64;
  localparam int unsigned STATE_BITS = 1600;
  localparam int unsigned RATE_BITS  = 1344;
  localparam int unsigned RATE_WORDS = RATE_BITS / LANE_W;   // 21
  localparam int unsigned ROUNDS     = 24;

  typedef logic [LANE_W-1:0]     word_t;
  typedef logic [RATE_BITS-1:0]  block_t;
  typedef logic [STATE_BITS-1:0] state_t;
endpackage
