// keccak_core: Keccak-f[1600] permutation, one round per clock, so a full
// permutation takes ROUNDS = 24 cycles.
//
// The 1600-bit state is 25 lanes of 64 bits, lane (x, y) at bits
// 64*(x+5y) +: 64, byte k of the sponge stream at bits 8k +: 8.  A start
// pulse first optionally clears the state (init) and XORs the 1344-bit
// block into the rate part (absorb), then runs the 24 rounds theta, rho,
// pi, chi, iota; done pulses in the cycle after the last round and rate_out
// then holds the first 1344 state bits (the squeeze block).  The host pads
// the message; zero bits above a narrower rate leave the capacity alone.
// The rotation offsets and round constants are derived at elaboration
// from the definitions of the permutation (triangular numbers along the
// (x,y) -> (y,2x+3y) walk and the degree-8 LFSR), not typed in.
// The 24-cycle round-per-clock core follows the source architecture; the
// start/init/absorb interface is this design's choice.
module keccak_core
  import keccak_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,     // begin a permutation (ignored while busy)
  input  logic   init,      // with start: clear the state first
  input  logic   absorb,    // with start: XOR block into the rate first
  input  block_t block,
  output logic   busy,
  output logic   done,      // one-cycle pulse when the permutation is over
  output block_t rate_out
);
  typedef word_t lanes_t [25];
  typedef int    rot_t   [25];
  typedef word_t rc_t    [ROUNDS];

  function automatic rot_t build_rot();
    rot_t r;
    int   x, y, nx;
    r = '{default: 0};
    x = 1;
    y = 0;
    for (int t = 0; t < 24; t++) begin
      r[x + 5*y] = ((t + 1) * (t + 2) / 2) % 64;
      nx = y;
      y  = (2*x + 3*y) % 5;
      x  = nx;
    end
    return r;
  endfunction

  function automatic rc_t build_rc();
    rc_t   rc;
    word_t w;
    logic [7:0] lfsr;
    lfsr = 8'h01;
    for (int i = 0; i < ROUNDS; i++) begin
      w = '0;
      for (int j = 0; j < 7; j++) begin
        w = w | (word_t'(lfsr[0]) << ((1 << j) - 1));
        // x^8 + x^6 + x^5 + x^4 + 1
        lfsr = lfsr[7] ? ((lfsr << 1) ^ 8'h71) : (lfsr << 1);
      end
      rc[i] = w;
    end
    return rc;
  endfunction

  localparam rot_t ROT = build_rot();
  localparam rc_t  RC  = build_rc();

  function automatic word_t rotl(word_t v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic lanes_t round_fn(lanes_t a, word_t rc);
    word_t  c [5], d [5];
    lanes_t b, o;
    for (int x = 0; x < 5; x++)
      c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i%5];
    // rho and pi: B[y, 2x+3y] = rot(A[x, y])
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], ROT[x + 5*y]);
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    o[0] = o[0] ^ rc;   // iota
    return o;
  endfunction

  lanes_t st, st_in, st_next;
  logic [4:0] rnd;

  // state presented to the first round: cleared and/or absorbed
  always_comb begin
    for (int i = 0; i < 25; i++) begin
      st_in[i] = init ? '0 : st[i];
      if (absorb && i < int'(RATE_WORDS)) st_in[i] = st_in[i] ^ block[64*i +: 64];
    end
  end

  assign st_next = round_fn(busy ? st : st_in, RC[busy ? rnd : 5'd0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rnd  <= '0;
      for (int i = 0; i < 25; i++) st[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        st   <= st_next;          // round 0
        rnd  <= 5'd1;
        busy <= 1'b1;
      end else if (busy) begin
        st  <= st_next;
        rnd <= rnd + 5'd1;
        if (rnd == 5'(ROUNDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb
    for (int i = 0; i < int'(RATE_WORDS); i++) rate_out[64*i +: 64] = st[i];
endmodule
