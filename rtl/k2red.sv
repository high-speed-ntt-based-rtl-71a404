// k2red: K2-RED modular reduction for q = k*2^m + 1 = 13*2^8 + 1 = 3329.
//
// The input C (up to 25 bits: one 12x12 product, or the sum of two) is cut
// into C0 = C[7:0], C1 = C[15:8], C2 = C[24:16].  Because 2^8 = -k^-1 (mod q),
// k^2*C = k^2*C0 - k*C1 + C2 (mod q): the two-fold KRED step.  The
// multiplications by the constants k^2 = 169 and k = 13 are shift-and-add,
// so the unit uses no multiplier.  The intermediate value lies in
// [-3315, 43606]; adding q and four conditional subtractions of 8q, 4q, 2q
// and q bring it into [0, q), so the output is a fully reduced 12-bit
// coefficient.  Callers pre-scale their constants by k^-2 to cancel the k^2.
//
// Purely combinational; the butterfly and point-wise units register its
// output.  The two-fold KRED identity follows the published algorithm; the
// final correction by conditional subtractions is this design's choice.
module k2red
  import ntt_pkg::*;
(
  input  logic [24:0] c,   // value to reduce, c < 2^25
  output coef_t       r    // k^2 * c mod q, in [0, q)
);
  logic [8:0]         c0, c1;
  logic [8:0]         c2;
  logic signed [17:0] t0, t1, t2, t3, t4;

  // zero-extend to the signed working width
  function automatic logic signed [17:0] s18(logic [8:0] v);
    return signed'({9'b0, v});
  endfunction

  assign c0 = {1'b0, c[7:0]};
  assign c1 = {1'b0, c[15:8]};
  assign c2 = c[24:16];

  always_comb begin
    // 169*C0 - 13*C1 + C2 + q  (always positive, below 16q)
    t0 = (s18(c0) <<< 7) + (s18(c0) <<< 5) + (s18(c0) <<< 3) + s18(c0)
       - (s18(c1) <<< 3) - (s18(c1) <<< 2) - s18(c1)
       + s18(c2) + 18'(Q);
    t1 = (t0 >= 18'(8*Q)) ? t0 - 18'(8*Q) : t0;
    t2 = (t1 >= 18'(4*Q)) ? t1 - 18'(4*Q) : t1;
    t3 = (t2 >= 18'(2*Q)) ? t2 - 18'(2*Q) : t2;
    t4 = (t3 >= 18'(Q))   ? t3 - 18'(Q)   : t3;
    r  = coef_t'(t4);
  end
endmodule
