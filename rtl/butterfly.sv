// butterfly: one reconfigurable Cooley-Tukey / Gentleman-Sande butterfly
// over Z_3329, built as a 4-stage pipeline.
//
//   CT (gs = 0):  a' = a + w*b,        b' = a - w*b
//   GS (gs = 1):  a' = (a + b)/2,      b' = (b - a)*w/2
//   bypass = 1:   a' = a,              b' = b   (same 4-cycle delay)
//
// The twiddle input is the stored table value w*k^-2 (k^2 = 169); the
// K2-RED unit after the 12x12 multiplier multiplies by k^2 again, so the
// product comes out as the true w*b.  The halving in GS mode spreads the
// n^-1 = 2^-7 scaling of the inverse transform over its seven layers, and
// the GS difference is taken as (b - a) so that the forward twiddle table
// can be reused through the symmetry w^-i = -w^(n-i).
//
// Stages: 1 register operands (add/sub for GS), 2 multiply, 3 K2-RED,
// 4 final add/sub or halving.  Outputs appear exactly ROW_LAT = 4 cycles
// after the inputs; the mode bits travel with the data, so the
// configuration may change every cycle.  No stall, no reset needed: the
// controller tracks which pipeline slots hold valid data.
module butterfly
  import ntt_pkg::*;
(
  input  logic  clk,
  input  logic  gs,       // 0: CT, 1: GS
  input  logic  bypass,   // pass a, b through unchanged
  input  coef_t a,
  input  coef_t b,
  input  coef_t w,        // twiddle, pre-scaled by k^-2
  output coef_t out_a,
  output coef_t out_b
);
  // stage 1
  coef_t       s1_a, s1_m, s1_w;
  logic        s1_gs, s1_byp;
  coef_t       s1_pb;
  // stage 2
  logic [23:0] s2_p;
  coef_t       s2_a, s2_pb;
  logic        s2_gs, s2_byp;
  // stage 3
  coef_t       s3_t, s3_a, s3_pb;
  logic        s3_gs, s3_byp;
  coef_t       red;

  always_ff @(posedge clk) begin
    // 1: GS forms a+b and b-a; CT passes a and multiplies b
    s1_gs  <= gs;
    s1_byp <= bypass;
    s1_w   <= w;
    s1_pb  <= b;
    if (gs && !bypass) begin
      s1_a <= mod_add(a, b);
      s1_m <= mod_sub(b, a);
    end else begin
      s1_a <= a;
      s1_m <= b;
    end
    // 2: multiply
    s2_p   <= 24'(s1_m) * 24'(s1_w);
    s2_a   <= s1_a;
    s2_pb  <= s1_pb;
    s2_gs  <= s1_gs;
    s2_byp <= s1_byp;
    // 3: reduce
    s3_t   <= red;
    s3_a   <= s2_a;
    s3_pb  <= s2_pb;
    s3_gs  <= s2_gs;
    s3_byp <= s2_byp;
    // 4: combine
    if (s3_byp) begin
      out_a <= s3_a;
      out_b <= s3_pb;
    end else if (s3_gs) begin
      out_a <= mod_half(s3_a);
      out_b <= mod_half(s3_t);
    end else begin
      out_a <= mod_add(s3_a, s3_t);
      out_b <= mod_sub(s3_a, s3_t);
    end
  end

  k2red u_red (.c({1'b0, s2_p}), .r(red));
endmodule
