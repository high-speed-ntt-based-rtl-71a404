// pwm_unit: point-wise multiplication of two polynomials in the Kyber NTT
// domain, one group of four coefficients per cycle.
//
// After the 7-layer NTT a polynomial is 128 residues of degree 1.  A group
// (a0..a3), (b0..b3) holds two of them, modulo X^2 - zeta and X^2 + zeta:
//   r0 = a0*b0 + zeta*a1*b1,   r1 = a0*b1 + a1*b0      (lanes 0, 1; +zeta)
//   r2, r3 likewise with -zeta                         (lanes 2, 3)
// zs is the twiddle-table entry zeta*k^-2 (k^2 = 169).  All reductions use
// K2-RED, which multiplies by k^2; the last stage multiplies by k^-4 to
// remove the remaining factor.  Pipeline, 4 cycles, no stall:
//   1 products a0*b0, a1*b1, a0*b1 + a1*b0
//   2 K2-RED of the three (each now times k^2)
//   3 zeta*a1*b1 through a second multiply + K2-RED, added to a0*b0
//   4 both results times k^-4, K2-RED
// The operation and the residue order come from the Kyber algorithm; the
// pipeline split and the k^-4 correction are this design's choices.
module pwm_unit
  import ntt_pkg::*;
(
  input  logic   clk,
  input  group_t a,
  input  group_t b,
  input  coef_t  zs,     // zeta * k^-2 for lanes 0,1; negated for lanes 2,3
  output group_t r
);
  logic [23:0] s1_p00 [2], s1_p11 [2];
  logic [24:0] s1_pc  [2];
  coef_t       s1_z   [2];
  coef_t       s2_x [2], s2_u [2], s2_y [2], s2_z [2];
  coef_t       s3_s [2], s3_y [2];
  coef_t       red_x [2], red_u [2], red_y [2], red_v [2], red_r0 [2], red_r1 [2];

  always_ff @(posedge clk) begin
    for (int h = 0; h < 2; h++) begin
      s1_p00[h] <= 24'(a[2*h])   * 24'(b[2*h]);
      s1_p11[h] <= 24'(a[2*h+1]) * 24'(b[2*h+1]);
      s1_pc[h]  <= 25'(24'(a[2*h]) * 24'(b[2*h+1])) + 25'(24'(a[2*h+1]) * 24'(b[2*h]));
      s1_z[h]   <= (h == 0) ? zs : mod_sub('0, zs);
      s2_x[h]   <= red_x[h];
      s2_u[h]   <= red_u[h];
      s2_y[h]   <= red_y[h];
      s2_z[h]   <= s1_z[h];
      s3_s[h]   <= mod_add(s2_x[h], red_v[h]);
      s3_y[h]   <= s2_y[h];
      r[2*h]    <= red_r0[h];
      r[2*h+1]  <= red_r1[h];
    end
  end

  for (genvar h = 0; h < 2; h++) begin : g_half
    logic [23:0] uz, s_k, y_k;
    assign uz  = 24'(s2_u[h]) * 24'(s2_z[h]);
    assign s_k = 24'(s3_s[h]) * 24'(KINV4);
    assign y_k = 24'(s3_y[h]) * 24'(KINV4);
    k2red u_rx  (.c({1'b0, s1_p00[h]}), .r(red_x[h]));
    k2red u_ru  (.c({1'b0, s1_p11[h]}), .r(red_u[h]));
    k2red u_ry  (.c(s1_pc[h]),          .r(red_y[h]));
    k2red u_rv  (.c({1'b0, uz}),        .r(red_v[h]));
    k2red u_rr0 (.c({1'b0, s_k}),       .r(red_r0[h]));
    k2red u_rr1 (.c({1'b0, y_k}),       .r(red_r1[h]));
  end
endmodule
