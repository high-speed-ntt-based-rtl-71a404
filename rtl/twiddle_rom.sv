// twiddle_rom: the 128 Kyber twiddle factors, four read ports.
//
// Entry i holds zeta_i * k^-2 mod q with zeta_i = 17^brv7(i) mod q, the
// Kyber ordering in which the forward NTT walks the table upwards and the
// inverse NTT walks it downwards (using w^-i = -w^(n-i), so no second table
// of inverse twiddles is stored).  The k^-2 = 169^-1 factor cancels the k^2
// that K2-RED introduces.  The table is computed at elaboration by a
// constant function, so it synthesises to a ROM (LUTs) with no data file.
// Reads are combinational; the butterfly registers the value.
module twiddle_rom
  import ntt_pkg::*;
(
  input  tidx_t [3:0] idx,
  output coef_t [3:0] w
);
  typedef coef_t table_t [128];

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < 128; i++) begin
      int unsigned p, z;
      p = 1;
      z = 0;
      // 17^brv7(i) mod q by repeated multiplication
      for (int e = 0; e < 128; e++)
        if (e < int'(brv7(7'(i)))) p = (p * ZETA) % Q;
      z = (p * KINV2) % Q;
      t[i] = coef_t'(z);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb
    for (int p = 0; p < 4; p++) w[p] = TABLE[idx[p]];
endmodule
