// ntt_pkg: constants and types shared by the Kyber polynomial-multiplication
// accelerator.
//
// Kyber works in Z_q[X]/(X^256+1) with q = 3329 = 13*2^8 + 1.  The prime has
// the form k*2^m + 1 (k = 13, m = 8) that the K2-RED reduction relies on.
// A polynomial is processed four coefficients at a time ("a group"), so the
// memory and datapath ports are 4-lane arrays of 12-bit coefficients.
// The forward transform is the 7-layer Kyber NTT (17 is the primitive 256-th
// root of unity); it leaves 128 degree-1 residues, which the point-wise stage
// multiplies pairwise.
package ntt_pkg;

  localparam int unsigned Q      = 3329;
  localparam int unsigned QW     = 12;     // coefficient width
  localparam int unsigned K      = 13;     // q = K*2^M + 1
  localparam int unsigned M      = 8;
  localparam int unsigned N      = 256;    // polynomial length
  localparam int unsigned LANES  = 4;      // coefficients per memory access
  localparam int unsigned WORDS  = N / LANES;
  localparam int unsigned AW     = $clog2(WORDS);   // per-bank address width
  localparam int unsigned IW     = $clog2(N);       // coefficient index width
  localparam int unsigned ZETA   = 17;
  // K2-RED returns k^2*C mod q, so constants fed to a multiplier that is
  // followed by K2-RED are stored multiplied by k^-2 = 169^-1 mod q.
  localparam int unsigned KINV2  = 2285;   // 169^-1 mod q
  localparam int unsigned KINV4  = 1353;   // 169^-2 mod q
  localparam int unsigned ROW_LAT = 4;     // butterfly pipeline depth
  localparam int unsigned PMC_LAT = 2*ROW_LAT;
  localparam int unsigned RAM_LAT = 2;     // read latency of poly_ram
  localparam int unsigned PWM_LAT = 4;     // point-wise unit pipeline depth

  typedef logic [QW-1:0] coef_t;
  typedef coef_t [LANES-1:0] group_t;
  typedef logic [IW-1:0] cidx_t;
  typedef cidx_t [LANES-1:0] gidx_t;
  typedef logic [6:0] tidx_t;             // twiddle index 0..127

  // Butterfly-core configuration.  CT and GS merge two layers; the two
  // bypass modes run only the second butterfly row (odd layer count).
  typedef enum logic [1:0] {
    MODE_CT        = 2'd0,
    MODE_GS        = 2'd1,
    MODE_BYPASS_CT = 2'd2,
    MODE_BYPASS_GS = 2'd3
  } pmc_mode_e;

  typedef enum logic [1:0] {
    OP_NTT  = 2'd0,
    OP_INTT = 2'd1,
    OP_PWM  = 2'd2
  } op_e;

  // (a + b) mod q for a, b < q
  function automatic coef_t mod_add(coef_t a, coef_t b);
    logic [QW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= (QW+1)'(Q)) s = s - (QW+1)'(Q);
    return coef_t'(s);
  endfunction

  // (a - b) mod q for a, b < q
  function automatic coef_t mod_sub(coef_t a, coef_t b);
    logic [QW:0] s;
    s = {1'b0, a} - {1'b0, b};
    if (s[QW]) s = s + (QW+1)'(Q);
    return coef_t'(s);
  endfunction

  // a / 2 mod q for a < q: (a + q*a[0]) >> 1
  function automatic coef_t mod_half(coef_t a);
    logic [QW:0] s;
    s = {1'b0, a} + (a[0] ? (QW+1)'(Q) : '0);
    return coef_t'(s >> 1);
  endfunction

  // 7-bit bit reversal, used for the Kyber twiddle order
  function automatic logic [6:0] brv7(logic [6:0] x);
    logic [6:0] r;
    for (int i = 0; i < 7; i++) r[i] = x[6-i];
    return r;
  endfunction

  // Bank of coefficient i in the skewed four-bank memory: the sum of its
  // base-4 digits mod 4.  Any four coefficients that differ only in one
  // base-4 digit fall into four different banks.
  function automatic logic [1:0] bank_of(cidx_t i);
    logic [1:0] b;
    b = '0;
    for (int d = 0; d < IW/2; d++) b = b + i[2*d +: 2];
    return b;
  endfunction

endpackage
