// pmc: the polynomial multiplication core, a 2x2 array of reconfigurable
// butterflies that performs two NTT/INTT layers on a group of four
// coefficients x0..x3 = f[j], f[j+s], f[j+2s], f[j+3s] per cycle.
//
//   MODE_CT         row 1: BF0(x0,x2) BF1(x1,x3)   (layer of distance 2s)
//                   row 2: BF2(y0,y1) BF3(y2,y3)   (layer of distance s)
//   MODE_GS         row 1: BF0(x0,x1) BF1(x2,x3)   (layer of distance s)
//                   row 2: BF2(y0,y2) BF3(y1,y3)   (layer of distance 2s)
//   MODE_BYPASS_*   row 1 passes its inputs; row 2 runs CT or GS
//                   butterflies on (x0,x2) and (x1,x3) (a single layer of
//                   distance 2s, used for the odd seventh Kyber layer).
//
// With these wirings the second row is connected the same way in every
// mode (BF2 takes both "a" outputs of row 1, BF3 both "b" outputs); only the
// row-1 input order and the output order are switched.  CT consumes data
// in normal order and leaves the bit-reversed NTT order; GS undoes it, so no
// bit-reversal pass is needed.
//
// Twiddles tw[0..3] belong to BF0..BF3 and are presented together with x;
// the core delays tw[2..3] and the mode to meet the data at row 2.  The
// result appears PMC_LAT = 8 cycles after the input, one group per cycle.
module pmc
  import ntt_pkg::*;
(
  input  logic      clk,
  input  pmc_mode_e mode,
  input  group_t    x,
  input  group_t    tw,
  output group_t    z
);
  pmc_mode_e mode_d [ROW_LAT];
  coef_t     tw2_d  [ROW_LAT];
  coef_t     tw3_d  [ROW_LAT];
  pmc_mode_e mode_r2, mode_out;
  coef_t     r1a0, r1b0, r1a1, r1b1;   // row-1 inputs
  coef_t     y0a, y0b, y1a, y1b;       // row-1 outputs
  coef_t     z2a, z2b, z3a, z3b;       // row-2 outputs
  logic      gs_r1, gs_r2, byp_r1;

  // row-1 input ordering
  always_comb begin
    gs_r1  = (mode != MODE_CT);
    byp_r1 = (mode == MODE_BYPASS_CT) || (mode == MODE_BYPASS_GS);
    if (mode == MODE_CT) begin
      r1a0 = x[0]; r1b0 = x[2]; r1a1 = x[1]; r1b1 = x[3];
    end else begin
      r1a0 = x[0]; r1b0 = x[1]; r1a1 = x[2]; r1b1 = x[3];
    end
  end

  butterfly u_bf0 (.clk, .gs(gs_r1), .bypass(byp_r1), .a(r1a0), .b(r1b0),
                   .w(tw[0]), .out_a(y0a), .out_b(y0b));
  butterfly u_bf1 (.clk, .gs(gs_r1), .bypass(byp_r1), .a(r1a1), .b(r1b1),
                   .w(tw[1]), .out_a(y1a), .out_b(y1b));

  // delay mode and row-2 twiddles by one butterfly latency
  always_ff @(posedge clk) begin
    mode_d[0] <= mode;
    tw2_d[0]  <= tw[2];
    tw3_d[0]  <= tw[3];
    for (int i = 1; i < ROW_LAT; i++) begin
      mode_d[i] <= mode_d[i-1];
      tw2_d[i]  <= tw2_d[i-1];
      tw3_d[i]  <= tw3_d[i-1];
    end
  end
  assign mode_r2 = mode_d[ROW_LAT-1];
  assign gs_r2   = (mode_r2 == MODE_GS) || (mode_r2 == MODE_BYPASS_GS);

  butterfly u_bf2 (.clk, .gs(gs_r2), .bypass(1'b0), .a(y0a), .b(y1a),
                   .w(tw2_d[ROW_LAT-1]), .out_a(z2a), .out_b(z2b));
  butterfly u_bf3 (.clk, .gs(gs_r2), .bypass(1'b0), .a(y0b), .b(y1b),
                   .w(tw3_d[ROW_LAT-1]), .out_a(z3a), .out_b(z3b));

  // mode again delayed to the output of row 2
  pmc_mode_e mode_o_d [ROW_LAT];
  always_ff @(posedge clk) begin
    mode_o_d[0] <= mode_r2;
    for (int i = 1; i < ROW_LAT; i++) mode_o_d[i] <= mode_o_d[i-1];
  end
  assign mode_out = mode_o_d[ROW_LAT-1];

  always_comb begin
    if (mode_out == MODE_CT) begin
      z[0] = z2a; z[1] = z2b; z[2] = z3a; z[3] = z3b;
    end else begin
      z[0] = z2a; z[1] = z3a; z[2] = z2b; z[3] = z3b;
    end
  end
endmodule
