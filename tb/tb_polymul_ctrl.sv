// tb_polymul_ctrl: runs NTT, INTT and PWM commands on the controller alone
// and replays what it issues on a software polynomial: for each read group
// the butterflies selected by dp_mode with the twiddles 17^brv7(dp_tw_idx)
// are applied with % arithmetic.  The replayed NTT must equal the Kyber
// reference NTT and the replayed INTT must undo it, which checks the group
// order, the twiddle indices and the modes.  It also checks that every
// round touches all 256 coefficients, that write-back indices follow the
// reads by 10 (butterfly core) or 6 (point-wise) cycles, the PWM zeta
// index, and the command lengths (300 and 75 cycles).
module tb_polymul_ctrl;
  import ntt_pkg::*;
  logic      clk = 0, rst_n = 0;
  logic      cmd_valid = 0, cmd_ready, busy, done, rd_en, wb_en;
  op_e       cmd_op = OP_NTT, op;
  gidx_t     rd_idx, wb_idx;
  pmc_mode_e dp_mode;
  tidx_t [3:0] dp_tw_idx;
  int checks = 0, failures = 0;
  typedef int poly_t [N];
  poly_t  poly;
  gidx_t  rd_hist [$];
  logic   en_hist [$];
  int     seen [N];

  polymul_ctrl dut (.*);
  always #5 clk = ~clk;

  function automatic int powmod(int b, int e);
    longint r = 1, bb = b;
    while (e > 0) begin
      if (e % 2 == 1) r = r * bb % Q;
      bb = bb * bb % Q;
      e  = e / 2;
    end
    return int'(r);
  endfunction
  function automatic int zeta(tidx_t k);
    return powmod(ZETA, int'(brv7(k)));
  endfunction

  function automatic poly_t ref_ntt(poly_t a);
    int k = 1, z, t;
    for (int len = 128; len >= 2; len /= 2)
      for (int start = 0; start < N; start += 2 * len) begin
        z = powmod(ZETA, int'(brv7(7'(k))));
        k++;
        for (int j = start; j < start + len; j++) begin
          t = z * a[j + len] % Q;
          a[j + len] = (a[j] - t + Q) % Q;
          a[j] = (a[j] + t) % Q;
        end
      end
    return a;
  endfunction

  // software butterflies on poly
  task automatic ct(int ia, int ib, int w);
    int t;
    t = poly[ib] * w % Q;
    poly[ib] = (poly[ia] - t + Q) % Q;
    poly[ia] = (poly[ia] + t) % Q;
  endtask
  task automatic gsb(int ia, int ib, int w);
    int inv2, a, b;
    inv2 = (Q + 1) / 2;
    a = poly[ia];
    b = poly[ib];
    poly[ia] = (a + b) * inv2 % Q;
    poly[ib] = (b - a + Q) % Q * w % Q * inv2 % Q;
  endtask

  // replay: data of the read issued RAM_LAT cycles ago meet dp_mode/dp_tw
  always @(posedge clk) begin
    en_hist.push_back(rd_en);
    rd_hist.push_back(rd_idx);
    if (en_hist.size() > WB_LAT_MAX) begin
      void'(en_hist.pop_front());
      void'(rd_hist.pop_front());
    end
  end
  localparam int WB_LAT_MAX = RAM_LAT + PMC_LAT;

  always @(negedge clk) begin
    int n;
    n = en_hist.size();
    if (n >= RAM_LAT && en_hist[n-RAM_LAT]) begin
      gidx_t g;
      g = rd_hist[n-RAM_LAT];
      for (int l = 0; l < LANES; l++) seen[g[l]]++;
      if (op == OP_PWM) begin
        checks++;
        if (dp_tw_idx[0] != tidx_t'(64 + g[0] / 4)) failures++;
      end else
      case (dp_mode)
        MODE_CT: begin
          ct(g[0], g[2], zeta(dp_tw_idx[0]));
          ct(g[1], g[3], zeta(dp_tw_idx[1]));
          ct(g[0], g[1], zeta(dp_tw_idx[2]));
          ct(g[2], g[3], zeta(dp_tw_idx[3]));
        end
        MODE_GS: begin
          gsb(g[0], g[1], zeta(dp_tw_idx[0]));
          gsb(g[2], g[3], zeta(dp_tw_idx[1]));
          gsb(g[0], g[2], zeta(dp_tw_idx[2]));
          gsb(g[1], g[3], zeta(dp_tw_idx[3]));
        end
        MODE_BYPASS_CT: begin
          ct(g[0], g[2], zeta(dp_tw_idx[2]));
          ct(g[1], g[3], zeta(dp_tw_idx[3]));
        end
        default: begin
          gsb(g[0], g[2], zeta(dp_tw_idx[2]));
          gsb(g[1], g[3], zeta(dp_tw_idx[3]));
        end
      endcase
    end
    // write-back follows the read by the datapath latency
    if (wb_en) begin
      int lat;
      lat = (op == OP_PWM) ? RAM_LAT + PWM_LAT : RAM_LAT + PMC_LAT;
      checks++;
      if (n < lat || !en_hist[n-lat] || rd_hist[n-lat] != wb_idx) begin
        failures++;
        if (failures < 10) $display("FAIL write-back index/timing");
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(op_e o, int rounds, int exp_cycles);
    int cyc = 0;
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk);
    cmd_valid = 1;
    cmd_op = o;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != exp_cycles) begin
      failures++;
      $display("FAIL op %0d: %0d cycles, expected %0d", o, cyc, exp_cycles);
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] != rounds) failures++;
    end
  endtask

  initial begin
    poly_t orig, exp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) orig[i] = int'($urandom % Q);
    poly = orig;
    exp  = ref_ntt(orig);
    run(OP_NTT, 4, 300);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (poly[i] != exp[i]) begin
        failures++;
        if (failures < 10) $display("FAIL NTT [%0d] %0d exp %0d", i, poly[i], exp[i]);
      end
    end
    run(OP_INTT, 4, 300);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (poly[i] != orig[i]) begin
        failures++;
        if (failures < 10) $display("FAIL INTT [%0d] %0d exp %0d", i, poly[i], orig[i]);
      end
    end
    run(OP_PWM, 1, 75);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
