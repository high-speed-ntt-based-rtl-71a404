// tb_kyber_matvec: the matrix-vector workload of Kyber key generation,
// one row of t_hat = A_hat o s_hat, for the module ranks k = 2, 3 and 4
// (Kyber-512, -768 and -1024), run on the co-processor at its default size.
// For each i < k:
//   s_i     = CBD_eta1(SHAKE-256(sigma || i))   -> slot 1 (eta1 = 3 for k = 2,
//                                                  else 2), then NTT in place
//   a_hat_i = Parse(SHAKE-128(rho || i || 0))   -> slot 0
//   a_hat_i o s_hat_i                           -> slot 2 (PWM)
// The host reads each product back and accumulates the row sum, since the
// co-processor has no polynomial addition; the sum is written to slot 3 and
// transformed back with the INTT.  The result must equal
// sum_i INTT(a_hat_i) * s_i mod (X^256 + 1), computed in software with a
// reference inverse NTT and schoolbook products.  The testbench also checks
// every multiplier command length and prints the cycles each row took.
// rho = 00..1F, sigma = 20..3F.
module tb_kyber_matvec;
  import ntt_pkg::*;
  import keccak_pkg::*;
  logic   clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge before the first clock edge
  logic   hs_in_valid = 0, hs_cmd_valid = 0, hs_cmd_ready, hs_cmd_init = 0, hs_cmd_eta3 = 0;
  word_t  hs_in_data = '0, hs_out_data;
  logic [1:0] hs_cmd = 0, hs_slot = 0;
  logic [$clog2(RATE_WORDS+1)-1:0] hs_rate_words = 21;
  logic   hs_done, hs_out_valid, hs_out_ready = 0;
  logic   pm_cmd_valid = 0, pm_cmd_ready, pm_done;
  op_e    pm_cmd_op = OP_NTT;
  logic [1:0] pm_cmd_src0 = 0, pm_cmd_src1 = 0, pm_cmd_dst = 0, host_slot = 0;
  logic   host_we = 0, host_re = 0, host_rvalid;
  logic [AW-1:0] host_addr = 0;
  group_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  longint cycle = 0;
  word_t words [$];
  typedef int poly_t [N];
  localparam longint QS = longint'(Q);

  kyber_coproc dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int powmod(int b, int e);
    longint r = 1, bb = b;
    while (e > 0) begin
      if (e % 2 == 1) r = r * bb % Q;
      bb = bb * bb % Q;
      e  = e / 2;
    end
    return int'(r);
  endfunction

  // Kyber inverse NTT (reference order), including the 1/128 factor
  function automatic poly_t ref_intt(poly_t a);
    int k = 127, z, t;
    for (int len = 2; len <= 128; len *= 2)
      for (int start = 0; start < N; start += 2 * len) begin
        z = powmod(ZETA, int'(brv7(7'(k))));
        k--;
        for (int j = start; j < start + len; j++) begin
          t = a[j];
          a[j] = (t + a[j + len]) % Q;
          a[j + len] = (a[j + len] - t + Q) % Q * z % Q;
        end
      end
    for (int i = 0; i < N; i++) a[i] = int'(longint'(a[i]) * powmod(128, Q - 2) % Q);
    return a;
  endfunction

  function automatic poly_t ref_mul(poly_t a, poly_t b);
    poly_t c;
    longint acc [N];
    for (int i = 0; i < N; i++) acc[i] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (i + j < N) acc[i + j] += longint'(a[i]) * b[j];
        else           acc[i + j - N] -= longint'(a[i]) * b[j];
    for (int i = 0; i < N; i++) c[i] = int'(((acc[i] % QS) + QS) % QS);
    return c;
  endfunction

  task automatic hs_issue(logic [1:0] c, logic init, logic e3, int slot);
    @(negedge clk);
    hs_cmd_valid = 1; hs_cmd = c; hs_cmd_init = init; hs_cmd_eta3 = e3; hs_slot = 2'(slot);
    @(negedge clk);
    hs_cmd_valid = 0;
    while (!hs_done) begin
      hs_out_ready = 1;
      @(posedge clk);
      if (hs_out_valid) words.push_back(hs_out_data);
      @(negedge clk);
    end
    hs_out_ready = 0;
  endtask

  // absorb the 32 bytes first .. first+31, then b32 and, if n_extra = 2,
  // b33; SHAKE padding, rate r bytes
  task automatic absorb(int first, int n_extra, byte b32, byte b33, int r);
    block_t b = '0;
    for (int k = 0; k < 32; k++) b[8*k +: 8] = 8'(first + k);
    b[8*32 +: 8] = b32;
    if (n_extra == 2) b[8*33 +: 8] = b33;
    b[8*(32+n_extra) +: 8] = 8'h1F;
    b[8*(r-1) +: 8] = b[8*(r-1) +: 8] | 8'h80;
    hs_rate_words = 5'(r / 8);
    for (int w = 0; w < r / 8; w++) begin
      @(negedge clk);
      hs_in_valid = 1;
      hs_in_data  = b[64*w +: 64];
    end
    @(negedge clk);
    hs_in_valid = 0;
    hs_issue(2'd0, 1, 0, 0);
  endtask

  task automatic pm_run(op_e op, int s0, int s1, int d, int exp_cycles);
    int cyc = 0;
    @(negedge clk);
    pm_cmd_valid = 1; pm_cmd_op = op;
    pm_cmd_src0 = 2'(s0); pm_cmd_src1 = 2'(s1); pm_cmd_dst = 2'(d);
    @(negedge clk);
    pm_cmd_valid = 0;
    while (!pm_done) begin
      @(negedge clk);
      cyc++;
    end
    chk(cyc == exp_cycles, "multiplier command length");
  endtask

  task automatic read_poly(int slot, output poly_t a);
    int got = 0;
    fork
      begin
        for (int w = 0; w < WORDS; w++) begin
          @(negedge clk);
          host_re = 1; host_slot = 2'(slot); host_addr = AW'(w);
        end
        @(negedge clk);
        host_re = 0;
      end
      while (got < WORDS) begin
        @(posedge clk);
        #1;
        if (host_rvalid) begin
          for (int l = 0; l < LANES; l++) a[4*got + l] = int'(host_rdata[l]);
          got++;
        end
      end
    join
  endtask

  task automatic write_poly(int slot, poly_t a);
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      host_we = 1; host_slot = 2'(slot); host_addr = AW'(w);
      for (int l = 0; l < LANES; l++) host_wdata[l] = coef_t'(a[4*w + l]);
    end
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic run_row(int kk);
    poly_t ahat, s, p, acc, t, ex, m;
    longint t0;
    int bad;
    for (int i = 0; i < N; i++) begin acc[i] = 0; ex[i] = 0; end
    t0 = cycle;
    for (int i = 0; i < kk; i++) begin
      absorb(32, 1, byte'(i), 8'h00, 136);
      hs_issue(2'd3, 0, kk == 2, 1);
      read_poly(1, s);
      bad = 0;
      for (int c = 0; c < N; c++)
        if (s[c] > (kk == 2 ? 3 : 2) && s[c] < int'(Q) - (kk == 2 ? 3 : 2)) bad++;
      chk(bad == 0, "binomial sample range");
      pm_run(OP_NTT, 1, 1, 1, 300);
      absorb(0, 2, byte'(i), 8'h00, 168);
      hs_issue(2'd2, 0, 0, 0);
      read_poly(0, ahat);
      pm_run(OP_PWM, 0, 1, 2, 75);
      read_poly(2, p);
      for (int c = 0; c < N; c++) acc[c] = (acc[c] + p[c]) % int'(Q);
      m = ref_mul(ref_intt(ahat), s);
      for (int c = 0; c < N; c++) ex[c] = (ex[c] + m[c]) % int'(Q);
    end
    write_poly(3, acc);
    pm_run(OP_INTT, 3, 3, 3, 300);
    read_poly(3, t);
    $display("k=%0d: one row of A*s took %0d cycles", kk, cycle - t0);
    bad = 0;
    for (int c = 0; c < N; c++) begin
      checks++;
      if (t[c] != ex[c]) begin
        failures++;
        if (bad++ < 5) $display("FAIL k=%0d t[%0d] got %0d exp %0d", kk, c, t[c], ex[c]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int kk = 2; kk <= 4; kk++) run_row(kk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
