// tb_kyber_coproc: end-to-end run of the co-processor at its default size,
// one step of Kyber key generation:
//   a_hat = Parse(SHAKE-128(rho || 0 || 0))      -> slot 0 (rejection sampler)
//   s     = CBD_3(SHAKE-256(sigma || 0))          -> slot 1 (binomial sampler)
//   t     = INTT(a_hat o NTT(s))                  -> slot 2
// rho = 00..1F, sigma = 20..3F.  The testbench reads a_hat and s back,
// checks their ranges, computes the expected t as INTT(a_hat) * s
// mod (X^256 + 1) with its own software INTT and schoolbook product, and
// checks one SHAKE-128 squeeze against a reference value.  It also
// checks command lengths and hashing overlapping a multiplier command,
// and counts every mechanism: all four butterfly-core modes, point-wise
// multiplication, both samplers, Keccak permuting while a sampler consumes.
module tb_kyber_coproc;
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
  int n_mode [4], n_pwm, n_rej, n_cbd, n_overlap, n_hash_during_pm;
  word_t words [$];
  typedef int poly_t [N];
  localparam longint QS = longint'(Q);
  // first output word of SHAKE-128(00 01 .. 1F 00 00), standard SHAKE value
  localparam word_t RHO_W0 = 64'h759a77feaaf8a1e1;

  kyber_coproc dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_pm.rd_en) begin
      if (dut.u_pm.op == OP_PWM) n_pwm++;
      else n_mode[dut.u_pm.u_ctrl.mode]++;
    end
    if (dut.u_hs.rej_we) n_rej++;
    if (dut.u_hs.cbd_we) n_cbd++;
    if (dut.u_hs.kc_busy && dut.u_hs.piso_valid && dut.u_hs.piso_ready) n_overlap++;
    if (dut.u_hs.kc_busy && dut.u_pm.busy) n_hash_during_pm++;
  end

  initial begin
    repeat (100000) @(posedge clk);
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

  // absorb first .. first+31, then the bytes in extra; pad, rate r bytes
  task automatic absorb(int first, int n_extra, int r);
    block_t b = '0;
    for (int k = 0; k < 32; k++) b[8*k +: 8] = 8'(first + k);
    for (int k = 0; k < n_extra; k++) b[8*(32+k) +: 8] = 8'h00;
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

  initial begin
    poly_t ahat, s, t, ex;
    int bad;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // a_hat = Parse(SHAKE-128(rho || 0 || 0))
    absorb(0, 2, 168);
    words.delete();
    hs_issue(2'd1, 0, 0, 0);
    chk(words.size() == 21, "squeeze length");
    chk(words[0] == RHO_W0, "SHAKE-128(rho || 0 || 0) word 0");
    absorb(0, 2, 168);
    hs_issue(2'd2, 0, 0, 0);
    // s = CBD_3(SHAKE-256(sigma || 0))
    absorb(32, 1, 136);
    hs_issue(2'd3, 0, 1, 1);
    read_poly(0, ahat);
    read_poly(1, s);
    bad = 0;
    for (int i = 0; i < N; i++)
      if (ahat[i] >= int'(Q) || (s[i] > 3 && s[i] < int'(Q) - 3)) bad++;
    chk(bad == 0, "sample ranges");
    // t = INTT(a_hat o NTT(s)); hash the next block meanwhile
    pm_run(OP_NTT, 1, 1, 1, 300);
    fork
      pm_run(OP_PWM, 0, 1, 2, 75);
      begin
        absorb(64, 1, 136);
      end
    join
    pm_run(OP_INTT, 2, 2, 2, 300);
    read_poly(2, t);
    ex = ref_mul(ref_intt(ahat), s);
    bad = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (t[i] != ex[i]) begin
        failures++;
        if (bad++ < 5) $display("FAIL t[%0d] got %0d exp %0d", i, t[i], ex[i]);
      end
    end
    for (int m = 0; m < 4; m++) chk(n_mode[m] > 0, "butterfly-core mode used");
    chk(n_pwm > 0, "point-wise multiplication used");
    chk(n_rej == 64, "rejection sampler wrote 64 groups");
    chk(n_cbd == 64, "binomial sampler wrote 64 groups");
    chk(n_overlap > 0, "Keccak permuted while a sampler consumed");
    chk(n_hash_during_pm > 0, "hashing overlapped a multiplier command");
    $display("modes CT=%0d GS=%0d BYP_CT=%0d BYP_GS=%0d pwm=%0d rej=%0d cbd=%0d overlap=%0d hash||pm=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_pwm, n_rej, n_cbd, n_overlap, n_hash_during_pm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
