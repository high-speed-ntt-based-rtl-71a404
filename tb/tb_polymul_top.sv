// tb_polymul_top: end-to-end test of the accelerator at its default size.
//
// For several random polynomial pairs f, g it loads f and g through the
// host port, runs NTT on both and compares the memory with a software Kyber
// NTT (% arithmetic, powers of 17 computed here), multiplies them point-wise,
// runs the INTT, and compares the result with the schoolbook product
// f*g mod (X^256 + 1).  It also checks INTT(NTT(f)) = f, the cycle count of
// each command (300 cycles for NTT/INTT, 75 for PWM, from issue to done)
// and that every butterfly-core mode, the point-wise unit, the drain
// between rounds and host reads and writes all occurred.
module tb_polymul_top;
  import ntt_pkg::*;
  logic   clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a reset edge before the first clock edge
  logic   cmd_valid = 0, cmd_ready, done;
  op_e    cmd_op = OP_NTT;
  logic [1:0] cmd_src0 = 0, cmd_src1 = 0, cmd_dst = 0, host_slot = 0;
  logic   host_we = 0, host_re = 0, host_rvalid;
  logic [AW-1:0] host_addr = 0;
  group_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  int n_mode [4], n_pwm, n_drain, n_hw, n_hr;

  polymul_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  always @(posedge clk) begin
    if (dut.rd_en) begin
      if (dut.op == OP_PWM) n_pwm++;
      else n_mode[dut.u_ctrl.mode]++;
    end
    if (dut.u_ctrl.state == dut.u_ctrl.S_DRAIN && !dut.u_ctrl.inflight) n_drain++;
    if (host_we && !dut.busy) n_hw++;
    if (host_rvalid) n_hr++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef int poly_t [N];
  localparam longint QS = longint'(Q);   // signed modulus for signed sums

  function automatic int powmod(int b, int e);
    longint r = 1, bb = b;
    while (e > 0) begin
      if (e % 2 == 1) r = r * bb % Q;
      bb = bb * bb % Q;
      e  = e / 2;
    end
    return int'(r);
  endfunction

  function automatic poly_t ref_ntt(poly_t a);
    int k = 1, zeta, t;
    for (int len = 128; len >= 2; len /= 2)
      for (int start = 0; start < N; start += 2 * len) begin
        zeta = powmod(ZETA, int'(brv7(7'(k))));
        k++;
        for (int j = start; j < start + len; j++) begin
          t = zeta * a[j + len] % Q;
          a[j + len] = (a[j] - t + Q) % Q;
          a[j] = (a[j] + t) % Q;
        end
      end
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

  function automatic poly_t ref_pwm(poly_t a, poly_t b);
    poly_t  c;
    longint z;
    for (int w = 0; w < WORDS; w++)
      for (int h = 0; h < 2; h++) begin
        int i = 4 * w + 2 * h;
        z = powmod(ZETA, int'(brv7(7'(64 + w))));
        if (h == 1) z = Q - z;
        c[i]     = int'((longint'(a[i]) * b[i] + longint'(a[i+1]) * b[i+1] % Q * z) % Q);
        c[i + 1] = int'((longint'(a[i]) * b[i+1] + longint'(a[i+1]) * b[i]) % Q);
      end
    return c;
  endfunction

  task automatic write_poly(int slot, poly_t a);
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      host_we   = 1;
      host_slot = 2'(slot);
      host_addr = AW'(w);
      for (int l = 0; l < LANES; l++) host_wdata[l] = coef_t'(a[4*w + l]);
    end
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic read_poly(int slot, output poly_t a);
    int got = 0;
    fork
      begin
        for (int w = 0; w < WORDS; w++) begin
          @(negedge clk);
          host_re   = 1;
          host_slot = 2'(slot);
          host_addr = AW'(w);
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

  task automatic run_cmd(op_e op, int s0, int s1, int d, int exp_cycles);
    int cyc = 0;
    @(negedge clk);
    cmd_valid = 1;
    cmd_op    = op;
    cmd_src0  = 2'(s0);
    cmd_src1  = 2'(s1);
    cmd_dst   = 2'(d);
    @(negedge clk);
    cmd_valid = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != exp_cycles) begin
      failures++;
      $display("FAIL op %0d took %0d cycles, expected %0d", op, cyc, exp_cycles);
    end
  endtask

  task automatic compare(string what, poly_t got, poly_t exp);
    int bad = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        if (bad++ < 4) $display("FAIL %s [%0d] got %0d exp %0d d %0d", what, i, got[i], exp[i], (got[i]-exp[i]+Q)%Q);
      end
    end
  endtask

  initial begin
    poly_t f, g, fh, gh, res, ex;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      for (int i = 0; i < N; i++) begin
        f[i] = (trial == 0 && i > 0) ? 0 : int'($urandom % Q);
        g[i] = int'($urandom % Q);
      end
      if (trial == 0) f[1] = 1;    // f = c + X: easy to debug
      write_poly(0, f);
      write_poly(1, g);
      read_poly(1, res);
      compare("load g", res, g);
      read_poly(0, res);
      compare("load f", res, f);
      run_cmd(OP_NTT, 0, 0, 0, 300);
      run_cmd(OP_NTT, 1, 1, 1, 300);
      read_poly(0, fh);
      compare("NTT(f)", fh, ref_ntt(f));
      read_poly(1, gh);
      compare("NTT(g)", gh, ref_ntt(g));
      run_cmd(OP_PWM, 0, 1, 2, 75);
      read_poly(2, res);
      compare("PWM", res, ref_pwm(fh, gh));
      run_cmd(OP_INTT, 2, 2, 2, 300);
      read_poly(2, res);
      ex = ref_mul(f, g);
      compare("f*g", res, ex);
      run_cmd(OP_INTT, 0, 0, 0, 300);
      read_poly(0, res);
      compare("INTT(NTT(f))", res, f);
    end
    // every mechanism must have happened
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL mode %0d never used", m); end
    end
    checks++; if (n_pwm == 0)   begin failures++; $display("FAIL no PWM");   end
    checks++; if (n_drain == 0) begin failures++; $display("FAIL no drain"); end
    checks++; if (n_hw == 0 || n_hr == 0) begin failures++; $display("FAIL no host access"); end
    $display("modes CT=%0d GS=%0d BYP_CT=%0d BYP_GS=%0d pwm=%0d drains=%0d host w/r=%0d/%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_pwm, n_drain, n_hw, n_hr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
