// tb_pwm_unit: random operand groups and zetas every cycle; each result,
// exactly four cycles later, is compared with the two degree-1 products
// modulo X^2 - zeta and X^2 + zeta computed with % arithmetic.
module tb_pwm_unit;
  import ntt_pkg::*;
  logic   clk = 0;
  group_t a, b, r;
  coef_t  zs;
  int checks = 0, failures = 0;
  group_t pipe [$];

  pwm_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    group_t e;
    longint ai [4], bi [4], z, zz;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      if (pipe.size() == PWM_LAT) begin
        e = pipe.pop_front();
        checks++;
        if (r != e) begin
          failures++;
          if (failures < 10) $display("FAIL cyc %0d got %h exp %h", cyc, r, e);
        end
      end
      for (int i = 0; i < 4; i++) begin
        ai[i] = (cyc < 8) ? ((cyc % 2 == 0) ? 0 : Q - 1) : longint'($urandom % Q);
        bi[i] = (cyc < 8) ? ((cyc % 4 < 2) ? Q - 1 : 0) : longint'($urandom % Q);
        a[i]  = coef_t'(ai[i]);
        b[i]  = coef_t'(bi[i]);
      end
      z  = longint'($urandom % Q);
      zs = coef_t'(z * KINV2 % Q);
      for (int h = 0; h < 2; h++) begin
        zz = (h == 0) ? z : (Q - z) % Q;
        e[2*h]   = coef_t'((ai[2*h] * bi[2*h] + (ai[2*h+1] * bi[2*h+1] % Q) * zz) % Q);
        e[2*h+1] = coef_t'((ai[2*h] * bi[2*h+1] + ai[2*h+1] * bi[2*h]) % Q);
      end
      pipe.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
