// tb_k2red: checks k2red against k^2*c mod q computed with the % operator,
// for the corner inputs and random 24- and 25-bit values.
module tb_k2red;
  import ntt_pkg::*;
  logic [24:0] c;
  coef_t       r;
  int checks = 0, failures = 0;

  k2red dut (.c(c), .r(r));

  task automatic check(logic [24:0] v);
    longint unsigned exp;
    c = v;
    #1;
    exp = (longint'(v) * 169) % Q;
    checks++;
    if (r !== coef_t'(exp)) begin
      failures++;
      $display("FAIL c=%0d got %0d exp %0d", v, r, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(255); check(256); check(65535); check(65536);
    check((Q-1)*(Q-1)); check(2*(Q-1)*(Q-1)); check(25'h1FFFFFF);
    for (int i = 0; i < 3328; i++) check(25'(i * 3329 + i));
    for (int i = 0; i < 20000; i++) check(25'($urandom));
    for (int i = 0; i < 20000; i++) check(25'($urandom % (Q*Q)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
