// tb_butterfly: drives a new random operand set and mode (CT, GS, bypass)
// into the butterfly every cycle and compares each output, exactly four
// cycles later, with the result computed with % arithmetic.
module tb_butterfly;
  import ntt_pkg::*;
  logic  clk = 0;
  logic  gs, bypass;
  coef_t a, b, w, out_a, out_b;
  int checks = 0, failures = 0;
  typedef struct { int ea; int eb; } exp_t;
  exp_t pipe [$];

  butterfly dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    int   wt, inv2;
    inv2 = (Q + 1) / 2;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare the result of the set issued four cycles ago
      if (pipe.size() == ROW_LAT) begin
        e = pipe.pop_front();
        checks++;
        if (int'(out_a) != e.ea || int'(out_b) != e.eb) begin
          failures++;
          if (failures < 10)
            $display("FAIL cyc %0d got %0d %0d exp %0d %0d", cyc, out_a, out_b, e.ea, e.eb);
        end
      end
      a      = coef_t'($urandom % Q);
      b      = coef_t'($urandom % Q);
      wt     = int'($urandom % Q);
      w      = coef_t'((wt * KINV2) % Q);
      gs     = 1'($urandom);
      bypass = ($urandom % 5) == 0;
      if (bypass) begin
        e.ea = a; e.eb = b;
      end else if (gs) begin
        e.ea = ((int'(a) + int'(b)) * inv2) % Q;
        e.eb = (((int'(b) - int'(a) + Q) % Q) * wt % Q) * inv2 % Q;
      end else begin
        e.ea = (int'(a) + int'(b) * wt) % Q;
        e.eb = (int'(a) - (int'(b) * wt) % Q + Q) % Q;
      end
      pipe.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
