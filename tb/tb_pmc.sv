// tb_pmc: random groups, twiddles and modes every cycle; each output group,
// exactly eight cycles later, is compared with two layers of CT/GS
// butterflies (or one for the bypass modes) computed with % arithmetic
// following the wiring of the core.  Counts how often each mode ran.
module tb_pmc;
  import ntt_pkg::*;
  logic      clk = 0;
  pmc_mode_e mode;
  group_t    x, tw, z;
  int checks = 0, failures = 0;
  int mode_count [4];
  typedef int g4_t [4];
  group_t pipe [$];

  pmc dut (.*);
  always #5 clk = ~clk;

  function automatic void ct(int a, int b, int w, output int oa, output int ob);
    oa = (a + b * w) % Q;
    ob = (a - (b * w) % Q + Q) % Q;
  endfunction
  function automatic void gsb(int a, int b, int w, output int oa, output int ob);
    int inv2 = (Q + 1) / 2;
    oa = (a + b) * inv2 % Q;
    ob = ((b - a + Q) % Q) * w % Q * inv2 % Q;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g4_t e, xi, y;
    group_t eg;
    int  wt [4];
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      if (pipe.size() == PMC_LAT) begin
        eg = pipe.pop_front();
        checks++;
        for (int i = 0; i < 4; i++)
          if (z[i] != eg[i]) begin
            failures++;
            if (failures < 10) $display("FAIL cyc %0d lane %0d got %0d exp %0d mode %0d", cyc, i, z[i], eg[i], dut.mode_out);
          end
      end
      mode = pmc_mode_e'($urandom % 4);
      mode_count[mode]++;
      for (int i = 0; i < 4; i++) begin
        xi[i] = int'($urandom % Q);
        x[i]  = coef_t'(xi[i]);
        wt[i] = int'($urandom % Q);
        tw[i] = coef_t'(wt[i] * KINV2 % Q);
      end
      case (mode)
        MODE_CT: begin
          ct(xi[0], xi[2], wt[0], y[0], y[2]);
          ct(xi[1], xi[3], wt[1], y[1], y[3]);
          ct(y[0], y[1], wt[2], e[0], e[1]);
          ct(y[2], y[3], wt[3], e[2], e[3]);
        end
        MODE_GS: begin
          gsb(xi[0], xi[1], wt[0], y[0], y[1]);
          gsb(xi[2], xi[3], wt[1], y[2], y[3]);
          gsb(y[0], y[2], wt[2], e[0], e[2]);
          gsb(y[1], y[3], wt[3], e[1], e[3]);
        end
        MODE_BYPASS_CT: begin
          ct(xi[0], xi[2], wt[2], e[0], e[2]);
          ct(xi[1], xi[3], wt[3], e[1], e[3]);
        end
        default: begin
          gsb(xi[0], xi[2], wt[2], e[0], e[2]);
          gsb(xi[1], xi[3], wt[3], e[1], e[3]);
        end
      endcase
      for (int i = 0; i < 4; i++) eg[i] = coef_t'(e[i]);
      pipe.push_back(eg);
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_count[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
