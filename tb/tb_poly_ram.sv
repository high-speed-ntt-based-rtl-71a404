// tb_poly_ram: writes random conflict-free groups (spacing 1, 4, 16, 64)
// while reading others, and checks every read, two cycles after it was
// issued, against a plain array model of the polynomial.
module tb_poly_ram;
  import ntt_pkg::*;
  logic   clk = 0;
  logic   rd_en = 0, wr_en = 0;
  gidx_t  rd_idx = '0, wr_idx = '0;
  group_t rd_data, wr_data = '0;
  int checks = 0, failures = 0;
  int model [N];
  group_t pipe [$];
  logic   vpipe [$];

  poly_ram dut (.*);
  always #5 clk = ~clk;

  function automatic gidx_t rand_group();
    gidx_t g;
    int p, j;
    p = int'($urandom % 4);
    j = int'($urandom % N);
    j = j & ~(3 << (2 * p));          // digit at position p is zero
    for (int l = 0; l < LANES; l++) g[l] = cidx_t'(j + (l << (2 * p)));
    return g;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    group_t e;
    logic   v;
    // fill the whole polynomial, four consecutive coefficients per cycle
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      wr_en = 1;
      for (int l = 0; l < LANES; l++) begin
        wr_idx[l]  = cidx_t'(4 * w + l);
        model[4*w+l] = int'($urandom % Q);
        wr_data[l] = coef_t'(model[4*w+l]);
      end
    end
    @(negedge clk);
    wr_en = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // check the read issued RAM_LAT cycles ago
      if (vpipe.size() == RAM_LAT) begin
        v = vpipe.pop_front();
        e = pipe.pop_front();
        if (v) begin
          checks++;
          if (rd_data != e) begin
            failures++;
            if (failures < 10) $display("FAIL cyc %0d got %h exp %h", cyc, rd_data, e);
          end
        end
      end
      rd_en  = ($urandom % 4) != 0;
      rd_idx = rand_group();
      for (int l = 0; l < LANES; l++) e[l] = coef_t'(model[rd_idx[l]]);
      pipe.push_back(e);
      vpipe.push_back(rd_en);
      // a write in the same cycle, to a group disjoint from the read
      wr_en  = ($urandom % 2) != 0;
      wr_idx = rand_group();
      for (int l = 0; l < LANES; l++)
        for (int m = 0; m < LANES; m++)
          if (wr_idx[l] == rd_idx[m]) wr_en = 0;
      for (int l = 0; l < LANES; l++) begin
        wr_data[l] = coef_t'($urandom % Q);
        if (wr_en) model[wr_idx[l]] = int'(wr_data[l]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
