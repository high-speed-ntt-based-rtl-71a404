// tb_cbd_sampler: feeds random words with random gaps for eta = 2 and 3 and
// compares the written polynomial with CBD_eta computed bit by bit from the
// same byte stream (coefficient = sum of eta bits - sum of next eta bits,
// mod q).  Also checks the group order and done after 64 groups.
module tb_cbd_sampler;
  import ntt_pkg::*;
  import keccak_pkg::*;
  logic   clk = 0, rst_n = 0, start = 0, eta3 = 0, busy, done;
  logic   in_valid = 0, in_ready, wr_en;
  word_t  in_data = '0;
  logic [AW-1:0] wr_addr;
  group_t wr_data;
  int checks = 0, failures = 0;
  logic   bits [$];
  int     got [N];
  int     ngroups;

  cbd_sampler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && wr_en) begin
      checks++;
      if (int'(wr_addr) != ngroups) begin failures++; $display("FAIL group order"); end
      for (int l = 0; l < 4; l++) got[4*wr_addr + l] = int'(wr_data[l]);
      ngroups++;
    end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 4; trial++) begin
      int eta;
      eta = (trial % 2 == 0) ? 2 : 3;
      bits.delete();
      ngroups = 0;
      @(negedge clk);
      start = 1;
      eta3  = (eta == 3);
      @(negedge clk);
      start = 0;
      while (busy) begin
        in_valid = ($urandom % 3) != 0;
        in_data  = {$urandom, $urandom};
        @(posedge clk);
        if (in_valid && in_ready)
          for (int b = 0; b < 64; b++) bits.push_back(in_data[b]);
        @(negedge clk);
      end
      in_valid = 0;
      repeat (2) @(negedge clk);   // the last group is written as busy drops
      checks++;
      if (ngroups != WORDS) begin failures++; $display("FAIL %0d groups", ngroups); end
      for (int i = 0; i < N; i++) begin
        int a, b, e;
        a = 0;
        b = 0;
        for (int j = 0; j < eta; j++) begin
          a += int'(bits[2*eta*i + j]);
          b += int'(bits[2*eta*i + eta + j]);
        end
        e = (a - b + int'(Q)) % int'(Q);
        checks++;
        if (got[i] != e) begin
          failures++;
          if (failures < 10) $display("FAIL eta %0d coef %0d got %0d exp %0d", eta, i, got[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
