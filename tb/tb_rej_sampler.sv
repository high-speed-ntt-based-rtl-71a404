// tb_rej_sampler: feeds random 64-bit words (with random gaps), in later
// trials biased so that many candidates are rejected, and in the last two
// made mostly of the boundary candidates q and q-1; compares the written polynomial
// with Kyber's Parse applied byte by byte to the same stream.  Also checks
// that groups are written in order and that done comes after 64 groups.
module tb_rej_sampler;
  import ntt_pkg::*;
  import keccak_pkg::*;
  logic   clk = 0, rst_n = 0, start = 0, busy, done;
  logic   in_valid = 0, in_ready, wr_en;
  word_t  in_data = '0;
  logic [AW-1:0] wr_addr;
  group_t wr_data;
  int checks = 0, failures = 0;
  byte unsigned stream [$];
  int     got [N];
  int     ngroups;

  rej_sampler dut (.*);
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
      if (int'(wr_addr) != ngroups) begin failures++; $display("FAIL group order %0d %0d t=%0t", wr_addr, ngroups, $time); end
      for (int l = 0; l < 4; l++) got[4*wr_addr + l] = int'(wr_data[l]);
      ngroups++;
    end

  // byte p of a stream whose triples mostly hold the candidates q and q-1
  // (in either order), the boundary of the acceptance test
  function automatic byte unsigned edge_byte(int p);
    int ti, d1, d2;
    ti = p / 3;
    case ((ti * 37 + ti / 5) % 4)
      0:       begin d1 = int'(Q);     d2 = int'(Q) - 1; end
      1:       begin d1 = int'(Q) - 1; d2 = int'(Q);     end
      2:       begin d1 = int'(Q);     d2 = int'(Q);     end
      default: begin d1 = ti % 4096;  d2 = (ti * 7) % 4096; end
    endcase
    case (p % 3)
      0:       return 8'(d1);
      1:       return 8'((d1 >> 8) | ((d2 % 16) << 4));
      default: return 8'(d2 >> 4);
    endcase
  endfunction

  initial begin
    int exp [N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      int k, pos, bpos;
      stream.delete();
      bpos = 0;
      ngroups = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (busy) begin
        in_valid = ($urandom % 4) != 0;
        for (int b = 0; b < 8; b++) begin
          byte unsigned v;
          v = 8'($urandom);
          if (b % 3 == 1 && trial > 1) v = v | 8'hC0;   // push candidates toward >= q
          if (trial > 3) v = edge_byte(bpos + b);
          in_data[8*b +: 8] = v;
        end
        @(posedge clk);
        if (in_valid && in_ready) begin
          for (int b = 0; b < 8; b++) stream.push_back(in_data[8*b +: 8]);
          bpos += 8;
        end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (2) @(negedge clk);   // the last group is written as busy drops
      // reference Parse
      k = 0;
      pos = 0;
      while (k < N && pos + 3 <= stream.size()) begin
        int d1, d2;
        d1 = int'(stream[pos]) + 256 * (int'(stream[pos+1]) % 16);
        d2 = int'(stream[pos+1]) / 16 + 16 * int'(stream[pos+2]);
        pos += 3;
        if (d1 < int'(Q)) exp[k++] = d1;
        if (d2 < int'(Q) && k < N) exp[k++] = d2;
      end
      checks++;
      if (k != N || ngroups != WORDS) begin
        failures++;
        $display("FAIL trial %0d: %0d reference coefficients, %0d groups", trial, k, ngroups);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (got[i] != exp[i]) begin
          failures++;
          if (failures < 10) $display("FAIL coef %0d got %0d exp %0d", i, got[i], exp[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
