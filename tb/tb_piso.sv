// tb_piso: loads random blocks with 9, 17 and 21 words to send, drains them
// with a randomly stalling consumer and checks the word order, the count
// and the empty flag.
module tb_piso;
  import keccak_pkg::*;
  logic   clk = 0, rst_n = 0, load = 0, out_valid, out_ready = 0, empty;
  block_t load_block = '0;
  logic [$clog2(RATE_WORDS+1)-1:0] n_words = '0;
  word_t  out_data;
  int checks = 0, failures = 0;

  piso dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t b;
    int     nws [3] = '{9, 17, 21};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      int n, got;
      n = nws[trial % 3];
      for (int w = 0; w < int'(RATE_WORDS); w++) b[64*w +: 64] = {$urandom, $urandom};
      @(negedge clk);
      load = 1; load_block = b; n_words = 5'(n);
      @(negedge clk);
      load = 0;
      got = 0;
      while (!empty) begin
        out_ready = ($urandom % 3) != 0;
        @(posedge clk);
        if (out_valid && out_ready) begin
          checks++;
          if (out_data != b[64*got +: 64]) begin
            failures++;
            $display("FAIL word %0d", got);
          end
          got++;
        end
        @(negedge clk);
      end
      checks++;
      if (got != n) begin failures++; $display("FAIL sent %0d words of %0d", got, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
