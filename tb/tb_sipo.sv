// tb_sipo: writes random 64-bit words (full and partial blocks), checks
// their placement in the 1344-bit block, the count, the full flag, that a
// word offered to a full buffer is dropped, and that clear zeroes it.
module tb_sipo;
  import keccak_pkg::*;
  logic   clk = 0, rst_n = 0, clear = 0, in_valid = 0, full;
  word_t  in_data = '0;
  block_t block, exp;
  logic [$clog2(RATE_WORDS+1)-1:0] count;
  int checks = 0, failures = 0;

  sipo dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      int n;
      n = (trial % 3 == 0) ? int'(RATE_WORDS) + 1 : 1 + int'($urandom % RATE_WORDS);
      exp = '0;
      for (int w = 0; w < n; w++) begin
        @(negedge clk);
        in_valid = 1;
        in_data  = {$urandom, $urandom};
        if (w < int'(RATE_WORDS)) exp[64*w +: 64] = in_data;
      end
      @(negedge clk);
      in_valid = 0;
      chk(block == exp, "block contents");
      chk(int'(count) == ((n > int'(RATE_WORDS)) ? int'(RATE_WORDS) : n), "count");
      chk(full == (n >= int'(RATE_WORDS)), "full flag");
      clear = 1;
      @(negedge clk);
      clear = 0;
      chk(block == '0 && count == 0, "clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
