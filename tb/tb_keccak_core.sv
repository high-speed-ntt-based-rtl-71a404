// tb_keccak_core: known-answer tests of the permutation through the sponge:
//   * Keccak-f[1600] of the all-zero state (first lane F1258F7940E1DDE7)
//   * SHAKE-128 of the 34 bytes 00 01 .. 21 (Kyber's seed||j||i length),
//     two squeeze blocks
//   * SHA3-256("abc"), rate 1088, padding placed by the testbench
// The expected lanes are published/standard test values.  Each
// permutation must take exactly 24 cycles from start to done.
module tb_keccak_core;
  import keccak_pkg::*;
  logic   clk = 0, rst_n = 0;
  logic   start = 0, init = 0, absorb = 0, busy, done;
  block_t block = '0, rate_out;
  int checks = 0, failures = 0;

  keccak_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic permute(logic i, logic a, block_t blk);
    int cyc = 0;
    @(negedge clk);
    start = 1; init = i; absorb = a; block = blk;
    @(negedge clk);
    start = 0; init = 0; absorb = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != ROUNDS) begin
      failures++;
      $display("FAIL permutation took %0d cycles", cyc);
    end
  endtask

  task automatic expect_lane(int i, word_t v);
    checks++;
    if (rate_out[64*i +: 64] != v) begin
      failures++;
      $display("FAIL lane %0d got %h exp %h", i, rate_out[64*i +: 64], v);
    end
  endtask

  initial begin
    block_t b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // zero state
    permute(1, 0, '0);
    expect_lane(0, 64'hF1258F7940E1DDE7);
    // SHAKE-128(00 01 .. 21): pad 0x1F after the message, 0x80 in byte 167
    b = '0;
    for (int k = 0; k < 34; k++) b[8*k +: 8] = 8'(k);
    b[8*34 +: 8] = 8'h1F;
    b[8*167 +: 8] = b[8*167 +: 8] | 8'h80;
    permute(1, 1, b);
    expect_lane(0, 64'h1a4445dccbc5b342);
    expect_lane(1, 64'hfb742aa7999b4859);
    expect_lane(2, 64'heb2a18b0a2c1b40c);
    expect_lane(3, 64'h7ce0eed825f9485f);
    expect_lane(20, 64'he42737833996008d);
    permute(0, 0, '0);   // squeeze the next block
    expect_lane(0, 64'h295ce36dd55f9c3f);
    expect_lane(1, 64'h066c120cecfaa2ef);
    expect_lane(2, 64'h4225fdd487ba063e);
    expect_lane(3, 64'h545c2634fb249d95);
    // SHA3-256("abc"): rate 136 bytes, pad 0x06 .. 0x80
    b = '0;
    b[23:0] = 24'h636261;
    b[8*3 +: 8] = 8'h06;
    b[8*135 +: 8] = 8'h80;
    permute(1, 1, b);
    expect_lane(0, 64'hb225e24fa75d983a);
    expect_lane(1, 64'hbd90d36b2d175c04);
    expect_lane(2, 64'h5b529d3e6e085f85);
    expect_lane(3, 64'h3215431145e2bf46);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
