// tb_hash_sampler: drives the hashing/sampling unit through its commands.
//   1. SHAKE-128 of the bytes 00..21: absorb, squeeze two blocks to the
//      host; lanes are checked against published-algorithm reference values.
//   2. The same absorb, then squeeze four blocks to the host (the stream)
//      and, after a fresh absorb, sample a uniform polynomial; it must equal
//      Kyber's Parse applied to that stream.
//   3. SHAKE-256 (rate 17 words) of 00..1F || 00, squeezed for reference,
//      then CBD sampling with eta = 3 (two blocks) and eta = 2 (one block);
//      both are compared with CBD computed from the squeezed stream.
// It counts the cycles in which the Keccak core permutes while a sampler
// consumes words (the overlap the architecture relies on), and checks that
// rejection sampling takes no longer than 24 cycles per SHAKE-128 block it
// uses, plus 12 cycles of command overhead: the sampler is never the
// bottleneck.
module tb_hash_sampler;
  import ntt_pkg::*;
  import keccak_pkg::*;
  logic   clk = 0, rst_n = 0;
  logic   in_valid = 0;
  word_t  in_data = '0;
  logic   cmd_valid = 0, cmd_ready, cmd_init = 0, cmd_eta3 = 0, done;
  logic [1:0] cmd = 0;
  logic [$clog2(RATE_WORDS+1)-1:0] rate_words = 21;
  logic   out_valid, out_ready = 0, samp_we;
  word_t  out_data;
  logic [AW-1:0] samp_addr;
  group_t samp_data;
  int checks = 0, failures = 0, overlap = 0, cmd_cycles;
  word_t  words [$];
  int     poly [N];

  hash_sampler dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && samp_we)
      for (int l = 0; l < 4; l++) poly[4*samp_addr + l] = int'(samp_data[l]);
    if (rst_n && dut.kc_busy && dut.piso_valid && dut.piso_ready) overlap++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(logic [1:0] c, logic init, logic e3);
    @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_init = init; cmd_eta3 = e3;
    @(negedge clk);
    cmd_valid = 0;
    cmd_cycles = 1;
    while (!done) begin
      cmd_cycles++;
      out_ready = ($urandom % 4) != 0;
      @(posedge clk);
      if (out_valid && out_ready) words.push_back(out_data);
      @(negedge clk);
    end
    out_ready = 0;
  endtask

  // message bytes 0,1,2,..,len-1 (bytes from 32 on replaced by last if
  // last >= 0), pad byte, rate r bytes
  task automatic absorb_msg(int len, byte unsigned pad, int r, int last);
    block_t b = '0;
    for (int k = 0; k < len; k++) b[8*k +: 8] = 8'(k % 256);
    if (last >= 0) for (int k = 32; k < len; k++) b[8*k +: 8] = 8'(last);
    b[8*len +: 8] = pad;
    b[8*(r-1) +: 8] = b[8*(r-1) +: 8] | 8'h80;
    rate_words = 5'(r / 8);
    for (int w = 0; w < r / 8; w++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = b[64*w +: 64];
    end
    @(negedge clk);
    in_valid = 0;
    issue(2'd0, 1, 0);
  endtask

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic byte unsigned sbyte(int k);
    return words[k / 8][8*(k % 8) +: 8];
  endfunction

  initial begin
    int k, pos, e, sampling_cycles;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1. SHAKE-128 known answer
    words.delete();
    absorb_msg(34, 8'h1F, 168, -1);
    issue(2'd1, 0, 0);
    issue(2'd1, 0, 0);
    chk(words.size() == 42, "42 words squeezed");
    chk(words[0]  == 64'h1a4445dccbc5b342, "SHAKE-128 word 0");
    chk(words[3]  == 64'h7ce0eed825f9485f, "SHAKE-128 word 3");
    chk(words[20] == 64'he42737833996008d, "SHAKE-128 word 20");
    chk(words[21] == 64'h295ce36dd55f9c3f, "SHAKE-128 word 21");
    chk(words[24] == 64'h545c2634fb249d95, "SHAKE-128 word 24");
    // 2. rejection sampling from the same stream
    issue(2'd1, 0, 0);
    issue(2'd1, 0, 0);
    absorb_msg(34, 8'h1F, 168, -1);
    issue(2'd2, 0, 0);
    sampling_cycles = cmd_cycles;
    k = 0;
    pos = 0;
    while (k < N) begin
      int d1, d2;
      d1 = int'(sbyte(pos)) + 256 * (int'(sbyte(pos+1)) % 16);
      d2 = int'(sbyte(pos+1)) / 16 + 16 * int'(sbyte(pos+2));
      pos += 3;
      if (d1 < int'(Q)) begin chk(poly[k] == d1, "uniform coefficient"); k++; end
      if (d2 < int'(Q) && k < N) begin chk(poly[k] == d2, "uniform coefficient"); k++; end
    end
    $display("rejection sampling used %0d blocks in %0d cycles", (pos + 167) / 168, sampling_cycles);
    chk(sampling_cycles <= 24 * ((pos + 167) / 168) + 12,
        "rejection sampling hidden behind the 24-cycle permutations");
    // 3. SHAKE-256 stream and binomial sampling
    for (int eta = 3; eta >= 2; eta--) begin
      words.delete();
      absorb_msg(33, 8'h1F, 136, eta);
      issue(2'd1, 0, 0);
      issue(2'd1, 0, 0);
      if (eta == 3) chk(words[0] == 64'h9368c5a1fa3aa07a, "SHAKE-256 word 0");
      absorb_msg(33, 8'h1F, 136, eta);
      issue(2'd3, 0, eta == 3);
      for (int i = 0; i < N; i++) begin
        int a, b;
        a = 0;
        b = 0;
        for (int j = 0; j < eta; j++) begin
          int bit_a, bit_b;
          bit_a = 2*eta*i + j;
          bit_b = 2*eta*i + eta + j;
          a += int'(words[bit_a / 64][bit_a % 64]);
          b += int'(words[bit_b / 64][bit_b % 64]);
        end
        e = (a - b + int'(Q)) % int'(Q);
        chk(poly[i] == e, "binomial coefficient");
      end
    end
    chk(overlap > 0, "Keccak permutes while a sampler consumes");
    $display("overlap cycles %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
