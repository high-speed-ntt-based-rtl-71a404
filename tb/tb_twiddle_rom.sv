// tb_twiddle_rom: reads all 128 entries on the four ports and compares them
// with 17^brv7(i) * 169^-1 mod q computed by square-and-multiply.
module tb_twiddle_rom;
  import ntt_pkg::*;
  tidx_t [3:0] idx;
  coef_t [3:0] w;
  int checks = 0, failures = 0;

  twiddle_rom dut (.idx, .w);

  function automatic longint powmod(longint b, int e);
    longint r = 1;
    while (e > 0) begin
      if (e & 1) r = r * b % Q;
      b = b * b % Q;
      e >>= 1;
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int i = 0; i < 128; i++) begin
      for (int p = 0; p < 4; p++) idx[p] = tidx_t'((i + 32 * p) % 128);
      #1;
      for (int p = 0; p < 4; p++) begin
        int k;
        k = (i + 32 * p) % 128;
        e = powmod(17, int'(brv7(7'(k)))) * 169 % Q;   // times k^2 ...
        e = e * powmod(169, Q - 3) % Q;                 // ... then by k^-4
        checks++;
        if (longint'(w[p]) != e) begin
          failures++;
          $display("FAIL idx %0d got %0d exp %0d", k, w[p], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
