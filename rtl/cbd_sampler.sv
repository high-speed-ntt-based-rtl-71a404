// cbd_sampler: Kyber's centered binomial sampler CBD_eta for noise
// polynomials, eta = 2 or 3 (Kyber-512 uses 3 for s and e in key
// generation and 2 elsewhere).
//
// Coefficient i uses 2*eta consecutive stream bits: a = sum of the first
// eta, b = sum of the next eta, and the coefficient is a - b mod q, in
// {-eta .. eta}.  The unit produces one group of four coefficients per
// cycle, taking 8*eta bits from a bit buffer fed by 64-bit words, and
// writes groups 0..63 in order; after 256 coefficients it pulses done.
// The function is Kyber's; four coefficients per cycle matches the
// four-coefficient memory port and is this design's choice.
module cbd_sampler
  import ntt_pkg::*;
  import keccak_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   eta3,      // 0: eta = 2, 1: eta = 3 (taken at start)
  output logic   busy,
  output logic   done,
  input  logic   in_valid,
  input  word_t  in_data,
  output logic   in_ready,
  output logic   wr_en,
  output logic [AW-1:0] wr_addr,
  output group_t wr_data
);
  logic [23:0] window;
  logic [7:0]  avail;
  logic        take, eta3_q;
  logic [4:0]  need;
  logic [AW:0] groups;
  group_t      coefs;

  bitbuf #(.OUT_W(24), .DEPTH(128)) u_buf (
    .clk, .rst_n, .flush(start), .in_valid(in_valid && busy), .in_data,
    .in_ready, .take, .take_n(need), .window, .avail
  );

  assign need = eta3_q ? 5'd24 : 5'd16;
  assign take = busy && (avail >= 8'(need));

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] a, b;
      if (eta3_q) begin
        a = 2'(window[6*i])   + 2'(window[6*i+1]) + 2'(window[6*i+2]);
        b = 2'(window[6*i+3]) + 2'(window[6*i+4]) + 2'(window[6*i+5]);
      end else begin
        a = 2'(window[4*i])   + 2'(window[4*i+1]);
        b = 2'(window[4*i+2]) + 2'(window[4*i+3]);
      end
      coefs[i] = mod_sub(coef_t'(a), coef_t'(b));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      wr_en  <= 1'b0;
      groups <= '0;
      eta3_q <= 1'b0;
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      if (start) begin
        busy   <= 1'b1;
        groups <= '0;
        eta3_q <= eta3;
      end else if (take) begin
        wr_en   <= 1'b1;
        wr_addr <= AW'(groups);
        wr_data <= coefs;
        groups  <= groups + 1'b1;
        if (groups == (AW+1)'(WORDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
