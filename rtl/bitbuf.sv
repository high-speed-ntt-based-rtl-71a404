// bitbuf: small bit FIFO that realigns a 64-bit word stream for a consumer
// taking a varying number of bits per cycle (the samplers take 16, 24 or
// 72).  Bits leave in stream order: window[0] is the oldest bit.
//
// Each cycle the consumer may take take_n <= OUT_W bits if avail >= take_n;
// then a new word is accepted (in_ready) if it fits behind what is left.
// in_ready depends on take/take_n in the same cycle (no loop as long as
// the consumer's take does not depend on in_ready).  flush empties it.
module bitbuf
  import keccak_pkg::*;
#(
  parameter int unsigned OUT_W = 48,
  parameter int unsigned DEPTH = 128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  logic   in_valid,
  input  word_t  in_data,
  output logic   in_ready,
  input  logic   take,
  input  logic [$clog2(OUT_W+1)-1:0] take_n,
  output logic [OUT_W-1:0] window,
  output logic [$clog2(DEPTH+1)-1:0] avail
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic [DEPTH-1:0] buf_q, kept;
  logic [CW-1:0]    left;

  always_comb begin
    kept = buf_q;
    left = avail;
    if (take) begin
      kept = buf_q >> take_n;
      left = avail - CW'(take_n);
    end
    in_ready = (left <= CW'(DEPTH - LANE_W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      avail <= '0;
    end else if (flush) begin
      buf_q <= '0;
      avail <= '0;
    end else begin
      buf_q <= kept;
      avail <= left;
      if (in_valid && in_ready) begin
        buf_q <= kept | (DEPTH'(in_data) << left);
        avail <= left + CW'(LANE_W);
      end
    end
  end

  assign window = buf_q[OUT_W-1:0];

  a_take_ok: assert property (@(posedge clk) disable iff (!rst_n)
                              take |-> (avail >= CW'(take_n)));
endmodule
