// poly_ram: one polynomial of N = 256 coefficients in four 64-entry banks,
// read and written four coefficients per cycle.
//
// Coefficient i lives in bank (sum of the base-4 digits of i) mod 4 at
// address i >> 2.  Every access pattern of the accelerator is a group
// {j, j+s, j+2s, j+3s} with s a power of four and the base-4 digit of j at
// the position of s equal to zero; such four indices differ in one base-4
// digit only, so they always fall in four different banks and a group
// is read or written in a single cycle without conflicts.  This covers the
// merged NTT layers (s = 64, 16, 4), the single layer and the point-wise
// stage (s = 1, four consecutive coefficients).
//
// Ports: one read port and one write port (simple dual port).  rd_idx gives
// the four coefficient indices of lanes 0..3; rd_data returns them in lane
// order RAM_LAT = 2 cycles later (bank read, then lane crossbar register).
// A write of the same cycle as a read to the same location is not seen by
// that read.  The skewed bank mapping and the crossbars are this design's
// choice; only the four-coefficients-per-cycle rate comes from the source
// architecture.  Contents are not reset.
module poly_ram
  import ntt_pkg::*;
(
  input  logic   clk,
  input  logic   rd_en,
  input  gidx_t  rd_idx,
  output group_t rd_data,
  input  logic   wr_en,
  input  gidx_t  wr_idx,
  input  group_t wr_data
);
  coef_t          mem [LANES][WORDS];
  logic [1:0]     rd_bank [LANES];     // bank of each read lane
  logic [1:0]     rd_bank_q [LANES];
  logic [AW-1:0]  rd_addr [LANES];     // address per bank
  logic [AW-1:0]  wr_addr [LANES];
  coef_t          wr_val  [LANES];
  logic [LANES-1:0] wr_hit;
  coef_t          bank_q [LANES];

  // per bank: which lane addresses it
  always_comb begin
    for (int l = 0; l < LANES; l++) rd_bank[l] = bank_of(rd_idx[l]);
    for (int b = 0; b < LANES; b++) begin
      rd_addr[b] = '0;
      wr_addr[b] = '0;
      wr_val[b]  = '0;
      wr_hit[b]  = 1'b0;
      for (int l = 0; l < LANES; l++) begin
        if (rd_bank[l] == 2'(b)) rd_addr[b] = AW'(rd_idx[l] >> 2);
        if (bank_of(wr_idx[l]) == 2'(b)) begin
          wr_addr[b] = AW'(wr_idx[l] >> 2);
          wr_val[b]  = wr_data[l];
          wr_hit[b]  = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < LANES; b++) begin
      if (wr_en && wr_hit[b]) mem[b][wr_addr[b]] <= wr_val[b];
      if (rd_en) bank_q[b] <= mem[b][rd_addr[b]];
    end
    if (rd_en) rd_bank_q <= rd_bank;
    for (int l = 0; l < LANES; l++) rd_data[l] <= bank_q[rd_bank_q[l]];
  end

  // the four lanes of an access must use four different banks
  function automatic logic conflict_free(gidx_t idx);
    logic [LANES-1:0] used;
    used = '0;
    for (int l = 0; l < LANES; l++) used[bank_of(idx[l])] = 1'b1;
    return &used;
  endfunction

  a_rd_banks: assert property (@(posedge clk) rd_en |-> conflict_free(rd_idx));
  a_wr_banks: assert property (@(posedge clk) wr_en |-> conflict_free(wr_idx));
endmodule
