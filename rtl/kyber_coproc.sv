// kyber_coproc: the Kyber co-processor datapath: a hashing and sampling
// unit (Keccak core with SIPO/PISO, rejection and binomial samplers) and
// the NTT-based polynomial multiplier, sharing the polynomial memory.
//
// The samplers write straight into a polynomial slot of the multiplier
// (hs_slot, taken with the sampling command): a uniform polynomial from
// SHAKE-128 is taken to be in the NTT domain already (Kyber's matrix A),
// a binomial one is a secret/noise polynomial in normal order.  A typical
// step of key generation is therefore
//   absorb seed || j || i, HS_SAMPLE_REJ -> slot 0         (a_hat)
//   absorb sigma || nonce, HS_SAMPLE_CBD -> slot 1         (s)
//   OP_NTT slot 1, OP_PWM 0,1 -> 2, OP_INTT slot 2         (a*s)
// issued by a host or a sequencer, which this block does not contain.
// The host reaches the polynomial memory through the multiplier's host
// port when neither unit writes to it, and hash output through the
// squeeze port.  The two units have separate command ports.  Hashing
// (absorb, squeeze) may overlap a multiplier command; a sampling command
// writes the polynomial memory through the multiplier's host port and so
// must be issued while the multiplier is idle, as must host accesses.  Ports are those of hash_sampler
// and polymul_top, with the sampler-to-memory path kept inside.
module kyber_coproc
  import ntt_pkg::*;
  import keccak_pkg::*;
#(
  parameter int unsigned NUM_POLY = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // hashing and sampling
  input  logic   hs_in_valid,
  input  word_t  hs_in_data,
  input  logic   hs_cmd_valid,
  output logic   hs_cmd_ready,
  input  logic [1:0] hs_cmd,
  input  logic   hs_cmd_init,
  input  logic   hs_cmd_eta3,
  input  logic [$clog2(NUM_POLY)-1:0] hs_slot,
  input  logic [$clog2(RATE_WORDS+1)-1:0] hs_rate_words,
  output logic   hs_done,
  output logic   hs_out_valid,
  output word_t  hs_out_data,
  input  logic   hs_out_ready,
  // polynomial arithmetic
  input  logic   pm_cmd_valid,
  output logic   pm_cmd_ready,
  input  op_e    pm_cmd_op,
  input  logic [$clog2(NUM_POLY)-1:0] pm_cmd_src0,
  input  logic [$clog2(NUM_POLY)-1:0] pm_cmd_src1,
  input  logic [$clog2(NUM_POLY)-1:0] pm_cmd_dst,
  output logic   pm_done,
  // host access to the polynomial memory
  input  logic   host_we,
  input  logic   host_re,
  input  logic [$clog2(NUM_POLY)-1:0] host_slot,
  input  logic [AW-1:0] host_addr,
  input  group_t host_wdata,
  output group_t host_rdata,
  output logic   host_rvalid
);
  localparam int unsigned SW = $clog2(NUM_POLY);

  logic          samp_we;
  logic [AW-1:0] samp_addr;
  group_t        samp_data;
  logic [SW-1:0] slot_q;
  logic          mem_we;
  logic [AW-1:0] mem_addr;
  group_t        mem_wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) slot_q <= '0;
    else if (hs_cmd_valid && hs_cmd_ready) slot_q <= hs_slot;

  hash_sampler u_hs (
    .clk, .rst_n, .in_valid(hs_in_valid), .in_data(hs_in_data),
    .cmd_valid(hs_cmd_valid), .cmd_ready(hs_cmd_ready), .cmd(hs_cmd),
    .cmd_init(hs_cmd_init), .cmd_eta3(hs_cmd_eta3), .rate_words(hs_rate_words),
    .done(hs_done), .out_valid(hs_out_valid), .out_data(hs_out_data),
    .out_ready(hs_out_ready), .samp_we, .samp_addr, .samp_data
  );

  // sampler writes take the memory port ahead of the host
  always_comb begin
    mem_we    = samp_we || host_we;
    mem_addr  = samp_we ? samp_addr : host_addr;
    mem_wdata = samp_we ? samp_data : host_wdata;
  end

  polymul_top #(.NUM_POLY(NUM_POLY)) u_pm (
    .clk, .rst_n, .cmd_valid(pm_cmd_valid), .cmd_ready(pm_cmd_ready),
    .cmd_op(pm_cmd_op), .cmd_src0(pm_cmd_src0), .cmd_src1(pm_cmd_src1),
    .cmd_dst(pm_cmd_dst), .done(pm_done),
    .host_we(mem_we), .host_re(host_re && !samp_we),
    .host_slot(samp_we ? slot_q : host_slot), .host_addr(mem_addr),
    .host_wdata(mem_wdata), .host_rdata, .host_rvalid
  );

  a_no_host_write_while_sampling: assert property (@(posedge clk) disable iff (!rst_n)
                                                   samp_we |-> !host_we);
endmodule
