// polymul_top: NTT-based polynomial multiplier for CRYSTALS-Kyber
// (n = 256, q = 3329).
//
// Polynomials live in NUM_POLY slots (poly_ram), each read and written four
// coefficients per cycle.  Three commands run on them:
//   OP_NTT  (slot cmd_dst, in place): normal order -> Kyber NTT domain
//           (bit-reversed order), 7 layers in 4 rounds of the butterfly core
//   OP_INTT (slot cmd_dst, in place): NTT domain -> normal order, including
//           the 1/128 scaling
//   OP_PWM  (cmd_src0 o cmd_src1 -> cmd_dst): point-wise product in the NTT
//           domain
// so a product f*g mod (X^256+1) is NTT(f), NTT(g), PWM, INTT, with no
// bit-reversal pass anywhere.  The butterfly core (pmc) uses K2-RED
// reduction and twiddles from twiddle_rom; the point-wise unit (pwm_unit)
// shares the twiddle ROM.
//
// Host port: while the accelerator is idle the host writes (host_we) and
// reads (host_re) one group of four consecutive coefficients
// 4*addr .. 4*addr+3 per cycle; read data appear RAM_LAT = 2 cycles later
// with host_rvalid.  Command handshake: cmd_valid is taken when cmd_ready is
// high; done pulses when the result is in memory.  Cycle counts: NTT and
// INTT 4 x 75 = 300 cycles, PWM 75 cycles (see polymul_ctrl).
// The slot count and the host/command interface are this design's choice.
module polymul_top
  import ntt_pkg::*;
#(
  parameter int unsigned NUM_POLY = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // command interface
  input  logic   cmd_valid,
  output logic   cmd_ready,
  input  op_e    cmd_op,
  input  logic [$clog2(NUM_POLY)-1:0] cmd_src0,
  input  logic [$clog2(NUM_POLY)-1:0] cmd_src1,
  input  logic [$clog2(NUM_POLY)-1:0] cmd_dst,
  output logic   done,
  // host memory port
  input  logic   host_we,
  input  logic   host_re,
  input  logic [$clog2(NUM_POLY)-1:0] host_slot,
  input  logic [AW-1:0] host_addr,
  input  group_t host_wdata,
  output group_t host_rdata,
  output logic   host_rvalid
);
  localparam int unsigned SW = $clog2(NUM_POLY);

  logic          busy, rd_en, wb_en;
  op_e           op;
  gidx_t         rd_idx, wb_idx, host_idx;
  pmc_mode_e     dp_mode;
  tidx_t [3:0]   dp_tw_idx;
  coef_t [3:0]   tw;
  group_t        rd_a, rd_b, pmc_z, pwm_r, wb_data;
  group_t        slot_rd [NUM_POLY];
  logic [SW-1:0] src0_q, src1_q, dst_q, host_slot_d [RAM_LAT];
  logic [RAM_LAT-1:0] host_re_d;

  // command operands are held for the whole command
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      src0_q <= '0;
      src1_q <= '0;
      dst_q  <= '0;
    end else if (cmd_valid && cmd_ready) begin
      src0_q <= (cmd_op == OP_PWM) ? cmd_src0 : cmd_dst;
      src1_q <= cmd_src1;
      dst_q  <= cmd_dst;
    end

  polymul_ctrl u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_op, .busy, .op, .done,
    .rd_en, .rd_idx, .dp_mode, .dp_tw_idx, .wb_en, .wb_idx
  );

  // host group addr -> four consecutive coefficient indices
  always_comb
    for (int l = 0; l < LANES; l++) host_idx[l] = {host_addr, 2'(l)};

  for (genvar s = 0; s < NUM_POLY; s++) begin : g_slot
    logic  re, we;
    gidx_t ridx, widx;
    group_t wdat;
    always_comb begin
      if (busy) begin
        re   = rd_en && (src0_q == SW'(s) || src1_q == SW'(s));
        ridx = rd_idx;
        we   = wb_en && (dst_q == SW'(s));
        widx = wb_idx;
        wdat = wb_data;
      end else begin
        re   = host_re && (host_slot == SW'(s));
        ridx = host_idx;
        we   = host_we && (host_slot == SW'(s));
        widx = host_idx;
        wdat = host_wdata;
      end
    end
    poly_ram u_ram (.clk, .rd_en(re), .rd_idx(ridx), .rd_data(slot_rd[s]),
                    .wr_en(we), .wr_idx(widx), .wr_data(wdat));
  end

  assign rd_a = slot_rd[src0_q];
  assign rd_b = slot_rd[src1_q];

  twiddle_rom u_tw (.idx(dp_tw_idx), .w(tw));

  pmc u_pmc (.clk, .mode(dp_mode), .x(rd_a), .tw(tw), .z(pmc_z));

  pwm_unit u_pwm (.clk, .a(rd_a), .b(rd_b), .zs(tw[0]), .r(pwm_r));

  assign wb_data = (op == OP_PWM) ? pwm_r : pmc_z;

  // host read return path
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) host_re_d <= '0;
    else        host_re_d <= {host_re_d[RAM_LAT-2:0], host_re && !busy};

  always_ff @(posedge clk) begin
    host_slot_d[0] <= host_slot;
    for (int i = 1; i < RAM_LAT; i++) host_slot_d[i] <= host_slot_d[i-1];
  end

  assign host_rvalid = host_re_d[RAM_LAT-1];
  assign host_rdata  = slot_rd[host_slot_d[RAM_LAT-1]];

  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                busy |-> !(host_we || host_re));
endmodule
