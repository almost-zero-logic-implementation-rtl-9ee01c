// troika_top: BRAM-based serial Troika permutation core ("almost-zero logic").
//
// The whole 729-trit Troika state lives in two dual-port RAMs and is
// processed one trit per cycle by a single S-box, a single column-parity
// accumulator and a round-constant LFSR:
//   RAM-1 (1458 trits): first half = state between rounds, second half =
//     state after SubTrytes/ShiftRows/ShiftLanes;
//   RAM-2 (729 trits):  a second copy of that intermediate state, so that
//     Phase 2 can read three columns per cycle (one from RAM-1, two from
//     RAM-2's two ports).
// Each round is Phase 1 then Phase 2 (see troika_ctrl), 734 cycles each, so
// a 24-round permutation takes 35232 cycles.
//
// IMPL selects the storage variant:
//   1 - trits stored one-hot in 3 bits (1458x3 and 729x3 RAMs), ShiftLanes
//       table in logic;
//   2 - trits stored in 2 bits (00/01/10), converted to one-hot at every
//       RAM read port and back at every write port;
//   3 - as 2, and the ShiftLanes table is held in RAM-2 words 729..755
//       (RAM-2 is 756x5).
// All three compute the same permutation in the same number of cycles.
//
// Host interface (the host processor pads the message and performs the
// sponge absorb/squeeze through RAM-1 port A while the core is idle):
//   host_en/host_we/host_addr/host_wdata write one trit (2-bit binary code)
//   to RAM-1; a read (host_en & !host_we) returns host_rdata two cycles
//   later. The state occupies addresses 0..728, the rate/digest 0..242.
//   The host must leave the port idle while busy. start (one cycle) runs
//   one permutation; busy is high for 35232 cycles and done pulses after.
// The host code page and the conversion at the host port of IMPL 1 are this
// design's choices; the memory map, phases and cycle counts follow the
// architecture description.
module troika_top
  import troika_pkg::*;
#(
  parameter int unsigned IMPL = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // host access to RAM-1 port A
  input  logic               host_en,
  input  logic               host_we,
  input  logic [RAM1_AW-1:0] host_addr,
  input  trit2_t             host_wdata,
  output trit2_t             host_rdata,
  // permutation control
  input  logic               start,
  output logic               busy,
  output logic               done,
  output phase_e             phase,
  output logic [4:0]         round
);
  localparam int unsigned SW      = (IMPL == 1) ? 3 : 2;           // stored trit width
  localparam bit          LANES_R = (IMPL == 3);
  localparam int unsigned R2W     = LANES_R ? LANE_W : SW;
  localparam int unsigned R2DEPTH = LANES_R ? RAM2_DEPTH3 : RAM2_DEPTH;

  // ----------------------------------------------------------- controller
  logic               r1a_en, r1a_we, r1b_en, r1b_we, r2a_en, r2a_we, r2b_en;
  logic [RAM1_AW-1:0] r1a_addr, r1b_addr;
  logic [RAM2_AW-1:0] r2a_addr, r2b_addr;
  logic               d_valid, add_rc, rc_load, rc_step;
  logic [1:0]         d_pos;
  logic [LANE_W-1:0]  lane_shift;

  troika_ctrl #(.LANES_IN_RAM(LANES_R)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .phase, .round,
    .r1a_en, .r1a_we, .r1a_addr, .r1b_en, .r1b_we, .r1b_addr,
    .r2a_en, .r2a_we, .r2a_addr, .r2b_en, .r2b_addr, .lane_shift,
    .d_valid, .d_pos, .add_rc, .rc_load, .rc_step
  );

  // ----------------------------------------------------------------- RAMs
  logic          m1a_en, m1a_we;
  logic [RAM1_AW-1:0] m1a_addr;
  logic [SW-1:0] m1a_wdata, m1a_rdata, m1b_wdata, m1b_rdata;
  logic [R2W-1:0] m2a_wdata, m2a_rdata, m2b_rdata;

  // RAM-1 port A: host while idle, Phase-1 read / Phase-2 write while busy
  assign m1a_en   = busy ? r1a_en   : host_en;
  assign m1a_we   = busy ? r1a_we   : host_we;
  assign m1a_addr = busy ? r1a_addr : host_addr;

  troika_dpram #(.DEPTH(RAM1_DEPTH), .WIDTH(SW), .AW(RAM1_AW)) u_ram1 (
    .clk,
    .a_en(m1a_en), .a_we(m1a_we), .a_addr(m1a_addr), .a_wdata(m1a_wdata), .a_rdata(m1a_rdata),
    .b_en(r1b_en), .b_we(r1b_we), .b_addr(r1b_addr), .b_wdata(m1b_wdata), .b_rdata(m1b_rdata)
  );

  troika_dpram #(.DEPTH(R2DEPTH), .WIDTH(R2W), .AW(RAM2_AW), .INIT_LANES(LANES_R)) u_ram2 (
    .clk,
    .a_en(r2a_en), .a_we(r2a_we), .a_addr(r2a_addr), .a_wdata(m2a_wdata), .a_rdata(m2a_rdata),
    .b_en(r2b_en), .b_we(1'b0),   .b_addr(r2b_addr), .b_wdata('0),        .b_rdata(m2b_rdata)
  );

  assign lane_shift = LANE_W'(m2b_rdata);

  // ---------------------------------------------- encoding at RAM borders
  trit3_t ram1a_t3, ram1b_t3, ram2a_t3, ram2b_t3;   // RAM outputs, one-hot
  trit3_t host_t3;                                  // host data, one-hot
  trit3_t sb_q, cp_q, cp_rc;

  if (SW == 3) begin : g_store3
    // implementation 1: RAMs hold one-hot trits; convert only at the host
    trit_2to3 u_host_in (.d(host_wdata), .b(host_t3));
    assign ram1a_t3  = m1a_rdata;
    assign ram1b_t3  = m1b_rdata;
    assign ram2a_t3  = trit3_t'(m2a_rdata);
    assign ram2b_t3  = trit3_t'(m2b_rdata);
    assign m1a_wdata = busy ? cp_q : host_t3;
    assign m1b_wdata = sb_q;
    assign m2a_wdata = R2W'(sb_q);
    assign host_rdata = to_t2(m1a_rdata);
  end else begin : g_store2
    // implementations 2 and 3: 2-to-3 at every read, 3-to-2 at every write
    assign host_t3 = T3_ZERO;
    trit_2to3 u_c1a (.d(m1a_rdata),     .b(ram1a_t3));
    trit_2to3 u_c1b (.d(m1b_rdata),     .b(ram1b_t3));
    trit_2to3 u_c2a (.d(m2a_rdata[1:0]), .b(ram2a_t3));
    trit_2to3 u_c2b (.d(m2b_rdata[1:0]), .b(ram2b_t3));
    assign m1a_wdata = busy ? to_t2(cp_q) : host_wdata;
    assign m1b_wdata = to_t2(sb_q);
    assign m2a_wdata = R2W'(to_t2(sb_q));
    assign host_rdata = m1a_rdata;
  end

  // ---------------------------------------------------------- datapaths
  troika_sbox_stage u_sub (
    .clk, .rst_n,
    .valid(d_valid && phase == PH_ONE), .pos(d_pos), .d(ram1a_t3),
    .q(sb_q)
  );

  troika_rc_gen u_rc (
    .clk, .rst_n, .load(rc_load), .step(rc_step), .rc(cp_rc)
  );

  troika_col_parity u_acp (
    .clk, .rst_n,
    .valid(d_valid && phase == PH_TWO), .pos(d_pos),
    .m(ram1b_t3), .a(ram2a_t3), .b(ram2b_t3),
    .rc(cp_rc), .add_rc(add_rc), .q(cp_q)
  );

  a_host_idle : assert property (@(posedge clk) disable iff (!rst_n)
      busy |-> !host_en)
    else $error("troika_top: host access while a permutation runs");
endmodule
