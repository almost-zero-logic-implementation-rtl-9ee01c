// troika_ctrl: sequencing and address generation of the serial Troika core.
//
// A permutation is 24 rounds of two phases, each exactly PHASE_CYCLES = 734
// cycles long (729 trits plus a 5-cycle pipeline), 35232 cycles in all:
//   Phase 1 (SubTrytes, ShiftRows, ShiftLanes): RAM-1 port A reads the state
//     (addresses 0..728) in order; the S-box stage returns each trit five
//     cycles later and it is written, at its ShiftRows+ShiftLanes
//     destination, to the second half of RAM-1 (port B, 729 + dest) and to
//     RAM-2 (port A, dest).
//   Phase 2 (AddColumnParity, AddRoundConstant): column by column, row by
//     row, RAM-1 port B reads the column's own trit from the second half,
//     RAM-2 port A the trit of column x-1 (same slice) and RAM-2 port B the
//     trit of column x+1 in slice z+1; five cycles later the updated trit is
//     written back to the first half of RAM-1 through port A.
// Three coordinate counters track the read position (cycle j), the
// lookup position (j+3, implementation 3 only) and the write position
// (j+5). For the write destination of trit (z, y, x) in Phase 1:
//   x' = (x + 3*SHIFT_ROWS[y]) mod 9,  z' = (z + SHIFT_LANES[9y + x']) mod 27.
// With LANES_IN_RAM the shift amount is instead read from RAM-2 (port B,
// address 729 + 9y + x') two cycles ahead of the write, as in
// implementation 3.
//
// Interface: start (one cycle, ignored while busy) begins a permutation;
// busy is high for exactly 35232 cycles from the next cycle; done pulses in
// the cycle after the last one. d_valid/d_pos mark, two cycles after each
// read, the trit on the RAM outputs and its position within its tryte
// (Phase 1) or column (Phase 2). The round-constant LFSR is reloaded on
// start and stepped after every row-0 write of Phase 2 (add_rc).
// The phase structure, read/write ports per phase and cycle counts follow
// the architecture; the 5-cycle pipeline split, the counter-based address
// generation and the start/busy/done handshake are this design's choices.
// The ShiftRows amounts and ShiftLanes table come from the Troika
// specification.
module troika_ctrl
  import troika_pkg::*;
#(
  parameter bit LANES_IN_RAM = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output phase_e              phase,
  output logic [4:0]          round,
  // RAM-1 port A: Phase-1 read, Phase-2 write
  output logic                r1a_en,
  output logic                r1a_we,
  output logic [RAM1_AW-1:0]  r1a_addr,
  // RAM-1 port B: Phase-1 write, Phase-2 read
  output logic                r1b_en,
  output logic                r1b_we,
  output logic [RAM1_AW-1:0]  r1b_addr,
  // RAM-2 port A: Phase-1 write, Phase-2 read (column x-1)
  output logic                r2a_en,
  output logic                r2a_we,
  output logic [RAM2_AW-1:0]  r2a_addr,
  // RAM-2 port B: Phase-1 lane-table read (LANES_IN_RAM), Phase-2 read
  output logic                r2b_en,
  output logic [RAM2_AW-1:0]  r2b_addr,
  input  logic [LANE_W-1:0]   lane_shift,   // RAM-2 port B data
  // datapath control
  output logic                d_valid,
  output logic [1:0]          d_pos,
  output logic                add_rc,
  output logic                rc_load,
  output logic                rc_step
);
  localparam int unsigned LAST = PHASE_CYCLES - 1;   // 733

  logic [9:0] cnt;
  logic       active, last, phase_clear, row_first;
  logic       rd_act, lk_act, wr_act;

  assign active    = (phase != PH_IDLE);
  assign busy      = active;
  assign last      = active && (cnt == 10'(LAST));
  assign row_first = (phase == PH_TWO);

  // ------------------------------------------------------- phase sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      round <= '0;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        cnt <= '0;
        if (start) begin
          phase <= PH_ONE;
          round <= '0;
        end
      end else if (last) begin
        cnt <= '0;
        if (phase == PH_ONE) begin
          phase <= PH_TWO;
        end else if (round == 5'(N_ROUNDS - 1)) begin
          phase <= PH_IDLE;
          done  <= 1'b1;
        end else begin
          phase <= PH_ONE;
          round <= round + 5'd1;
        end
      end else begin
        cnt <= cnt + 10'd1;
      end
    end
  end

  assign rc_load     = !active && start;
  assign phase_clear = rc_load || last;

  // read stage: cycles 0..728, lookup stage: 3..731, write stage: 5..733
  assign rd_act = active && (cnt < 10'(STATE_TRITS));
  assign lk_act = active && (cnt >= 10'd3) && (cnt < 10'(STATE_TRITS + 3));
  assign wr_act = active && (cnt >= 10'(PIPE_LAT));

  logic [4:0] rz, lz, wz;
  logic [1:0] ry, ly, wy;
  logic [3:0] rx, lx, wx;

  troika_coord_cnt u_rd (.clk, .rst_n, .clear(phase_clear), .step(rd_act),
                         .row_first, .slice(rz), .row(ry), .col(rx));
  troika_coord_cnt u_lk (.clk, .rst_n, .clear(phase_clear), .step(lk_act),
                         .row_first, .slice(lz), .row(ly), .col(lx));
  troika_coord_cnt u_wr (.clk, .rst_n, .clear(phase_clear), .step(wr_act),
                         .row_first, .slice(wz), .row(wy), .col(wx));

  // ------------------------------------------------------ address helpers
  function automatic logic [9:0] lin(logic [4:0] z, logic [1:0] y, logic [3:0] x);
    return 10'(z) * 10'(SLICE_TRITS) + 10'(y) * 10'(N_COLS) + 10'(x);
  endfunction

  // column after ShiftRows
  function automatic logic [3:0] sr_col(logic [1:0] y, logic [3:0] x);
    logic [4:0] t;
    t = 5'(x) + 5'(3 * SHIFT_ROWS[y]);
    return (t >= 5'(N_COLS)) ? 4'(t - 5'(N_COLS)) : 4'(t);
  endfunction

  // (a + b) mod 27 for a, b < 27
  function automatic logic [4:0] add27(logic [4:0] a, logic [4:0] b);
    logic [5:0] t;
    t = 6'(a) + 6'(b);
    return (t >= 6'(N_SLICES)) ? 5'(t - 6'(N_SLICES)) : 5'(t);
  endfunction

  // neighbours for AddColumnParity
  logic [3:0] rx_m1, rx_p1;
  logic [4:0] rz_p1;
  assign rx_m1 = (rx == 4'd0) ? 4'(N_COLS - 1) : rx - 4'd1;
  assign rx_p1 = (rx == 4'(N_COLS - 1)) ? 4'd0 : rx + 4'd1;
  assign rz_p1 = add27(rz, 5'd1);

  // Phase-1 destination of the trit being written
  logic [3:0] wx_sr, lx_sr;
  logic [4:0] lane_amt, wz_sl;
  logic [9:0] dest;
  assign wx_sr = sr_col(wy, wx);
  assign lx_sr = sr_col(ly, lx);
  if (LANES_IN_RAM) begin : g_lane_ram
    assign lane_amt = lane_shift;
  end else begin : g_lane_lut
    assign lane_amt = SHIFT_LANES[5'(wy) * 5'(N_COLS) + 5'(wx_sr)];
  end
  assign wz_sl = add27(wz, lane_amt);
  assign dest  = lin(wz_sl, wy, wx_sr);

  // ------------------------------------------------------------ RAM ports
  always_comb begin
    r1a_en = 1'b0; r1a_we = 1'b0; r1a_addr = '0;
    r1b_en = 1'b0; r1b_we = 1'b0; r1b_addr = '0;
    r2a_en = 1'b0; r2a_we = 1'b0; r2a_addr = '0;
    r2b_en = 1'b0; r2b_addr = '0;
    unique case (phase)
      PH_ONE: begin
        r1a_en   = rd_act;
        r1a_addr = 11'(lin(rz, ry, rx));
        r1b_en   = wr_act;
        r1b_we   = wr_act;
        r1b_addr = 11'(STATE_TRITS) + 11'(dest);
        r2a_en   = wr_act;
        r2a_we   = wr_act;
        r2a_addr = dest;
        if (LANES_IN_RAM) begin
          r2b_en   = lk_act;
          r2b_addr = 10'(LANE_BASE) + 10'(ly) * 10'(N_COLS) + 10'(lx_sr);
        end
      end
      PH_TWO: begin
        r1b_en   = rd_act;
        r1b_addr = 11'(STATE_TRITS) + 11'(lin(rz, ry, rx));
        r2a_en   = rd_act;
        r2a_addr = lin(rz, ry, rx_m1);
        r2b_en   = rd_act;
        r2b_addr = lin(rz_p1, ry, rx_p1);
        r1a_en   = wr_act;
        r1a_we   = wr_act;
        r1a_addr = 11'(lin(wz, wy, wx));
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------ datapath control
  // data of the read issued in cycle j is on the RAM outputs in cycle j+2
  assign d_valid = active && (cnt >= 10'd2) && (cnt < 10'(STATE_TRITS + 2));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               d_pos <= '0;
    else if (phase_clear)     d_pos <= '0;
    else if (d_valid)         d_pos <= (d_pos == 2'd2) ? 2'd0 : d_pos + 2'd1;
  end

  assign add_rc  = (phase == PH_TWO) && wr_act && (wy == 2'd0);
  assign rc_step = add_rc;

  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n)
      done |-> !busy);
endmodule
