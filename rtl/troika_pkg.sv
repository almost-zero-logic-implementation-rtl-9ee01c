// troika_pkg: shared types and constants of the BRAM-based Troika hash core.
//
// The Troika state is 729 trits arranged as a 9 x 3 x 27 cuboid (columns x rows
// x slices). Trit (slice s, row r, column c) lives at linear address
// s*27 + r*9 + c, so the 243-trit rate is the first nine slices (addresses
// 0..242). Two trit encodings are used:
//   * trit2_t, the plain binary code d1d0 = 00/01/10 for 0/1/2, used for
//     storage in implementations 2 and 3 and on the host port;
//   * trit3_t, a one-hot code b2b1b0 = 001/010/100 for 0/1/2, used by all
//     arithmetic and for storage in implementation 1.
// The permutation constants (ShiftRows amounts, ShiftLanes table) and the
// round-constant LFSR definition are collected here so that the controller,
// the round-constant generator and the RAM initialisation agree on them.
// The ShiftRows amounts and the ShiftLanes table are those of the Troika
// reference specification; the round-constant LFSR feedback and seed are this
// design's own choice (see troika_rc_gen).
package troika_pkg;

  // ---------------------------------------------------------------- geometry
  localparam int unsigned N_COLS       = 9;
  localparam int unsigned N_ROWS       = 3;
  localparam int unsigned N_SLICES     = 27;
  localparam int unsigned SLICE_TRITS  = N_COLS * N_ROWS;        // 27
  localparam int unsigned STATE_TRITS  = SLICE_TRITS * N_SLICES; // 729
  localparam int unsigned RATE_TRITS   = 243;
  localparam int unsigned N_ROUNDS     = 24;

  // RAM-1 holds two copies of the state (1458 trits), RAM-2 one copy plus,
  // in implementation 3, the 27-entry ShiftLanes table.
  localparam int unsigned RAM1_DEPTH   = 2 * STATE_TRITS;        // 1458
  localparam int unsigned RAM2_DEPTH   = STATE_TRITS;            // 729
  localparam int unsigned RAM2_DEPTH3  = STATE_TRITS + SLICE_TRITS; // 756
  localparam int unsigned LANE_BASE    = STATE_TRITS;            // table at 729..755
  localparam int unsigned LANE_W       = 5;                      // 0..26 needs 5 bits

  localparam int unsigned RAM1_AW      = 11;
  localparam int unsigned RAM2_AW      = 10;

  // Pipeline: a trit read in cycle t of a phase is written back in cycle t+5.
  localparam int unsigned PIPE_LAT     = 5;
  localparam int unsigned PHASE_CYCLES = STATE_TRITS + PIPE_LAT; // 734
  localparam int unsigned PERM_CYCLES  = 2 * N_ROUNDS * PHASE_CYCLES; // 35232

  // ------------------------------------------------------------------ types
  typedef logic [1:0] trit2_t;   // 00=0, 01=1, 10=2
  typedef logic [2:0] trit3_t;   // 001=0, 010=1, 100=2

  localparam trit3_t T3_ZERO = 3'b001;
  localparam trit3_t T3_ONE  = 3'b010;
  localparam trit3_t T3_TWO  = 3'b100;

  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,   // host owns RAM-1 port A (WriteInput / ReadOutput)
    PH_ONE  = 2'd1,   // SubTrytes + ShiftRows + ShiftLanes
    PH_TWO  = 2'd2    // AddColumnParity + AddRoundConstant
  } phase_e;

  // --------------------------------------------------------------- constants
  // ShiftRows: row r is rotated by SHIFT_ROWS[r] trytes (3 trits per tryte).
  localparam int unsigned SHIFT_ROWS [N_ROWS] = '{0, 1, 2};

  // ShiftLanes: the lane at (row r, column c), after ShiftRows, is rotated
  // along the slice axis by SHIFT_LANES[r*9 + c] positions.
  localparam logic [LANE_W-1:0] SHIFT_LANES [SLICE_TRITS] = '{
    5'd19, 5'd13, 5'd21, 5'd10, 5'd24, 5'd15, 5'd2,  5'd9,  5'd3,
    5'd14, 5'd0,  5'd6,  5'd5,  5'd1,  5'd25, 5'd22, 5'd23, 5'd20,
    5'd7,  5'd17, 5'd26, 5'd12, 5'd8,  5'd18, 5'd16, 5'd11, 5'd4
  };

  // Round-constant LFSR: 11 ternary stages s[0..10]; the constant is s[0];
  // each step shifts s[i] <= s[i+1] and s[10] <= s[RC_TAP] - s[0] (mod 3).
  // The polynomial has the maximal period 3^11 - 1.
  localparam int unsigned RC_STAGES = 11;
  localparam int unsigned RC_TAP    = 2;
  localparam trit3_t      RC_SEED   = T3_ONE;   // every stage starts at 1

  // --------------------------------------------------------------- helpers
  // Encoding conversions (the same equations as trit_2to3 / trit_3to2).
  function automatic trit3_t to_t3(trit2_t d);
    return {d[1], d[0], ~(d[1] | d[0])};
  endfunction

  function automatic trit2_t to_t2(trit3_t b);
    return {b[2], b[1]};
  endfunction

endpackage
