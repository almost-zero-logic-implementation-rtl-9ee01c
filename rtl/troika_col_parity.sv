// troika_col_parity: Phase-2 datapath (AddColumnParity + AddRoundConstant).
//
// For every column (slice z, column x) the core streams, one row per cycle,
// three trit triples: m = the column's own trit (from RAM-1), a = the trit
// of column x-1 in slice z (RAM-2 port A) and b = the trit of column x+1 in
// slice z+1 (RAM-2 port B). The block
//   * adds a+b and accumulates it over the three rows (accumulator cleared
//     by pos==0), so after the third row it holds the sum of the two
//     adjacent column parities p;
//   * latches p into an update register (UPD) on the third row;
//   * delays each m by three cycles and adds p to it, so the updated column
//     leaves on q one trit per cycle, row 0 first;
//   * adds the round-constant trit rc to the row-0 trit only (add_rc).
// Timing: a row entering in cycle t leaves on q in cycle t+3, so in the
// core a read issued in cycle j is written back in cycle j+5. add_rc must
// be high in the cycle q carries a row-0 trit, and rc must be valid then.
// The adder/register arrangement follows the document's block diagram; the
// exact delay-line length is this design's choice.
module troika_col_parity
  import troika_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,   // m, a, b carry trits of one row
  input  logic [1:0] pos,     // row of m within its column
  input  trit3_t     m,
  input  trit3_t     a,
  input  trit3_t     b,
  input  trit3_t     rc,      // round-constant trit of the output column
  input  logic       add_rc,  // q is a row-0 trit: add rc
  output trit3_t     q
);
  trit3_t ab, acc_sum, acc_in, acc, upd;
  trit3_t m_dly [3];
  trit3_t col_out, col_rc;

  trit_add u_ab  (.a(a),  .b(b),  .y(ab));
  trit_add u_acc (.a(acc), .b(ab), .y(acc_sum));
  // CLR: the first row of a column starts a fresh sum
  assign acc_in = (pos == 2'd0) ? ab : acc_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= T3_ZERO;
      upd   <= T3_ZERO;
      m_dly <= '{default: T3_ZERO};
    end else begin
      if (valid) acc <= acc_in;
      if (valid && pos == 2'd2) upd <= acc_in;   // UPD: full parity sum
      m_dly[0] <= m;
      m_dly[1] <= m_dly[0];
      m_dly[2] <= m_dly[1];
    end
  end

  trit_add u_col (.a(m_dly[2]), .b(upd), .y(col_out));
  trit_add u_rc  (.a(col_out),  .b(rc),  .y(col_rc));

  assign q = add_rc ? col_rc : col_out;
endmodule
