// troika_coord_cnt: walks the 9 x 3 x 27 state cuboid one trit per step.
//
// Keeps a (slice, row, column) coordinate. With row_first = 0 it walks in
// address order (column fastest, then row, then slice), which is the order
// of Phase 1; with row_first = 1 it walks column by column (row fastest,
// then column, then slice), which is the order of Phase 2. After 729 steps
// it is back at (0,0,0). clear has priority and returns it to (0,0,0).
// The coordinate is registered: it changes one cycle after step.
// This counter is this design's way of generating the addressing scheme.
module troika_coord_cnt
  import troika_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       step,
  input  logic       row_first,
  output logic [4:0] slice,
  output logic [1:0] row,
  output logic [3:0] col
);
  logic row_wrap, col_wrap;
  assign row_wrap = (row == 2'(N_ROWS - 1));
  assign col_wrap = (col == 4'(N_COLS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slice <= '0; row <= '0; col <= '0;
    end else if (clear) begin
      slice <= '0; row <= '0; col <= '0;
    end else if (step) begin
      if (!row_first) begin
        col <= col_wrap ? '0 : col + 4'd1;
        if (col_wrap) begin
          row <= row_wrap ? '0 : row + 2'd1;
          if (row_wrap) slice <= (slice == 5'(N_SLICES - 1)) ? '0 : slice + 5'd1;
        end
      end else begin
        row <= row_wrap ? '0 : row + 2'd1;
        if (row_wrap) begin
          col <= col_wrap ? '0 : col + 4'd1;
          if (col_wrap) slice <= (slice == 5'(N_SLICES - 1)) ? '0 : slice + 5'd1;
        end
      end
    end
  end
endmodule
