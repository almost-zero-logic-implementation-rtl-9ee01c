// tb_troika_coord_cnt: walks the cuboid twice in each order and checks
// every coordinate: address order (column fastest) and column order (row
// fastest), the wrap back to (0,0,0) after 729 steps, hold when step is low
// and clear.
module tb_troika_coord_cnt;
  import troika_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, step = 0, row_first = 0;
  logic [4:0] slice;
  logic [1:0] row;
  logic [3:0] col;

  troika_coord_cnt dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_at(int s, int r, int c);
    checks++;
    if (slice != 5'(s) || row != 2'(r) || col != 4'(c)) begin
      failures++;
      if (failures < 10) $display("FAIL got (%0d,%0d,%0d) exp (%0d,%0d,%0d)", slice, row, col, s, r, c);
    end
  endtask

  initial begin
    int s, r, c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      row_first = mode[0];
      clear = 1; @(negedge clk); clear = 0;
      for (int n = 0; n < 2*729; n++) begin
        int k;
        k = n % 729;
        if (!row_first) begin s = k / 27; r = (k / 9) % 3; c = k % 9; end
        else            begin s = k / 27; c = (k / 3) % 9; r = k % 3; end
        expect_at(s, r, c);
        if (n % 100 == 7) begin @(negedge clk); expect_at(s, r, c); end  // hold
        step = 1; @(negedge clk); step = 0;
      end
      expect_at(0, 0, 0);
      step = 1; repeat (40) @(negedge clk); step = 0;
      clear = 1; @(negedge clk); clear = 0;
      expect_at(0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
