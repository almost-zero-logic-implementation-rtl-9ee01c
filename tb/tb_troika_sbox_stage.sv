// tb_troika_sbox_stage: streams random trytes, one trit per cycle and with
// no gaps, into the S-box stage and checks that each trit of each S-box
// output (reference model) appears on q exactly three cycles after the
// tryte's last trit entered, i.e. trit j of the stream leaves 3 cycles after
// trit j+2 entered. A short idle gap in the middle checks that the stage
// restarts cleanly.
module tb_troika_sbox_stage;
  import troika_pkg::*;
  import troika_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [1:0] pos = '0;
  trit3_t d = T3_ZERO, q;

  troika_sbox_stage dut (.*);
  always #5 clk = ~clk;

  function automatic int unsigned dec(trit3_t t); return t[2] ? 2 : t[1] ? 1 : 0; endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected q after each clock edge, indexed by edge number
  int exp_q [int];
  int edge_n = 0;
  always @(posedge clk) begin
    edge_n++;
    #1;
    if (exp_q.exists(edge_n)) begin
      checks++;
      if (dec(q) != exp_q[edge_n]) begin
        failures++; $display("FAIL edge %0d q=%0d exp %0d", edge_n, dec(q), exp_q[edge_n]);
      end
    end
  end

  initial begin
    tryte_t x, y;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int blk = 0; blk < 2; blk++) begin
      for (int k = 0; k < 100; k++) begin
        for (int i = 0; i < 3; i++) x[i] = $urandom_range(2);
        y = ref_sbox(x);
        for (int i = 0; i < 3; i++) begin
          valid = 1; pos = 2'(i); d = trit3_t'(1 << x[i]);
          // sampled at edge edge_n+1; outputs after that edge and the next two
          if (i == 2) for (int o = 0; o < 3; o++) exp_q[edge_n + 1 + o] = int'(y[o]);
          @(negedge clk);
        end
      end
      valid = 0;
      repeat (7) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
