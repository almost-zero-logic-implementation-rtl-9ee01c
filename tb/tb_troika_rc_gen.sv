// tb_troika_rc_gen: steps the round-constant LFSR through two full
// permutations' worth of constants (2 x 24 x 243 steps, with random idle
// cycles between steps and a reload in between) and compares every output
// trit with the reference model's integer LFSR.
module tb_troika_rc_gen;
  import troika_pkg::*;
  import troika_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  trit3_t rc;
  int unsigned exp_rc [24*243];

  troika_rc_gen dut (.*);
  always #5 clk = ~clk;

  function automatic int unsigned dec(trit3_t t); return t[2] ? 2 : t[1] ? 1 : 0; endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_rc(exp_rc);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      // disturb the state, then reload
      step = 1; repeat (5 + pass) @(negedge clk); step = 0;
      load = 1; @(negedge clk); load = 0;
      for (int n = 0; n < 24*243; n++) begin
        checks++;
        if (dec(rc) != exp_rc[n] || !$onehot(rc)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d rc=%b exp %0d", n, rc, exp_rc[n]);
        end
        step = 1; @(negedge clk); step = 0;
        if ($urandom_range(3) == 0) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
