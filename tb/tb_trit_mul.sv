// tb_trit_mul: exhaustive check of the one-hot ternary multiplier against
// integer multiplication modulo 3 (all 9 input pairs).
module tb_trit_mul;
  import troika_pkg::*;
  int checks = 0, failures = 0;
  trit3_t a, b, y;
  trit_mul dut (.a, .b, .y);

  function automatic trit3_t enc(int v); return trit3_t'(1 << v); endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        a = enc(i); b = enc(j);
        #1;
        checks++;
        if (y !== enc((i * j) % 3)) begin
          failures++;
          $display("FAIL %0d*%0d -> %b", i, j, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
