// tb_trit_2to3: checks the 2-bit to one-hot trit conversion for the three
// legal codes, and that converting back (d1 = b2, d0 = b1) restores them.
module tb_trit_2to3;
  import troika_pkg::*;
  int checks = 0, failures = 0;
  trit2_t d;
  trit3_t b;
  trit_2to3 dut (.d, .b);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 3; v++) begin
      d = 2'(v);
      #1;
      checks++;
      if (b !== 3'(1 << v)) begin failures++; $display("FAIL %0d -> %b", v, b); end
      checks++;
      if ({b[2], b[1]} !== d) begin failures++; $display("FAIL roundtrip %0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
