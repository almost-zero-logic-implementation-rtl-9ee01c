// tb_troika_sbox: exhaustive S-box check. Each of the 27 trytes is compared
// with (a) the Feistel definition evaluated on integers by the reference
// model and (b) the published Troika S-box table (input/output as
// 9*x0 + 3*x1 + x2).
module tb_troika_sbox;
  import troika_pkg::*;
  import troika_ref_pkg::*;
  int checks = 0, failures = 0;
  trit3_t x0, x1, x2, y0, y1, y2;
  troika_sbox dut (.*);

  localparam int unsigned SBOX_TABLE [27] = '{
    6, 25, 17, 5, 15, 10, 4, 20, 24, 0, 1, 2, 9, 22, 26, 18, 16, 14,
    3, 13, 23, 7, 11, 12, 8, 21, 19 };

  function automatic trit3_t enc(int unsigned v); return trit3_t'(1 << v); endfunction
  function automatic int unsigned dec(trit3_t t);
    return t[2] ? 2 : t[1] ? 1 : 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tryte_t x, y;
    int unsigned got;
    for (int v = 0; v < 27; v++) begin
      x[0] = v / 9; x[1] = (v / 3) % 3; x[2] = v % 3;
      x0 = enc(x[0]); x1 = enc(x[1]); x2 = enc(x[2]);
      #1;
      y = ref_sbox(x);
      got = 9*dec(y0) + 3*dec(y1) + dec(y2);
      checks++;
      if (y0 !== enc(y[0]) || y1 !== enc(y[1]) || y2 !== enc(y[2])) begin
        failures++; $display("FAIL model sbox(%0d) = %0d", v, got);
      end
      checks++;
      if (got != SBOX_TABLE[v]) begin
        failures++; $display("FAIL table sbox(%0d) = %0d exp %0d", v, got, SBOX_TABLE[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
