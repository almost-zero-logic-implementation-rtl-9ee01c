// tb_troika_col_parity: streams random columns (three rows each, no gaps)
// into the AddColumnParity/AddRoundConstant datapath and checks every output
// trit, three cycles after its row entered, against
//   q[row] = m[row] + sum(a[0..2]) + sum(b[0..2]) (+ rc for row 0)  (mod 3)
// computed on integers. add_rc is driven for row-0 outputs only, with a
// fresh random rc per column.
module tb_troika_col_parity;
  import troika_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, valid = 0, add_rc = 0;
  logic [1:0] pos = '0;
  trit3_t m = T3_ZERO, a = T3_ZERO, b = T3_ZERO, rc = T3_ZERO, q;

  troika_col_parity dut (.*);
  always #5 clk = ~clk;

  function automatic int unsigned dec(trit3_t t); return t[2] ? 2 : t[1] ? 1 : 0; endfunction
  function automatic trit3_t enc(int unsigned v); return trit3_t'(1 << v); endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [int];
  int rc_at [int];     // rc to present (with add_rc) while q is checked after edge n
  int edge_n = 0;
  always @(posedge clk) begin
    edge_n++;
    if (rc_at.exists(edge_n)) begin add_rc = 1; rc = enc(rc_at[edge_n]); end
    else begin add_rc = 0; rc = enc($urandom_range(2)); end
    #1;
    if (exp_q.exists(edge_n)) begin
      checks++;
      if (dec(q) != exp_q[edge_n]) begin
        failures++; $display("FAIL edge %0d q=%0d exp %0d", edge_n, dec(q), exp_q[edge_n]);
      end
    end
  end
  initial begin
    int unsigned mm [3], p, r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int col = 0; col < 300; col++) begin
      p = 0;
      r = $urandom_range(2);
      for (int i = 0; i < 3; i++) begin
        int unsigned av, bv;
        mm[i] = $urandom_range(2); av = $urandom_range(2); bv = $urandom_range(2);
        p += av + bv;
        valid = 1; pos = 2'(i); m = enc(mm[i]); a = enc(av); b = enc(bv);
        if (i == 2) begin
          // row k was sampled at edge edge_n-1+k and leaves after edge edge_n+1+k
          for (int k = 0; k < 3; k++)
            exp_q[edge_n + 1 + k] = int'((mm[k] + p + (k == 0 ? r : 0)) % 3);
          rc_at[edge_n + 1] = int'(r);
        end
        @(negedge clk);
      end
      if (col % 50 == 49) begin valid = 0; repeat (4) @(negedge clk); end
    end
    valid = 0;
    repeat (6) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
