// tb_troika_iota_tx: hashes one IOTA-transaction-sized message, 2673 trytes
// = 8019 trits, which pads to 34 blocks of 243 trits (33 message blocks
// plus a block holding only the padding). The host model overlaps the start
// pulse with its last rate write, so each block costs 243 load cycles plus
// 35232 permutation cycles = 35475 cycles; this is checked for every block.
// The 243-trit digest read at the end is compared with the reference model.
module tb_troika_iota_tx;
  import troika_pkg::*;
  import troika_ref_pkg::*;

  localparam int MSG_TRITS = 2673 * 3;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic host_en = 0, host_we = 0, start = 0;
  logic [RAM1_AW-1:0] host_addr = '0;
  trit2_t host_wdata = '0, host_rdata;
  logic busy, done;
  phase_e phase;
  logic [4:0] round;

  troika_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1300000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned msg [$];
    trits_t st;
    int nblk, cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < MSG_TRITS; i++) msg.push_back($urandom_range(2));
    msg.push_back(1);
    while (msg.size() % 243 != 0) msg.push_back(0);
    nblk = msg.size() / 243;
    checks++;
    if (nblk != 34) begin failures++; $display("FAIL %0d blocks", nblk); end
    // zero capacity once, before the first block
    for (int i = 243; i < 729; i++) begin
      host_en = 1; host_we = 1; host_addr = RAM1_AW'(i); host_wdata = '0;
      @(negedge clk);
    end
    foreach (st[i]) st[i] = 0;
    for (int b = 0; b < nblk; b++) begin
      cyc = 0;
      for (int i = 0; i < 243; i++) begin
        st[i] = msg[b*243 + i];
        host_en = 1; host_we = 1; host_addr = RAM1_AW'(i); host_wdata = trit2_t'(st[i]);
        start = (i == 242);
        cyc++;
        @(negedge clk);
      end
      host_en = 0; host_we = 0; start = 0;
      while (busy) begin cyc++; @(negedge clk); end
      checks++;
      if (cyc != 35475) begin failures++; $display("FAIL block %0d took %0d cycles", b, cyc); end
      ref_permute(st, 24);
    end
    // squeeze: digest = rate
    for (int i = 0; i < 243; i++) begin
      host_en = 1; host_we = 0; host_addr = RAM1_AW'(i);
      @(negedge clk);
      host_en = 0;
      @(negedge clk);
      checks++;
      if (int'(host_rdata) != st[i]) begin
        failures++;
        if (failures < 5) $display("FAIL digest trit %0d = %0d exp %0d", i, host_rdata, st[i]);
      end
    end
    $display("hashed %0d trits in %0d blocks", MSG_TRITS, nblk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
