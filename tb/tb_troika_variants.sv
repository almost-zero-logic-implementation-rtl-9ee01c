// tb_troika_variants: runs implementations 1, 2 and 3 of the core side by
// side on the same host bus with the same stimulus as tb_troika_top (two
// messages, three permutations) and checks every state trit of every
// variant against the reference model and the 35232-cycle permutation time.
// It also counts the ShiftLanes-table reads that implementation 3 makes from
// RAM-2 during Phase 1 (one per trit).
module tb_troika_variants;
  import troika_pkg::*;
  import troika_ref_pkg::*;

  localparam int NDUT = 3;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic host_en = 0, host_we = 0, start = 0;
  logic [RAM1_AW-1:0] host_addr = '0;
  trit2_t host_wdata = '0;
  trit2_t host_rdata [NDUT];
  logic   busy [NDUT], done [NDUT];
  phase_e phase [NDUT];
  logic [4:0] round [NDUT];

  troika_top #(.IMPL(1)) dut0 (.clk, .rst_n, .host_en, .host_we, .host_addr, .host_wdata,
    .host_rdata(host_rdata[0]), .start, .busy(busy[0]), .done(done[0]),
    .phase(phase[0]), .round(round[0]));
  troika_top #(.IMPL(2)) dut1 (.clk, .rst_n, .host_en, .host_we, .host_addr, .host_wdata,
    .host_rdata(host_rdata[1]), .start, .busy(busy[1]), .done(done[1]),
    .phase(phase[1]), .round(round[1]));
  troika_top #(.IMPL(3)) dut2 (.clk, .rst_n, .host_en, .host_we, .host_addr, .host_wdata,
    .host_rdata(host_rdata[2]), .start, .busy(busy[2]), .done(done[2]),
    .phase(phase[2]), .round(round[2]));

  // implementation 3 reads its ShiftLanes amounts from RAM-2
  int n_lane_reads = 0;
  always @(posedge clk) if (dut2.u_ctrl.r2b_en && phase[2] == PH_ONE) n_lane_reads++;

  always #5 clk = ~clk;

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------- mechanism counters
  int n_host_wr = 0, n_host_rd = 0, n_ph1 = 0, n_ph2 = 0, n_rc = 0;
  int n_absorb_more = 0, n_done = 0;
  phase_e last_phase = PH_IDLE;
  always @(posedge clk) begin
    if (phase[0] == PH_ONE && last_phase != PH_ONE) n_ph1++;
    if (phase[0] == PH_TWO && last_phase != PH_TWO) n_ph2++;
    if (phase[0] == PH_TWO && dut0.u_ctrl.add_rc) n_rc++;
    if (done[0]) n_done++;
    last_phase = phase[0];
  end

  // ------------------------------------------------------------- host bus
  task automatic host_write(int addr, int unsigned v);
    host_en = 1; host_we = 1; host_addr = RAM1_AW'(addr); host_wdata = trit2_t'(v);
    @(negedge clk);
    host_en = 0; host_we = 0;
    n_host_wr++;
  endtask

  task automatic host_read(int addr, output int unsigned v [NDUT]);
    host_en = 1; host_we = 0; host_addr = RAM1_AW'(addr);
    @(negedge clk);
    host_en = 0;
    @(negedge clk);
    foreach (v[i]) v[i] = int'(host_rdata[i]);
    n_host_rd++;
  endtask

  task automatic run_perm();
    int cyc;
    bit all_done;
    start = 1; @(negedge clk); start = 0;
    cyc = 0;
    forever begin
      all_done = 1;
      foreach (busy[i]) if (busy[i]) all_done = 0;
      if (all_done) break;
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (cyc != 35232) begin
      failures++; $display("FAIL permutation took %0d cycles, expected 35232", cyc);
    end
  endtask

  task automatic check_state(const ref trits_t st, input string what);
    int unsigned v [NDUT];
    int bad = 0;
    for (int a = 0; a < 729; a++) begin
      host_read(a, v);
      foreach (v[i]) begin
        checks++;
        if (v[i] != st[a]) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s dut%0d trit %0d = %0d, expected %0d", what, i, a, v[i], st[a]);
        end
      end
    end
  endtask

  // ------------------------------------------------------------- messages
  task automatic hash_message(int len);
    int unsigned msg [$];
    trits_t st;
    int nblk;
    for (int i = 0; i < len; i++) msg.push_back($urandom_range(2));
    msg.push_back(1);
    while (msg.size() % 243 != 0) msg.push_back(0);
    nblk = msg.size() / 243;
    foreach (st[i]) st[i] = 0;
    for (int b = 0; b < nblk; b++) begin
      for (int i = 0; i < 243; i++) begin
        st[i] = msg[b*243 + i];
        host_write(i, st[i]);
      end
      if (b == 0) for (int i = 243; i < 729; i++) host_write(i, 0);
      else n_absorb_more++;
      run_perm();
      ref_permute(st, 24);
      check_state(st, $sformatf("len %0d block %0d", len, b));
    end
    $display("hashed %0d-trit message in %0d block(s)", len, len / 243 + 1);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    hash_message(300);   // two blocks
    hash_message(100);   // one block, fresh capacity
    checks++;
    if (n_host_wr == 0 || n_host_rd == 0 || n_ph1 == 0 || n_ph2 == 0 || n_rc == 0 ||
        n_absorb_more == 0 || n_done == 0 || n_lane_reads == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    checks++;
    if (n_ph1 != 24*3 || n_ph2 != 24*3 || n_done != 3 || n_rc != 3*24*243) begin
      failures++;
      $display("FAIL counts ph1=%0d ph2=%0d done=%0d rc=%0d", n_ph1, n_ph2, n_done, n_rc);
    end
    $display("mechanisms: host_wr=%0d host_rd=%0d phase1=%0d phase2=%0d rc_adds=%0d absorb_more=%0d done=%0d",
             n_host_wr, n_host_rd, n_ph1, n_ph2, n_rc, n_absorb_more, n_done);
    checks++;
    if (n_lane_reads != 3*24*729) begin
      failures++; $display("FAIL lane-table reads %0d", n_lane_reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
