// tb_troika_ctrl: checks the controller cycle by cycle over a whole
// permutation. Expected addresses are computed here from the cuboid
// coordinates: in Phase 1, read address j in cycle j and, in cycle j+5, the
// ShiftRows+ShiftLanes destination of trit j on RAM-1 port B (offset 729) and
// RAM-2 port A; in Phase 2, for the j-th trit in column order, the column's
// own trit (RAM-1 B), its x-1 neighbour (RAM-2 A) and x+1/z+1 neighbour
// (RAM-2 B), and the write-back in cycle j+5 on RAM-1 A. Also checked: 734
// cycles per phase, 24 rounds, 35232 busy cycles, the done pulse, that a
// start while busy is ignored, that every Phase-1 destination is hit once,
// d_valid/d_pos and the round-constant strobes (243 per round).
module tb_troika_ctrl;
  import troika_pkg::*;
  localparam int unsigned SL [27] = '{19, 13, 21, 10, 24, 15, 2, 9, 3,
    14, 0, 6, 5, 1, 25, 22, 23, 20, 7, 17, 26, 12, 8, 18, 16, 11, 4};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, r1a_en, r1a_we, r1b_en, r1b_we, r2a_en, r2a_we, r2b_en;
  logic d_valid, add_rc, rc_load, rc_step;
  logic [1:0] d_pos;
  phase_e phase;
  logic [4:0] round;
  logic [RAM1_AW-1:0] r1a_addr, r1b_addr;
  logic [RAM2_AW-1:0] r2a_addr, r2b_addr;
  logic [LANE_W-1:0] lane_shift = '0;

  troika_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (phase %0d round %0d)", msg, phase, round);
    end
  endtask

  function automatic int p1_dest(int j);
    int s, r, c, c2, s2;
    s = j / 27; r = (j / 9) % 3; c = j % 9;
    c2 = (c + 3 * r) % 9;
    s2 = (s + int'(SL[r*9 + c2])) % 27;
    return s2*27 + r*9 + c2;
  endfunction

  initial begin
    int busy_cycles = 0, rc_steps;
    bit hit [729];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && phase == PH_IDLE, "idle after reset");
    start = 1;
    #1 chk(rc_load, "rc_load with start");
    @(negedge clk); start = 0;
    for (int rnd = 0; rnd < 24; rnd++) begin
      foreach (hit[i]) hit[i] = 0;
      rc_steps = 0;
      for (int ph = 1; ph <= 2; ph++) begin
        for (int t = 0; t < 734; t++) begin
          // a start while busy must be ignored
          start = (t == 100);
          #1;
          chk(busy, "busy");
          chk(phase == (ph == 1 ? PH_ONE : PH_TWO), "phase");
          chk(round == 5'(rnd), "round");
          chk(d_valid == (t >= 2 && t < 731), "d_valid");
          if (t >= 2 && t < 731) chk(d_pos == 2'((t - 2) % 3), "d_pos");
          if (ph == 1) begin
            chk(r1a_en == (t < 729) && !r1a_we, "p1 r1a en");
            if (t < 729) chk(r1a_addr == RAM1_AW'(t), "p1 read addr");
            chk(r1b_en == (t >= 5) && r1b_we == (t >= 5), "p1 r1b we");
            chk(r2a_en == (t >= 5) && r2a_we == (t >= 5), "p1 r2a we");
            chk(!add_rc && !rc_step, "p1 no rc");
            if (t >= 5) begin
              int d;
              d = p1_dest(t - 5);
              chk(r1b_addr == RAM1_AW'(729 + d), $sformatf("p1 r1b dest j=%0d", t - 5));
              chk(r2a_addr == RAM2_AW'(d), "p1 r2a dest");
              hit[d] = 1;
            end
          end else begin
            if (t < 729) begin
              int s, r, c;
              s = t / 27; c = (t / 3) % 9; r = t % 3;
              chk(r1b_en && !r1b_we && r1b_addr == RAM1_AW'(729 + s*27 + r*9 + c), "p2 own read");
              chk(r2a_en && !r2a_we && r2a_addr == RAM2_AW'(s*27 + r*9 + (c + 8) % 9), "p2 left read");
              chk(r2b_en && r2b_addr == RAM2_AW'(((s + 1) % 27)*27 + r*9 + (c + 1) % 9), "p2 right read");
            end
            chk(r1a_en == (t >= 5) && r1a_we == (t >= 5), "p2 write en");
            if (t >= 5) begin
              int j, s, r, c;
              j = t - 5; s = j / 27; c = (j / 3) % 9; r = j % 3;
              chk(r1a_addr == RAM1_AW'(s*27 + r*9 + c), "p2 write addr");
              chk(add_rc == (r == 0) && rc_step == (r == 0), "p2 rc strobe");
              if (rc_step) rc_steps++;
            end
          end
          busy_cycles++;
          @(negedge clk);
        end
        if (ph == 1) begin
          int n;
          n = 0;
          foreach (hit[i]) n += hit[i];
          chk(n == 729, "phase-1 destinations form a permutation");
        end
      end
      chk(rc_steps == 243, "243 round-constant steps per round");
    end
    start = 0;
    #1;
    chk(!busy && done && phase == PH_IDLE, "done pulse and idle");
    chk(busy_cycles == 35232, "35232 cycles");
    @(negedge clk);
    chk(!done && !busy, "done is one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
