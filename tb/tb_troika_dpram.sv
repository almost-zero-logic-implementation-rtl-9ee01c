// tb_troika_dpram: checks the dual-port RAM as RAM-2 of implementation 3
// (756 x 5, ShiftLanes table preloaded at 729..755): the preloaded table,
// then random writes and reads on both ports against a shadow array,
// including the two-cycle read latency and that a write leaves rdata alone.
module tb_troika_dpram;
  import troika_pkg::*;
  localparam int DEPTH = 756, W = 5, AW = 10;
  localparam int unsigned EXP_SL [27] = '{19, 13, 21, 10, 24, 15, 2, 9, 3,
    14, 0, 6, 5, 1, 25, 22, 23, 20, 7, 17, 26, 12, 8, 18, 16, 11, 4};
  int checks = 0, failures = 0;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [W-1:0] shadow [DEPTH];
  bit valid [DEPTH];

  troika_dpram #(.DEPTH(DEPTH), .WIDTH(W), .AW(AW), .INIT_LANES(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected-read pipelines (2-cycle latency)
  int a_exp [2] = '{-1, -1}, b_exp [2] = '{-1, -1};
  always @(posedge clk) begin
    #1;
    if (a_exp[1] >= 0) begin
      checks++;
      if (a_rdata !== W'(a_exp[1])) begin failures++; $display("FAIL A got %0d exp %0d", a_rdata, a_exp[1]); end
    end
    if (b_exp[1] >= 0) begin
      checks++;
      if (b_rdata !== W'(b_exp[1])) begin failures++; $display("FAIL B got %0d exp %0d", b_rdata, b_exp[1]); end
    end
  end

  task automatic cyc(input int ea, input int eb);
    @(posedge clk);
    a_exp[1] = a_exp[0]; a_exp[0] = ea;
    b_exp[1] = b_exp[0]; b_exp[0] = eb;
  endtask

  initial begin
    for (int i = 0; i < 27; i++) begin shadow[729+i] = W'(EXP_SL[i]); valid[729+i] = 1; end
    @(negedge clk);
    // read back the table on both ports
    for (int i = 0; i < 27; i++) begin
      a_en = 1; a_we = 0; a_addr = AW'(729 + i);
      b_en = 1; b_we = 0; b_addr = AW'(755 - i);
      cyc(int'(EXP_SL[i]), int'(EXP_SL[26-i]));
      @(negedge clk);
    end
    // random traffic
    for (int n = 0; n < 4000; n++) begin
      int ea, eb, aa, ba;
      bit aw, bw;
      aa = $urandom_range(DEPTH-1); ba = $urandom_range(DEPTH-1);
      aw = 1'($urandom_range(1)); bw = 1'($urandom_range(1));
      if (aw && bw && aa == ba) bw = 0;
      a_en = 1; a_we = aw; a_addr = AW'(aa); a_wdata = W'($urandom);
      b_en = $urandom_range(3) != 0; b_we = bw; b_addr = AW'(ba); b_wdata = W'($urandom);
      ea = (!aw && valid[aa]) ? int'(shadow[aa]) : -1;
      eb = (b_en && !bw && valid[ba]) ? int'(shadow[ba]) : -1;
      // a disabled or writing port keeps its old output: expect the previous value
      if (aw) ea = a_exp[0];
      if (!b_en || bw) eb = b_exp[0];
      if (aw) begin shadow[aa] = a_wdata; valid[aa] = 1; end
      if (b_en && bw) begin shadow[ba] = b_wdata; valid[ba] = 1; end
      cyc(ea, eb);
      @(negedge clk);
    end
    a_en = 0; b_en = 0;
    cyc(a_exp[0], b_exp[0]); cyc(a_exp[0], b_exp[0]); @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
