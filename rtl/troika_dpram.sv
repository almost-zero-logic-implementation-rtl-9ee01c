// troika_dpram: true dual-port synchronous RAM used for RAM-1 and RAM-2.
//
// Both ports have their own enable, write enable, address and data, share
// one clock, and behave like a block RAM with its optional output register
// switched on: a read issued (en=1, we=0) in cycle t returns its word on
// rdata in cycle t+2. A write (en=1, we=1) updates the word at the end of the
// cycle; the port's rdata is not updated by a write. The two ports must not
// write the same address in the same cycle (the core never does).
//
// When INIT_LANES is set, the 27 words from LANE_BASE on are preloaded with
// the ShiftLanes table, as a BRAM initialisation would do; this is how
// RAM-2 of implementation 3 carries the table. Other words are not
// initialised: the core always writes a word before reading it.
// The RAM sizes and the table location follow the architecture; the
// two-cycle read latency (output register on) is this design's choice.
module troika_dpram
  import troika_pkg::*;
#(
  parameter int unsigned DEPTH      = RAM1_DEPTH,
  parameter int unsigned WIDTH      = 3,
  parameter int unsigned AW         = RAM1_AW,
  parameter bit          INIT_LANES = 1'b0
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] a_q, b_q;

  initial begin
    if (INIT_LANES) begin
      for (int i = 0; i < int'(SLICE_TRITS); i++) begin
        mem[LANE_BASE + i] = WIDTH'(SHIFT_LANES[i]);
      end
    end
  end

  always @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_q         <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_q         <= mem[b_addr];
    end
  end

  // BRAM output register
  always_ff @(posedge clk) begin
    a_rdata <= a_q;
    b_rdata <= b_q;
  end

  a_same_addr_write : assert property (@(posedge clk)
      !(a_en && a_we && b_en && b_we && a_addr == b_addr))
    else $error("troika_dpram: both ports write address %0d", a_addr);
  a_addr_range : assert property (@(posedge clk)
      !(a_en && int'(a_addr) >= int'(DEPTH)) && !(b_en && int'(b_addr) >= int'(DEPTH)))
    else $error("troika_dpram: address out of range");
endmodule
