// troika_sbox_stage: Phase-1 datapath (SubTrytes) of the serial Troika core.
//
// Trits of the state arrive one per cycle in address order, each with its
// position inside its tryte (pos = 0, 1, 2). The first two trits of a tryte
// are held in a 2-trit input shift register; when the third arrives
// (valid & pos==2) the single S-box evaluates the whole tryte
// combinationally and its three output trits are loaded (LD) into a 3-trit
// output shift register. That register then shifts one trit per cycle
// towards q, zeros filling in behind, so q presents the S-box output in the
// same trit order as the input, one trit per cycle, with no gaps.
//
// Timing: the last trit of a tryte enters in cycle t; q carries its tryte's
// trits 0, 1, 2 in cycles t+1, t+2, t+3. In the core a trit read from RAM in
// cycle j enters here in j+2 and leaves in j+5, ready to be written to its
// ShiftRows/ShiftLanes destination. The register arrangement follows the
// document's block diagram in spirit; the exact number of input registers
// is this design's choice.
module troika_sbox_stage
  import troika_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,   // d carries a state trit
  input  logic [1:0] pos,     // position of d within its tryte
  input  trit3_t     d,
  output trit3_t     q        // S-box output, one trit per cycle
);
  trit3_t in_sr [2];          // in_sr[1] = first trit, in_sr[0] = second
  trit3_t out_sr [3];         // out_sr[0] drives q
  trit3_t y0, y1, y2;
  logic   ld;

  assign ld = valid && (pos == 2'd2);

  troika_sbox u_sbox (
    .x0(in_sr[1]), .x1(in_sr[0]), .x2(d),
    .y0(y0), .y1(y1), .y2(y2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sr  <= '{default: T3_ZERO};
      out_sr <= '{default: T3_ZERO};
    end else begin
      if (valid) begin
        in_sr[1] <= in_sr[0];
        in_sr[0] <= d;
      end
      if (ld) begin
        out_sr[0] <= y0;
        out_sr[1] <= y1;
        out_sr[2] <= y2;
      end else begin
        out_sr[0] <= out_sr[1];
        out_sr[1] <= out_sr[2];
        out_sr[2] <= T3_ZERO;
      end
    end
  end

  assign q = out_sr[0];
endmodule
