// pd82_bist: the built-in self test.
//
// Pulling test_n low enters test mode: while it is low, hold is high, which freezes the
// channel engine and sequencer and loads the test preset into the register file (all
// channels keyed on at full panning with fixed operator 1 tones). When test_n returns
// high the chip runs the preset. After the first output frame in test mode, pass_n is
// driven low as long as neither output reaches the threshold, i.e. bit 14 (the top bit)
// of both 15-bit outputs is clear; an output at or above 2^14 drives pass_n high.
// Test mode ends only with reset.
//
// The document specifies an active-low Pass that indicates proper operation and the
// bit-14 threshold on the left output; checking the right output too, and waiting for a
// first frame before asserting Pass, are this design's own choices. test_n is sampled on
// the clock here rather than acting asynchronously.
module pd82_bist
  import pd82_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             test_n,
  input  logic             frame,
  input  logic [OUT_W-1:0] out_l,
  input  logic [OUT_W-1:0] out_r,
  output logic             hold,
  output logic             test_mode,
  output logic             pass_n
);

  logic seen;

  assign hold   = !test_n;
  assign pass_n = !(test_mode && seen && !out_l[OUT_W-1] && !out_r[OUT_W-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      test_mode <= 1'b0;
      seen      <= 1'b0;
    end else if (!test_n) begin
      test_mode <= 1'b1;
      seen      <= 1'b0;
    end else if (test_mode && frame) begin
      seen      <= 1'b1;
    end
  end

endmodule
