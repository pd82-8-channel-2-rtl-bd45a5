// pd82_sequencer: the chip's slot and channel counters.
//
// Each channel owns a slot of SLOT_CYCLES (26) clocks; cyc counts 0..25 within the slot
// and ch selects the channel being processed, advancing 0..7 and wrapping, so one output
// frame is 208 clocks, as in the document. All other chip blocks act on fixed values of
// cyc (see pd82_pkg). en low holds both counters (test preset); reset clears them.
module pd82_sequencer
  import pd82_pkg::*;
#(
  parameter int unsigned SLOTS   = SLOT_CYCLES,
  parameter int unsigned CHANNELS = NUM_CHANNELS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic [4:0] cyc,
  output ch_idx_t    ch,
  output logic       slot_end   // last cycle of a slot
);

  assign slot_end = (cyc == 5'(SLOTS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= '0;
      ch  <= '0;
    end else if (en) begin
      if (slot_end) begin
        cyc <= '0;
        ch  <= (ch == ch_idx_t'(CHANNELS - 1)) ? '0 : ch + 1'b1;
      end else begin
        cyc <= cyc + 5'd1;
      end
    end
  end

  a_cyc_range : assert property (@(posedge clk) disable iff (!rst_n) cyc < 5'(SLOTS));

endmodule
