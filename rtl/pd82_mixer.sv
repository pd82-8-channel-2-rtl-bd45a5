// pd82_mixer: sums the eight channel outputs of a frame into the chip outputs.
//
// At the end of each channel slot (cycle 25) the channel's panned left/right outputs are
// fetched, or zero if that channel is off. In cycle 2 of the next slot they are added to
// two 15-bit signed accumulators. When the slot of channel 0 begins, the accumulators hold
// the sum of all eight channels of the frame just finished: in cycle 3 of that slot the
// magnitude of each sum is asserted on the 15-bit outputs, and in cycle 4 the
// accumulators are cleared. Outputs therefore change once every 208 clocks. The cycle
// numbers, the accumulator width and the magnitude conversion follow the document's
// design; the frame pulse is this design's own addition, used by the self test.
module pd82_mixer
  import pd82_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [4:0]                cyc,
  input  ch_idx_t                   ch,
  input  logic                      ch_on,     // current channel is on
  input  logic signed [CHOUT_W-1:0] in_l,
  input  logic signed [CHOUT_W-1:0] in_r,
  output logic [OUT_W-1:0]          out_l,
  output logic [OUT_W-1:0]          out_r,
  output logic                      frame      // outputs updated this clock
);

  logic signed [CHOUT_W-1:0] fetch_l, fetch_r;
  logic signed [OUT_W-1:0]   acc_l, acc_r;

  function automatic logic [OUT_W-1:0] magnitude(input logic signed [OUT_W-1:0] v);
    return v[OUT_W-1] ? OUT_W'(-v) : OUT_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_l <= '0;
      fetch_r <= '0;
      acc_l   <= '0;
      acc_r   <= '0;
      out_l   <= '0;
      out_r   <= '0;
      frame   <= 1'b0;
    end else begin
      frame <= 1'b0;
      if (en) begin
        if (cyc == 5'(CYC_CH_FETCH)) begin
          fetch_l <= ch_on ? in_l : '0;
          fetch_r <= ch_on ? in_r : '0;
        end
        if (cyc == 5'(CYC_ACCUM)) begin
          acc_l <= acc_l + OUT_W'(fetch_l);
          acc_r <= acc_r + OUT_W'(fetch_r);
        end
        if (cyc == 5'(CYC_OUTPUT) && ch == '0) begin
          out_l <= magnitude(acc_l);
          out_r <= magnitude(acc_r);
          frame <= 1'b1;
        end
        if (cyc == 5'(CYC_ACC_CLR) && ch == '0) begin
          acc_l <= '0;
          acc_r <= '0;
        end
      end
    end
  end

endmodule
