// pd82: 8-channel, 2-operator phase distortion synthesizer.
//
// Each channel runs two operators: operator 0's sine output shifts the phase of
// operator 1, whose output is panned to left and right. All eight channels share one
// channel engine (pd82_channel with a single pd82_operator), each getting a 26-clock
// slot, so the stereo outputs are refreshed every 208 clocks (about 240 kHz at the
// document's 50 MHz clock). A host CPU programs the chip through write-only registers on
// an 8-bit data / 4-bit address bus with active-low chip and write enables; the outputs
// are the 15-bit magnitudes of the left and right sums, for a binary DAC.
//
// Slot cycle plan (from the document's cycle breakdown):
//   0-1   current channel's configuration fed to the engine (captured in cycle 1)
//   2     previous channel's output added to the accumulators
//   3     (channel 0 slot) outputs asserted;  4  accumulators cleared
//   5-22  host bus sampled for a write
//   23    host write applied;  24  key on/off applied
//   25    advanced phases stored and channel output fetched; next channel
//
// Pins as in the document's pinout: clk, reset_n and test_n (active low), data[7:0],
// address[3:0], ce_n and we_n (active low), pass_n (active low) and the 15-bit
// amplitude_l/amplitude_r. reset_n clears the chip asynchronously.
//
// The sequencer's slot_end, the register file's channel select and the self test's
// test_mode are observation outputs of those blocks; the chip has no pins for them, so
// they are left open here.
module pd82
  import pd82_pkg::*;
(
  input  logic             clk,
  input  logic             reset_n,
  input  logic             test_n,
  input  logic [7:0]       data,
  input  logic [3:0]       address,
  input  logic             ce_n,
  input  logic             we_n,
  output logic             pass_n,
  output logic [OUT_W-1:0] amplitude_l,
  output logic [OUT_W-1:0] amplitude_r
);

  logic       hold, run;
  logic [4:0] cyc;
  ch_idx_t    ch;

  logic       wr_valid;
  logic [3:0] wr_addr;
  logic [7:0] wr_data;

  ch_cfg_t                   cfg;
  logic [NUM_CHANNELS-1:0]   ch_on;

  logic [PHASE_W-1:0]        phase0, phase1;
  logic signed [CHOUT_W-1:0] ch_l, ch_r;
  logic                      ch_done;
  logic                      frame;

  assign run = !hold;

  pd82_sequencer u_seq (
    .clk      (clk),
    .rst_n    (reset_n),
    .en       (run),
    .cyc      (cyc),
    .ch       (ch),
    .slot_end ()
  );

  pd82_host_if u_host (
    .clk      (clk),
    .rst_n    (reset_n),
    .cyc      (run ? cyc : 5'd0),
    .ce_n     (ce_n),
    .we_n     (we_n),
    .address  (address),
    .data     (data),
    .wr_valid (wr_valid),
    .wr_addr  (wr_addr),
    .wr_data  (wr_data)
  );

  pd82_regfile u_regs (
    .clk       (clk),
    .rst_n     (reset_n),
    .test_load (hold),
    .cyc       (cyc),
    .ch        (ch),
    .wr_valid  (wr_valid),
    .wr_addr   (wr_addr),
    .wr_data   (wr_data),
    .phase0_in (phase0),
    .phase1_in (phase1),
    .cfg_out   (cfg),
    .ch_on     (ch_on),
    .ch_select ()
  );

  pd82_channel u_chan (
    .clk        (clk),
    .rst_n      (reset_n),
    .en         (run),
    .start      (cyc == 5'(CYC_CH_START)),
    .cfg        (cfg),
    .phase0_out (phase0),
    .phase1_out (phase1),
    .out_l      (ch_l),
    .out_r      (ch_r),
    .done       (ch_done)
  );

  pd82_mixer u_mix (
    .clk   (clk),
    .rst_n (reset_n),
    .en    (run),
    .cyc   (cyc),
    .ch    (ch),
    .ch_on (ch_on[ch]),
    .in_l  (ch_l),
    .in_r  (ch_r),
    .out_l (amplitude_l),
    .out_r (amplitude_r),
    .frame (frame)
  );

  pd82_bist u_bist (
    .clk       (clk),
    .rst_n     (reset_n),
    .test_n    (test_n),
    .frame     (frame),
    .out_l     (amplitude_l),
    .out_r     (amplitude_r),
    .hold      (hold),
    .test_mode (),
    .pass_n    (pass_n)
  );

  // The engine finishes a channel in cycle 24, before its result is fetched in cycle 25.
  a_engine_timing : assert property (@(posedge clk) disable iff (!reset_n || hold)
    (cyc == 5'(CYC_ONOFF)) |-> ch_done);

endmodule
