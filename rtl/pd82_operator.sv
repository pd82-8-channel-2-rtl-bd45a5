// pd82_operator: one phase distortion operator, computing
//   phase  <= phase + frequency
//   amp     = volume * sin(phase + feedin)
//
// The operator is stateless between uses: the caller passes in the stored phase
// accumulator with the configuration and gets the advanced phase back, so one operator
// instance serves every operator of every channel in turn. The phase accumulator is 18
// bits (10-bit table index, 8 fraction bits) and the frequency a 16-bit increment in the
// same fixed point (8.8). The feedin value (11-bit signed, the previous operator's output)
// is added to the advanced phase after a left shift of 7, so one feedin step is half a
// table index; table index = bits 17:8 of that sum. The sine sample (9-bit signed) times
// the unsigned 8-bit volume gives the 18-bit signed amplitude. All of this follows the
// document. A start/done handshake instead of a free-running counter is this design's
// own choice; the step timing matches the document's cycle breakdown.
//
// Timing (cycle numbers relative to the start cycle s):
//   s    capture configuration, phase and feedin (start high)
//   s+1  phase calculation and table address
//   s+2  sine ROM strobe
//   s+3  sine ROM read
//   s+4  amplitude calculation; phase_out and amp registered
//   s+5  store: done high for one cycle, outputs stable until the next start
// en low freezes the operator (used while the chip is held in test preset).
module pd82_operator
  import pd82_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      start,
  input  op_cfg_t                   cfg,
  input  logic [PHASE_W-1:0]        phase_in,
  input  logic signed [FEED_W-1:0]  feedin,
  output logic [PHASE_W-1:0]        phase_out,
  output logic signed [AMP_W-1:0]   amp,
  output logic                      done
);

  typedef enum logic [2:0] {
    S_IDLE, S_PHASE, S_STROBE, S_READ, S_AMP, S_STORE
  } stage_e;

  stage_e                    stage;
  op_cfg_t                   cfg_q;
  logic [PHASE_W-1:0]        phase_q;
  logic signed [FEED_W-1:0]  feed_q;
  logic [9:0]                rom_addr;
  logic signed [8:0]         rom_data;
  logic signed [8:0]         sine_q;

  logic [PHASE_W-1:0] phase_next;
  logic [PHASE_W-1:0] offset_phase;

  always_comb begin
    phase_next   = phase_q + PHASE_W'(cfg_q.freq);
    offset_phase = phase_next + {feed_q, 7'b0};
  end

  pd82_sine_rom u_rom (
    .clk  (clk),
    .en   (en && stage == S_STROBE),
    .mode (cfg_q.wavemode),
    .addr (rom_addr),
    .data (rom_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage     <= S_IDLE;
      cfg_q     <= '0;
      phase_q   <= '0;
      feed_q    <= '0;
      rom_addr  <= '0;
      sine_q    <= '0;
      phase_out <= '0;
      amp       <= '0;
    end else if (en) begin
      unique case (stage)
        S_IDLE: if (start) begin
          cfg_q   <= cfg;
          phase_q <= phase_in;
          feed_q  <= feedin;
          stage   <= S_PHASE;
        end
        S_PHASE: begin
          phase_q  <= phase_next;
          rom_addr <= offset_phase[PHASE_W-1 -: 10];
          stage    <= S_STROBE;
        end
        S_STROBE: stage <= S_READ;
        S_READ: begin
          sine_q <= rom_data;
          stage  <= S_AMP;
        end
        S_AMP: begin
          amp       <= sine_q * $signed({1'b0, cfg_q.volume});
          phase_out <= phase_q;
          stage     <= S_STORE;
        end
        S_STORE: stage <= S_IDLE;
        default: stage <= S_IDLE;
      endcase
    end
  end

  assign done = (stage == S_STORE);

endmodule
