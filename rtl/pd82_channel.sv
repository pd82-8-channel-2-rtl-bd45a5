// pd82_channel: the channel engine, two operators in series followed by panning.
//
// Operator 0 runs with no feedin; the top nine bits of its amplitude, sign-extended to
// 11 bits, become the feedin that shifts the phase of operator 1. The top nine bits of
// operator 1's amplitude, likewise extended, are panned left and right. Both operator
// passes use one shared pd82_operator, one after the other, as in the document. The
// channel holds no state between slots: configuration and phases come in at start,
// advanced phases and the panned outputs go out, so one engine serves all eight channels.
//
// Timing (t = cycles after the start cycle; the chip starts the engine in slot cycle 1,
// so slot cycle = t + 1, matching the document's cycle breakdown):
//   t=0   capture the channel configuration (start high)
//   t=2   feed operator 0 (its phase is computed at t=3, amplitude at t=6)
//   t=7   fetch operator 0's phase and amplitude
//   t=15  feed operator 1 with the operator 0 feedin
//   t=20  fetch operator 1's phase and amplitude
//   t=22  panning multiply, out_l/out_r registered
//   t=23  done high for one cycle; all outputs stay stable until the next start
// en low freezes the engine.
module pd82_channel
  import pd82_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      start,
  input  ch_cfg_t                   cfg,
  output logic [PHASE_W-1:0]        phase0_out,
  output logic [PHASE_W-1:0]        phase1_out,
  output logic signed [CHOUT_W-1:0] out_l,
  output logic signed [CHOUT_W-1:0] out_r,
  output logic                      done
);

  localparam int unsigned T_OP0_FEED  = 2;
  localparam int unsigned T_OP0_FETCH = 7;
  localparam int unsigned T_OP1_FEED  = 15;
  localparam int unsigned T_OP1_FETCH = 20;
  localparam int unsigned T_PAN       = 22;
  localparam int unsigned T_DONE      = 23;

  ch_cfg_t                   cfg_q;
  logic                      busy;
  logic [4:0]                t;
  logic signed [FEED_W-1:0]  feedback;

  logic                      op_start;
  op_cfg_t                   op_cfg;
  logic [PHASE_W-1:0]        op_phase_in;
  logic signed [FEED_W-1:0]  op_feedin;
  logic [PHASE_W-1:0]        op_phase_out;
  logic signed [AMP_W-1:0]   op_amp;
  logic                      op_done;
  logic signed [CHOUT_W-1:0] pan_l, pan_r;
  logic                      second;  // operator 1 pass

  assign second      = busy && t > 5'(T_OP0_FETCH);
  assign op_start    = busy && (t == 5'(T_OP0_FEED) || t == 5'(T_OP1_FEED));
  assign op_cfg      = second ? cfg_q.op1 : cfg_q.op0;
  assign op_phase_in = second ? cfg_q.phase1 : cfg_q.phase0;
  assign op_feedin   = second ? feedback : '0;

  pd82_operator u_op (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .start     (op_start),
    .cfg       (op_cfg),
    .phase_in  (op_phase_in),
    .feedin    (op_feedin),
    .phase_out (op_phase_out),
    .amp       (op_amp),
    .done      (op_done)
  );

  pd82_panning u_pan (
    .value (feedback),
    .pan_l (cfg_q.pan_l),
    .pan_r (cfg_q.pan_r),
    .out_l (pan_l),
    .out_r (pan_r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q      <= '0;
      busy       <= 1'b0;
      t          <= '0;
      feedback   <= '0;
      phase0_out <= '0;
      phase1_out <= '0;
      out_l      <= '0;
      out_r      <= '0;
    end else if (en) begin
      if (!busy) begin
        if (start) begin
          cfg_q <= cfg;
          busy  <= 1'b1;
          t     <= 5'd1;
        end
      end else begin
        t <= t + 5'd1;
        if (t == 5'(T_DONE)) begin
          busy <= 1'b0;
          t    <= '0;
        end
        if (t == 5'(T_OP0_FETCH)) begin
          phase0_out <= op_phase_out;
          feedback   <= FEED_W'($signed(op_amp[AMP_W-1 -: 9]));
        end
        if (t == 5'(T_OP1_FETCH)) begin
          phase1_out <= op_phase_out;
          feedback   <= FEED_W'($signed(op_amp[AMP_W-1 -: 9]));
        end
        if (t == 5'(T_PAN)) begin
          out_l <= pan_l;
          out_r <= pan_r;
        end
      end
    end
  end

  assign done = busy && t == 5'(T_DONE);

  // The shared operator must finish exactly when the engine fetches its result.
  a_op_aligned : assert property (@(posedge clk) disable iff (!rst_n || !en)
    (busy && (t == 5'(T_OP0_FETCH) || t == 5'(T_OP1_FETCH))) |-> op_done);

endmodule
