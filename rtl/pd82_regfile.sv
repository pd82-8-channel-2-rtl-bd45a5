// pd82_regfile: the write-only register map and the state of all eight channels.
//
// Host map (document's memory map): $0 channel select (3 bits), $1 channel on and
// $2 channel off (one bit per channel), and, for the selected channel, $6/$7 left/right
// panning, $8/$9 operator 0 frequency low/high byte, $A operator 0 volume, $B operator 0
// wave mode (low 4 bits), $C-$F the same for operator 1. $3-$5 are unused.
//
// Per channel the file keeps the host settings, the on flag, pending on/off requests and
// the two 18-bit phase accumulators. The slot timing follows the document:
//   cycle 23  a captured host write is applied
//   cycle 24  pending "on" bits switch their channel on and clear both its phases
//             (this takes precedence over a pending "off" for the same channel), then
//             pending "off" bits switch channels off
//   cycle 25  the channel engine's advanced phases are stored for the current channel
// Writing $1 or $2 replaces the whole pending byte, as in the document.
//
// Unlike the document, host settings and phase accumulators are separate storage, so a
// host write no longer forces the current channel's phase update to be thrown away; the
// only skipped store is the one for a channel just switched on, whose phases must stay
// cleared. This is this design's own choice.
//
// test_load (held while the test pin is low) loads the self-test preset into every
// channel: a pending "on", operator 1 wave mode 1111, both pannings $FF, and the
// operator 1 frequency and volume of pd82_pkg::test_freq/test_volume.
//
// cfg_out is the current channel's configuration, read combinationally.
module pd82_regfile
  import pd82_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                test_load,
  input  logic [4:0]          cyc,
  input  ch_idx_t             ch,
  input  logic                wr_valid,
  input  logic [3:0]          wr_addr,
  input  logic [7:0]          wr_data,
  input  logic [PHASE_W-1:0]  phase0_in,
  input  logic [PHASE_W-1:0]  phase1_in,
  output ch_cfg_t             cfg_out,
  output logic [NUM_CHANNELS-1:0] ch_on,
  output ch_idx_t             ch_select
);

  typedef struct packed {
    logic [7:0] pan_l;
    logic [7:0] pan_r;
    op_cfg_t    op0;
    op_cfg_t    op1;
  } host_cfg_t;

  host_cfg_t          host  [NUM_CHANNELS];
  logic [PHASE_W-1:0] ph0   [NUM_CHANNELS];
  logic [PHASE_W-1:0] ph1   [NUM_CHANNELS];
  logic [NUM_CHANNELS-1:0] start_pend, stop_pend;
  logic               skip_store;

  always_comb begin
    cfg_out.pan_l  = host[ch].pan_l;
    cfg_out.pan_r  = host[ch].pan_r;
    cfg_out.op0    = host[ch].op0;
    cfg_out.op1    = host[ch].op1;
    cfg_out.phase0 = ph0[ch];
    cfg_out.phase1 = ph1[ch];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CHANNELS; i++) begin
        host[i] <= '0;
        ph0[i]  <= '0;
        ph1[i]  <= '0;
      end
      start_pend <= '0;
      stop_pend  <= '0;
      ch_on      <= '0;
      ch_select  <= '0;
      skip_store <= 1'b0;
    end else if (test_load) begin
      for (int i = 0; i < NUM_CHANNELS; i++) begin
        host[i].pan_l       <= 8'hFF;
        host[i].pan_r       <= 8'hFF;
        host[i].op1.wavemode <= 4'b1111;
        host[i].op1.freq    <= test_freq(i);
        host[i].op1.volume  <= test_volume(i);
      end
      start_pend <= '1;
    end else begin
      // Cycle 23: apply a host write.
      if (cyc == 5'(CYC_WR_APPLY) && wr_valid) begin
        unique case (wr_addr)
          REG_CH_SELECT: ch_select  <= wr_data[2:0];
          REG_CH_ON:     start_pend <= wr_data;
          REG_CH_OFF:    stop_pend  <= wr_data;
          REG_PAN_L:     host[ch_select].pan_l           <= wr_data;
          REG_PAN_R:     host[ch_select].pan_r           <= wr_data;
          REG_OP0_FLO:   host[ch_select].op0.freq[7:0]   <= wr_data;
          REG_OP0_FHI:   host[ch_select].op0.freq[15:8]  <= wr_data;
          REG_OP0_VOL:   host[ch_select].op0.volume      <= wr_data;
          REG_OP0_WAVE:  host[ch_select].op0.wavemode    <= wr_data[3:0];
          REG_OP1_FLO:   host[ch_select].op1.freq[7:0]   <= wr_data;
          REG_OP1_FHI:   host[ch_select].op1.freq[15:8]  <= wr_data;
          REG_OP1_VOL:   host[ch_select].op1.volume      <= wr_data;
          REG_OP1_WAVE:  host[ch_select].op1.wavemode    <= wr_data[3:0];
          default: ;  // $3-$5: no register
        endcase
      end
      // Cycle 24: key on / key off.
      if (cyc == 5'(CYC_ONOFF)) begin
        for (int i = 0; i < NUM_CHANNELS; i++) begin
          if (start_pend[i]) begin
            start_pend[i] <= 1'b0;
            ch_on[i]      <= 1'b1;
            ph0[i]        <= '0;
            ph1[i]        <= '0;
          end else if (stop_pend[i]) begin
            stop_pend[i]  <= 1'b0;
            ch_on[i]      <= 1'b0;
          end
        end
        skip_store <= start_pend[ch];
      end
      // Cycle 25: store the advanced phases of the current channel.
      if (cyc == 5'(CYC_CH_FETCH) && !skip_store) begin
        ph0[ch] <= phase0_in;
        ph1[ch] <= phase1_in;
      end
    end
  end

endmodule
