// pd82_pkg: types and constants shared by the PD82 phase distortion synthesizer.
//
// The chip holds eight channels of two operators each. Every channel is processed in a
// slot of 26 clock cycles by one shared channel engine, so a full output frame takes
// 8 x 26 = 208 cycles. The widths below (16-bit frequency with 8 fraction bits, 18-bit
// phase accumulator with a 10-bit table index, 8-bit volume and panning, 4-bit wave mode,
// 11-bit channel output, 15-bit chip output) follow the document's register map and
// design. The slot cycle numbers are those of the document's cycle breakdown table.
package pd82_pkg;

  localparam int unsigned NUM_CHANNELS = 8;
  localparam int unsigned SLOT_CYCLES  = 26;
  localparam int unsigned FRAME_CYCLES = NUM_CHANNELS * SLOT_CYCLES;  // 208

  localparam int unsigned FREQ_W  = 16;  // 8.8 phase increment
  localparam int unsigned PHASE_W = 18;  // 10.8 phase accumulator
  localparam int unsigned AMP_W   = 18;  // signed sine * unsigned volume
  localparam int unsigned FEED_W  = 11;  // signed operator-to-operator value
  localparam int unsigned CHOUT_W = 11;  // signed panned channel output
  localparam int unsigned OUT_W   = 15;  // chip output width

  // Chip-level slot cycles (cycle breakdown table, "Chip" column).
  localparam int unsigned CYC_CH_START  = 1;   // channel configuration feed (0-1)
  localparam int unsigned CYC_ACCUM     = 2;   // amplitude accumulation
  localparam int unsigned CYC_OUTPUT    = 3;   // output assertion
  localparam int unsigned CYC_ACC_CLR   = 4;   // output accumulation reset
  localparam int unsigned CYC_WR_FIRST  = 5;   // accept register writes ...
  localparam int unsigned CYC_WR_LAST   = 22;  // ... through this cycle
  localparam int unsigned CYC_WR_APPLY  = 23;  // assert register write
  localparam int unsigned CYC_ONOFF     = 24;  // assert channel on/offs
  localparam int unsigned CYC_CH_FETCH  = 25;  // channel configuration fetch

  typedef logic [2:0] ch_idx_t;

  typedef struct packed {
    logic [FREQ_W-1:0] freq;
    logic [7:0]        volume;
    logic [3:0]        wavemode;  // bit 3: first quarter ... bit 0: last quarter
  } op_cfg_t;

  // Everything the channel engine needs for one channel slot.
  typedef struct packed {
    logic [7:0]         pan_l;
    logic [7:0]         pan_r;
    op_cfg_t            op0;
    op_cfg_t            op1;
    logic [PHASE_W-1:0] phase0;
    logic [PHASE_W-1:0] phase1;
  } ch_cfg_t;

  // Register addresses of the write-only host map.
  typedef enum logic [3:0] {
    REG_CH_SELECT = 4'h0,
    REG_CH_ON     = 4'h1,
    REG_CH_OFF    = 4'h2,
    REG_PAN_L     = 4'h6,
    REG_PAN_R     = 4'h7,
    REG_OP0_FLO   = 4'h8,
    REG_OP0_FHI   = 4'h9,
    REG_OP0_VOL   = 4'hA,
    REG_OP0_WAVE  = 4'hB,
    REG_OP1_FLO   = 4'hC,
    REG_OP1_FHI   = 4'hD,
    REG_OP1_VOL   = 4'hE,
    REG_OP1_WAVE  = 4'hF
  } reg_addr_e;

  // Self-test preset for operator 1 of each channel: frequency and volume.
  function automatic logic [FREQ_W-1:0] test_freq(input int unsigned ch);
    case (ch)
      0: return 16'd10;
      1: return 16'd40;
      2: return 16'd80;
      3: return 16'd120;
      4: return 16'd160;
      5: return 16'd200;
      6: return 16'd240;
      default: return 16'd280;
    endcase
  endfunction

  function automatic logic [7:0] test_volume(input int unsigned ch);
    case (ch)
      0: return 8'hFF;
      1: return 8'h55;
      2: return 8'h24;
      3: return 8'h1C;
      4: return 8'h17;
      5: return 8'h11;
      6: return 8'h0F;
      default: return 8'h0D;
    endcase
  endfunction

endpackage
