// tb_pd82_regfile: drives the slot timing and random host writes (biased to valid
// addresses) and keeps its own model of the register map: channel select, key on/off
// with "on" taking precedence, per-channel settings, phase clearing on key on and the
// phase store in cycle 25 (skipped for a channel just keyed on). At the start of every
// slot it compares the configuration presented for the current channel and all on
// flags. Finally it checks the self-test preset.
module tb_pd82_regfile;
  import pd82_pkg::*;
  import pd82_ref_pkg::*;

  logic clk = 0, rst_n, test_load;
  logic [4:0] cyc;
  ch_idx_t ch;
  logic wr_valid;
  logic [3:0] wr_addr;
  logic [7:0] wr_data;
  logic [PHASE_W-1:0] phase0_in, phase1_in;
  ch_cfg_t cfg_out;
  logic [NUM_CHANNELS-1:0] ch_on;
  ch_idx_t ch_select;
  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0, n_skip = 0;

  pd82_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Model state.
  int m_sel;
  int m_pl[8], m_pr[8], m_f0[8], m_f1[8], m_v0[8], m_v1[8], m_w0[8], m_w1[8];
  int m_ph0[8], m_ph1[8];
  bit m_on[8], m_start[8], m_stop[8];

  function automatic ch_cfg_t model_cfg(input int c);
    ch_cfg_t r;
    r.pan_l = 8'(m_pl[c]); r.pan_r = 8'(m_pr[c]);
    r.op0 = '{freq: 16'(m_f0[c]), volume: 8'(m_v0[c]), wavemode: 4'(m_w0[c])};
    r.op1 = '{freq: 16'(m_f1[c]), volume: 8'(m_v1[c]), wavemode: 4'(m_w1[c])};
    r.phase0 = 18'(m_ph0[c]); r.phase1 = 18'(m_ph1[c]);
    return r;
  endfunction

  task automatic model_write(input int a, input int d);
    int s;
    s = m_sel;
    case (a)
      0: m_sel = d & 7;
      1: for (int i = 0; i < 8; i++) m_start[i] = d[i];
      2: for (int i = 0; i < 8; i++) m_stop[i] = d[i];
      6: m_pl[s] = d;
      7: m_pr[s] = d;
      8: m_f0[s] = (m_f0[s] & 'hFF00) | d;
      9: m_f0[s] = (m_f0[s] & 'h00FF) | (d << 8);
      10: m_v0[s] = d;
      11: m_w0[s] = d & 15;
      12: m_f1[s] = (m_f1[s] & 'hFF00) | d;
      13: m_f1[s] = (m_f1[s] & 'h00FF) | (d << 8);
      14: m_v1[s] = d;
      15: m_w1[s] = d & 15;
      default: ;
    endcase
  endtask

  initial begin
    bit skip;
    rst_n = 0; test_load = 0; cyc = 0; ch = 0; wr_valid = 0; wr_addr = 0; wr_data = 0;
    phase0_in = 0; phase1_in = 0;
    m_sel = 0;
    for (int i = 0; i < 8; i++) begin
      m_pl[i] = 0; m_pr[i] = 0; m_f0[i] = 0; m_f1[i] = 0; m_v0[i] = 0; m_v1[i] = 0;
      m_w0[i] = 0; m_w1[i] = 0; m_ph0[i] = 0; m_ph1[i] = 0; m_on[i] = 0; m_start[i] = 0; m_stop[i] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int slot = 0; slot < 800; slot++) begin
      int c;
      c = slot % 8;
      for (int k = 0; k < 26; k++) begin
        @(negedge clk);
        cyc = 5'(k); ch = ch_idx_t'(c);
        wr_valid = 0; phase0_in = 18'($urandom); phase1_in = 18'($urandom);
        #1;
        if (k == 0) begin
          check(cfg_out != model_cfg(c), 0, $sformatf("cfg of channel %0d", c));
          for (int i = 0; i < 8; i++) check(ch_on[i], m_on[i], "on flag");
          check(ch_select, m_sel, "channel select");
        end
        if (k == 23 && $urandom_range(0, 2) != 0) begin
          int a, d;
          a = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 2) : $urandom_range(0, 15);
          d = $urandom_range(0, 255);
          if (a == 1 || a == 2) d = d & $urandom_range(0, 255) & $urandom_range(0, 255);
          wr_valid = 1; wr_addr = 4'(a); wr_data = 8'(d);
          model_write(a, d);
        end
        if (k == 24) begin
          skip = m_start[c];
          for (int i = 0; i < 8; i++)
            if (m_start[i]) begin m_start[i] = 0; m_on[i] = 1; m_ph0[i] = 0; m_ph1[i] = 0; n_on++; end
            else if (m_stop[i]) begin m_stop[i] = 0; m_on[i] = 0; n_off++; end
        end
        if (k == 25) begin
          if (skip) n_skip++;
          else begin m_ph0[c] = phase0_in; m_ph1[c] = phase1_in; end
        end
      end
    end
    // Self-test preset.
    @(negedge clk); test_load = 1; cyc = 0;
    @(negedge clk); test_load = 0;
    for (int k = 0; k < 26; k++) begin
      @(negedge clk); cyc = 5'(k); ch = 3'd5;
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); ch = ch_idx_t'(i); cyc = 0; #1;
      check(ch_on[i], 1, "test preset keys on");
      check(cfg_out.pan_l, 8'hFF, "test pan L"); check(cfg_out.pan_r, 8'hFF, "test pan R");
      check(cfg_out.op1.wavemode, 4'hF, "test wave");
      check(cfg_out.op1.freq, test_freq(i), "test freq");
      check(cfg_out.op1.volume, test_volume(i), "test volume");
    end
    checks += 3;
    if (n_on == 0 || n_off == 0 || n_skip == 0) begin
      failures++; $display("FAIL coverage on=%0d off=%0d skip=%0d", n_on, n_off, n_skip);
    end
    $display("key on %0d, key off %0d, skipped stores %0d", n_on, n_off, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
