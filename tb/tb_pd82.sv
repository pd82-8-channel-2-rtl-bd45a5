// tb_pd82: end-to-end test of the PD82 chip at its default configuration.
//
// A host process programs the chip through its pins: it selects channels, writes
// frequencies, volumes, wave modes and pannings, keys channels on and off, and sometimes
// issues a write outside the capture window, which the chip must miss. A behavioural
// model of the whole chip, written independently from the register map, the slot timing
// and the reference arithmetic in pd82_ref_pkg, runs alongside; every clock the two
// 15-bit outputs and the Pass pin are compared with it. Midway the self test is run:
// test_n is pulled low, then released, and Pass must go low.
//
// Each mechanism of the design is counted and a failure recorded if one never occurs:
// key on, key off, a channel re-keyed while its phases are being stored, a missed write,
// operator 0 modulating operator 1, a disabled wave quadrant, unequal left/right
// panning, a negative sum turned into its magnitude, the test hold and a Pass.
// The frame period (208 clocks) is checked on the outputs.
module tb_pd82;
  import pd82_pkg::*;
  import pd82_ref_pkg::*;

  logic clk = 0, reset_n, test_n;
  logic [7:0] data;
  logic [3:0] address;
  logic ce_n, we_n;
  logic pass_n;
  logic [OUT_W-1:0] amplitude_l, amplitude_r;

  int checks = 0, failures = 0;

  pd82 dut (.*);

  always #10 clk = ~clk;  // 50 MHz

  localparam int MAX_CYCLES = 400000;

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // ---------------------------------------------------------------- chip model
  int k, c;                         // slot cycle and channel
  int m_sel;
  int m_pl[8], m_pr[8], m_f[8][2], m_v[8][2], m_w[8][2], m_ph[8][2];
  bit m_on[8], m_start[8], m_stop[8];
  bit pend; int pa, pd;
  int res_ph[2], res_l, res_r, fetch_l, fetch_r, acc_l, acc_r;
  int out_l, out_r;
  bit skip, frame_m, test_mode, seen;

  // mechanism counters
  int n_on, n_off, n_restart, n_missed, n_mod, n_wavegate, n_pan, n_neg, n_hold, n_pass;
  int n_frames;

  task automatic model_reset();
    k = 0; c = 0; m_sel = 0; pend = 0; pa = 0; pd = 0;
    for (int i = 0; i < 8; i++) begin
      m_pl[i] = 0; m_pr[i] = 0; m_on[i] = 0; m_start[i] = 0; m_stop[i] = 0;
      for (int o = 0; o < 2; o++) begin m_f[i][o] = 0; m_v[i][o] = 0; m_w[i][o] = 0; m_ph[i][o] = 0; end
    end
    res_ph = '{0, 0}; res_l = 0; res_r = 0; fetch_l = 0; fetch_r = 0; acc_l = 0; acc_r = 0;
    out_l = 0; out_r = 0; skip = 0; frame_m = 0; test_mode = 0; seen = 0;
  endtask

  task automatic apply_write(input int a, input int d);
    case (a)
      0: m_sel = d & 7;
      1: for (int i = 0; i < 8; i++) m_start[i] = d[i];
      2: for (int i = 0; i < 8; i++) m_stop[i] = d[i];
      6: m_pl[m_sel] = d;
      7: m_pr[m_sel] = d;
      8, 12: m_f[m_sel][a == 12] = (m_f[m_sel][a == 12] & 'hFF00) | d;
      9, 13: m_f[m_sel][a == 13] = (m_f[m_sel][a == 13] & 'h00FF) | (d << 8);
      10, 14: m_v[m_sel][a == 14] = d;
      11, 15: m_w[m_sel][a == 15] = d & 15;
      default: ;
    endcase
  endtask

  task automatic run_channel(input int ch);
    int a0, a1, fb, out;
    res_ph[0] = m_ph[ch][0];
    res_ph[1] = m_ph[ch][1];
    a0 = op_ref(res_ph[0], m_f[ch][0], m_v[ch][0], 4'(m_w[ch][0]), 0);
    fb = top9(a0);
    a1 = op_ref(res_ph[1], m_f[ch][1], m_v[ch][1], 4'(m_w[ch][1]), fb);
    out = top9(a1);
    res_l = pan_ref(out, m_pl[ch]);
    res_r = pan_ref(out, m_pr[ch]);
    if (m_on[ch]) begin
      if (fb != 0 && m_v[ch][1] != 0) n_mod++;
      if (m_w[ch][1] != 15 && m_v[ch][1] != 0) n_wavegate++;
      if (res_l != res_r) n_pan++;
    end
  endtask

  always @(posedge clk) begin
    if (!reset_n) model_reset();
    else begin
      bit fr;
      fr = frame_m;
      frame_m = 0;
      if (!test_n) begin
        test_mode = 1; seen = 0; n_hold++;
        for (int i = 0; i < 8; i++) begin
          m_pl[i] = 255; m_pr[i] = 255; m_w[i][1] = 15;
          m_f[i][1] = test_freq(i); m_v[i][1] = test_volume(i); m_start[i] = 1;
        end
      end else begin
        if (test_mode && fr) seen = 1;
        if (k == 1) run_channel(c);
        if (k == 2) begin acc_l += fetch_l; acc_r += fetch_r; end
        if (k == 3 && c == 0) begin
          if (acc_l < 0) n_neg++;
          out_l = acc_l < 0 ? -acc_l : acc_l;
          out_r = acc_r < 0 ? -acc_r : acc_r;
          frame_m = 1;
          n_frames++;
        end
        if (k == 4 && c == 0) begin acc_l = 0; acc_r = 0; end
        if (k >= 5 && k <= 22 && !ce_n && !we_n) begin pend = 1; pa = address; pd = data; end
        if (k == 23 && pend) begin apply_write(pa, pd); pend = 0; end
        if (k == 24) begin
          skip = m_start[c];
          for (int i = 0; i < 8; i++)
            if (m_start[i]) begin m_start[i] = 0; m_on[i] = 1; m_ph[i] = '{0, 0}; n_on++; end
            else if (m_stop[i]) begin m_stop[i] = 0; m_on[i] = 0; n_off++; end
        end
        if (k == 25) begin
          if (skip) n_restart++;
          else m_ph[c] = res_ph;
          fetch_l = m_on[c] ? res_l : 0;
          fetch_r = m_on[c] ? res_r : 0;
        end
        if (k == 25) begin k = 0; c = (c + 1) % 8; end
        else k++;
      end
    end
  end

  // Compare every clock, away from the edge.
  int last_change = -1, cycle = 0;
  logic [OUT_W-1:0] prev_l;
  always @(negedge clk) begin
    cycle++;
    if (reset_n) begin
      bit exp_pass;
      check(amplitude_l, out_l, "amplitude_l");
      check(amplitude_r, out_r, "amplitude_r");
      exp_pass = test_mode && seen && out_l < 16384 && out_r < 16384;
      check(pass_n, !exp_pass, "pass_n");
      if (!pass_n) n_pass++;
      if (amplitude_l != prev_l) begin
        if (last_change >= 0) check((cycle - last_change) % 208, 0, "output period");
        last_change = cycle;
      end
    end
    if (!reset_n || !test_n) last_change = -1;  // the frame restarts after a hold or reset
    prev_l = amplitude_l;
  end

  // ---------------------------------------------------------------- host
  // A write is held on the bus from slot cycle 6 to 20, well inside the capture window.
  task automatic host_write(input int a, input int d);
    @(negedge clk);
    while (!(k == 6 && test_n)) @(negedge clk);
    address = 4'(a); data = 8'(d); ce_n = 0; we_n = 0;
    while (k != 21) @(negedge clk);
    ce_n = 1; we_n = 1; address = 4'($urandom); data = 8'($urandom);
  endtask

  // A write the chip cannot see: only in slot cycles 23-25 and 0-4.
  task automatic host_write_missed(input int a, input int d);
    @(negedge clk);
    while (k != 23) @(negedge clk);
    address = 4'(a); data = 8'(d); ce_n = 0; we_n = 0;
    while (k != 5) @(negedge clk);
    ce_n = 1; we_n = 1;
    n_missed++;
  endtask

  task automatic setup_channel(input int ch, input int f0, input int v0, input int w0,
                               input int f1, input int v1, input int w1,
                               input int pl, input int pr);
    host_write(0, ch);
    host_write(8, f0 & 255); host_write(9, f0 >> 8); host_write(10, v0); host_write(11, w0);
    host_write(12, f1 & 255); host_write(13, f1 >> 8); host_write(14, v1); host_write(15, w1);
    host_write(6, pl); host_write(7, pr);
  endtask

  task automatic wait_frames(input int n);
    repeat (n * 208) @(negedge clk);
  endtask

  initial begin
    reset_n = 0; test_n = 1; ce_n = 1; we_n = 1; address = 0; data = 0;
    {n_on, n_off, n_restart, n_missed, n_mod, n_wavegate, n_pan, n_neg, n_hold, n_pass} = '0;
    n_frames = 0;
    repeat (3) @(negedge clk);
    reset_n = 1;
    // A plain tone on channel 0, a modulated tone on channel 1, a half-wave tone on 2.
    setup_channel(0, 0, 0, 15, 16'h0180, 255, 15, 255, 255);
    setup_channel(1, 16'h0040, 200, 15, 16'h0100, 255, 15, 200, 60);
    setup_channel(2, 16'h0300, 120, 15, 16'h0220, 255, 4'b1100, 90, 255);
    host_write(1, 8'b0000_0111);
    wait_frames(20);
    host_write_missed(2, 8'hFF);
    wait_frames(5);
    // Random channel programming, key ons and offs.
    repeat (120) begin
      int r;
      r = $urandom_range(0, 9);
      if (r < 6) host_write($urandom_range(0, 15), $urandom_range(0, 255));
      else if (r < 8) host_write(1, $urandom_range(0, 255));
      else if (r < 9) host_write(2, $urandom_range(0, 255));
      else host_write_missed($urandom_range(0, 15), $urandom_range(0, 255));
      if ($urandom_range(0, 3) == 0) wait_frames($urandom_range(1, 4));
    end
    // Self test: hold test low for a while, release, let it run.
    @(negedge clk); while (k != 10) @(negedge clk);
    test_n = 0;
    repeat (37) @(negedge clk);
    test_n = 1;
    wait_frames(30);
    // Keep working after the self test; reset ends test mode.
    reset_n = 0; repeat (2) @(negedge clk); reset_n = 1;
    setup_channel(3, 16'h0123, 255, 15, 16'h0321, 255, 15, 255, 17);
    host_write(1, 8'b0000_1000);
    wait_frames(10);
    host_write(2, 8'b0000_1000);
    wait_frames(3);

    $display("frames %0d: key on %0d, key off %0d, re-keyed during store %0d, missed writes %0d",
             n_frames, n_on, n_off, n_restart, n_missed);
    $display("modulated %0d, gated waves %0d, uneven panning %0d, negative sums %0d, test hold %0d, pass %0d",
             n_mod, n_wavegate, n_pan, n_neg, n_hold, n_pass);
    checks++;
    if (n_on == 0 || n_off == 0 || n_restart == 0 || n_missed == 0 || n_mod == 0 ||
        n_wavegate == 0 || n_pan == 0 || n_neg == 0 || n_hold == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
