// tb_pd82_channel: runs the channel engine on random channel configurations and compares
// the two advanced phases and the panned outputs with the reference chain (operator 0
// without feedin, its top nine bits as operator 1's feedin, operator 1's top nine bits
// panned). Checks that done comes 23 cycles after start, so the result is ready for the
// chip's fetch in slot cycle 25, and that en low freezes the engine.
module tb_pd82_channel;
  import pd82_pkg::*;
  import pd82_ref_pkg::*;

  logic clk = 0, rst_n, en, start;
  ch_cfg_t cfg;
  logic [PHASE_W-1:0] phase0_out, phase1_out;
  logic signed [CHOUT_W-1:0] out_l, out_r;
  logic done;
  int checks = 0, failures = 0;
  int modulated = 0;

  pd82_channel dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic op_cfg_t rand_op();
    op_cfg_t o;
    o.freq = 16'($urandom);
    o.volume = 8'($urandom);
    o.wavemode = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hF;
    return o;
  endfunction

  task automatic run_one(input ch_cfg_t c, input bit stall);
    int p0, p1, a0, a1, fb, lat;
    p0 = c.phase0; p1 = c.phase1;
    a0 = op_ref(p0, c.op0.freq, c.op0.volume, c.op0.wavemode, 0);
    fb = top9(a0);
    a1 = op_ref(p1, c.op1.freq, c.op1.volume, c.op1.wavemode, fb);
    if (fb != 0) modulated++;
    @(negedge clk);
    cfg = c; start = 1;
    @(negedge clk);
    start = 0; cfg = '0;
    lat = 1;
    if (stall) begin en = 0; repeat (4) @(negedge clk); en = 1; end
    while (!done && lat < 40) begin @(negedge clk); lat++; end
    check(lat, 23, "start-to-done latency");
    check(phase0_out, p0, "phase 0");
    check(phase1_out, p1, "phase 1");
    check(out_l, pan_ref(top9(a1), c.pan_l), "left");
    check(out_r, pan_ref(top9(a1), c.pan_r), "right");
    @(negedge clk);
  endtask

  initial begin
    ch_cfg_t c;
    rst_n = 0; en = 1; start = 0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Unmodulated full-scale tone at a quarter period, full left, silent right.
    c = '0;
    c.op1 = '{freq: 16'h0000, volume: 8'hFF, wavemode: 4'hF};
    c.phase1 = 18'(64 << 8);
    c.pan_l = 8'hFF;
    run_one(c, 0);
    check(out_r, 0, "silent right at pan $00");
    repeat (300) begin
      c.pan_l = 8'($urandom); c.pan_r = 8'($urandom);
      c.op0 = rand_op(); c.op1 = rand_op();
      c.phase0 = 18'($urandom); c.phase1 = 18'($urandom);
      run_one(c, $urandom_range(0, 9) == 0);
    end
    checks++;
    if (modulated == 0) begin failures++; $display("FAIL no modulated case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
