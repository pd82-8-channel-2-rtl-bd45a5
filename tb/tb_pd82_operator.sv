// tb_pd82_operator: runs the operator on random configurations, phases and feedin
// values and compares the advanced phase and the amplitude with the reference
// (phase + frequency; volume * sin(phase + feedin)). Also checks that done comes exactly
// five cycles after start, as the cycle plan requires, and that en low freezes it.
module tb_pd82_operator;
  import pd82_pkg::*;
  import pd82_ref_pkg::*;

  logic clk = 0, rst_n, en, start;
  op_cfg_t cfg;
  logic [PHASE_W-1:0] phase_in, phase_out;
  logic signed [FEED_W-1:0] feedin;
  logic signed [AMP_W-1:0] amp;
  logic done;
  int checks = 0, failures = 0;

  pd82_operator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
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

  task automatic run_one(input int f, input int v, input logic [3:0] m, input int ph,
                         input int fi, input bit stall);
    int exp_ph, exp_amp, lat;
    exp_ph  = ph;
    exp_amp = op_ref(exp_ph, f, v, m, fi);
    @(negedge clk);
    cfg = '{freq: f[15:0], volume: v[7:0], wavemode: m};
    phase_in = ph[17:0]; feedin = fi[10:0]; start = 1;
    @(negedge clk);
    start = 0;
    cfg = '0; phase_in = '0; feedin = '0;  // inputs only matter in the start cycle
    lat = 1;
    if (stall) begin
      en = 0; repeat (3) @(negedge clk); en = 1;
    end
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    check(lat, 5, "start-to-done latency");
    check(phase_out, exp_ph, "phase");
    check(amp, exp_amp, $sformatf("amp f=%0d v=%0d m=%b ph=%0d fi=%0d", f, v, m, ph, fi));
    @(negedge clk);
    check(done, 0, "done is one cycle");
  endtask

  initial begin
    rst_n = 0; en = 1; start = 0; cfg = '0; phase_in = '0; feedin = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Directed: quarter-period phases with no feedin, and a wrap of the accumulator.
    run_one(0, 255, 4'hF, 64 << 8, 0, 0);         // index 64
    run_one(256, 255, 4'hF, 255 << 8, 0, 0);      // index 256
    run_one(16'h0100, 128, 4'hF, 'h3FF00, 0, 0);  // wraps to 0
    run_one(0, 255, 4'hF, 0, 511, 0);             // feedin +511 -> +255.5 indices
    run_one(0, 255, 4'hF, 0, -512, 0);            // feedin -512 -> -256 indices
    run_one(0, 255, 4'b0111, 100 << 8, 0, 0);     // quadrant 0 disabled
    run_one(300, 200, 4'hF, 5000, 33, 1);         // held by en in mid-run
    repeat (400)
      run_one($urandom_range(0, 65535), $urandom_range(0, 255), 4'($urandom),
              $urandom_range(0, 262143), $urandom_range(0, 2047) - 1024, $urandom_range(0, 7) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
