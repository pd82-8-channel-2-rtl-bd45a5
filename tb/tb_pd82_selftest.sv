// tb_pd82_selftest: the chip's built-in self test, run for one full period of its lowest
// tone (channel 0, phase increment 10/256 index per frame: 26215 frames, 5.45 million
// clocks at the default configuration).
//
// After reset, test_n is pulled low and released. From then on every channel plays an
// unmodulated sine on operator 1 (operator 0 has volume 0 after reset) at full panning.
// The expected output of every frame is computed here in closed form: the n-th update of
// a channel with increment F reads the sine at phase n*F, so frame f carries channel i
// (i >= 1) at n = f+1 and channel 0, whose first store is skipped because it is keyed on
// in its own slot, at n = 1 for f = 0 and n = f afterwards. Each frame's outputs must be
// the magnitude of that sum, Pass must stay asserted (low) from the second output on,
// the outputs must stay below the 2^14 threshold, and a new output must appear every
// 208 clocks.
module tb_pd82_selftest;
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

  always #10 clk = ~clk;

  localparam int FRAMES = 26215;

  initial begin
    repeat (FRAMES * 208 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int frame_sum(input int f);
    int s = 0, n, a;
    for (int i = 0; i < 8; i++) begin
      n = (i == 0) ? ((f == 0) ? 1 : f) : f + 1;
      a = sine_ref(((n * test_freq(i)) & 'h3FFFF) >> 8, 4'hF) * test_volume(i);
      s += pan_ref(top9(a), 255);
    end
    return s < 0 ? -s : s;
  endfunction

  initial begin
    int peak = 0, nonzero = 0;
    reset_n = 0; test_n = 1; ce_n = 1; we_n = 1; address = 0; data = 0;
    repeat (3) @(negedge clk);
    reset_n = 1;
    @(negedge clk);
    test_n = 0;
    repeat (5) @(negedge clk);
    test_n = 1;  // frame 0 starts with the next clock
    // First output of test mode: slot 0, cycle 3 of frame 0 (nothing accumulated yet).
    repeat (4) @(negedge clk);
    check(amplitude_l, 0, "first output");
    for (int f = 0; f < FRAMES; f++) begin
      int e;
      repeat (206) @(negedge clk);
      checks++;
      if (amplitude_l != (f == 0 ? 0 : frame_sum(f - 1))) begin
        failures++; $display("FAIL output changed early in frame %0d: %0d vs %0d", f, amplitude_l, frame_sum(f - 1));
      end
      repeat (2) @(negedge clk);
      e = frame_sum(f);
      check(amplitude_l, e, $sformatf("left, frame %0d", f));
      check(amplitude_r, e, $sformatf("right, frame %0d", f));
      check(pass_n, 0, "pass asserted");
      check(amplitude_l < 16384, 1, "below threshold");
      if (e > peak) peak = e;
      if (e != 0) nonzero++;
    end
    $display("frames %0d, peak output %0d, non-zero frames %0d", FRAMES, peak, nonzero);
    checks++;
    if (nonzero < FRAMES / 2) begin failures++; $display("FAIL output mostly silent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
