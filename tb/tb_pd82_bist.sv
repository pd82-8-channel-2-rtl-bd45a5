// tb_pd82_bist: checks the self-test flag and the Pass output. Outside test mode pass_n
// stays high; pulling test_n low raises hold and enters test mode; after release, pass_n
// goes low only once an output frame has been seen with both outputs below 2^14, goes
// high for an output at or above it, and reset leaves test mode. A random phase then
// drives test_n, reset, frame pulses and output values for many clocks and compares
// hold, test_mode and pass_n every clock with a small model of the rules above.
module tb_pd82_bist;
  import pd82_pkg::*;

  logic clk = 0, rst_n, test_n, frame;
  logic [OUT_W-1:0] out_l, out_r;
  logic hold, test_mode, pass_n;
  int checks = 0, failures = 0;

  pd82_bist dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic pulse_frame(input int l, input int r);
    @(negedge clk); out_l = 15'(l); out_r = 15'(r); frame = 1;
    @(negedge clk); frame = 0;
  endtask

  // Random stimulus against a model: test mode is set by test_n low and cleared only by
  // the asynchronous reset; a frame seen after release arms Pass; Pass needs bit 14 clear
  // on both outputs.
  int n_pass_low, n_over;
  task automatic random_phase(input int cycles);
    bit m_test, m_seen;
    m_test = 0; m_seen = 0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    repeat (cycles) begin
      int r;
      r = $urandom_range(0, 99);
      rst_n  = (r != 0);
      test_n = !(r >= 1 && r <= 4);
      frame  = ($urandom_range(0, 5) == 0);
      out_l  = ($urandom_range(0, 9) == 0) ? 15'($urandom_range(16384, 32767)) : 15'($urandom_range(0, 16383));
      out_r  = ($urandom_range(0, 9) == 0) ? 15'($urandom_range(16384, 32767)) : 15'($urandom_range(0, 16383));
      #1;
      check(hold, !test_n, "random: hold");
      check(pass_n, !(rst_n && m_test && m_seen && out_l < 16384 && out_r < 16384), "random: pass_n");
      if (!pass_n) n_pass_low++;
      if (rst_n && m_test && m_seen && (out_l >= 16384 || out_r >= 16384)) n_over++;
      @(posedge clk); #1;
      if (!rst_n) begin m_test = 0; m_seen = 0; end
      else if (!test_n) begin m_test = 1; m_seen = 0; end
      else if (m_test && frame) m_seen = 1;
      check(test_mode, m_test, "random: test_mode");
      @(negedge clk);
    end
    rst_n = 1; test_n = 1; frame = 0;
    $display("random phase: pass low %0d clocks, over threshold in test %0d clocks", n_pass_low, n_over);
    checks++;
    if (n_pass_low == 0 || n_over == 0) begin
      failures++;
      $display("FAIL random phase did not reach both outcomes");
    end
  endtask

  initial begin
    n_pass_low = 0; n_over = 0;
    rst_n = 0; test_n = 1; frame = 0; out_l = 0; out_r = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pulse_frame(100, 100);
    @(negedge clk);
    check(pass_n, 1, "no pass outside test mode");
    check(hold, 0, "no hold outside test");
    test_n = 0;
    #1 check(hold, 1, "hold while test pin low");
    repeat (3) @(negedge clk);
    check(test_mode, 1, "test mode entered");
    check(pass_n, 1, "no pass before a frame");
    test_n = 1;
    repeat (5) @(negedge clk);
    check(hold, 0, "hold released");
    check(pass_n, 1, "no pass before first frame in test mode");
    pulse_frame(1000, 16383);
    @(negedge clk);
    check(pass_n, 0, "pass below threshold");
    pulse_frame(16384, 0);
    @(negedge clk);
    check(pass_n, 1, "left at threshold fails");
    pulse_frame(0, 20000);
    @(negedge clk);
    check(pass_n, 1, "right over threshold fails");
    pulse_frame(5, 5);
    @(negedge clk);
    check(pass_n, 0, "pass again");
    rst_n = 0; @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(test_mode, 0, "reset leaves test mode");
    check(pass_n, 1, "no pass after reset");
    random_phase(3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
