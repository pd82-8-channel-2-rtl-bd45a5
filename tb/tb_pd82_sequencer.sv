// tb_pd82_sequencer: follows the slot and channel counters for several frames. Checks
// that cyc runs 0..25, that ch advances once per slot and wraps after channel 7, that a
// frame (channel 0 back to channel 0) is 208 clocks, that slot_end marks cycle 25 and that
// en low holds both counters.
module tb_pd82_sequencer;
  import pd82_pkg::*;

  logic clk = 0, rst_n, en;
  logic [4:0] cyc;
  ch_idx_t ch;
  logic slot_end;
  int checks = 0, failures = 0;

  pd82_sequencer dut (.*);

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
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int exp_cyc = 0, exp_ch = 0, last_frame = -1, n = 0;
    rst_n = 0; en = 1;
    repeat (2) @(negedge clk);
    check(cyc, 0, "reset cyc"); check(ch, 0, "reset ch");
    rst_n = 1;
    for (int i = 0; i < 3 * 208 + 50; i++) begin
      check(cyc, exp_cyc, "cyc");
      check(ch, exp_ch, "ch");
      check(slot_end, exp_cyc == 25, "slot_end");
      if (cyc == 0 && ch == 0) begin
        if (last_frame >= 0) check(n - last_frame, 208, "frame length");
        last_frame = n;
      end
      // hold for a few cycles now and then
      if (i % 97 == 50) begin
        en = 0;
        repeat (3) begin @(negedge clk); check(cyc, exp_cyc, "held cyc"); check(ch, exp_ch, "held ch"); end
        en = 1;
      end
      @(negedge clk);
      n++;
      if (exp_cyc == 25) begin exp_cyc = 0; exp_ch = (exp_ch + 1) % 8; end
      else exp_cyc++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
