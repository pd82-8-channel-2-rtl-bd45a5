// tb_pd82_mixer: drives the slot timing and random channel outputs and on flags for a
// number of frames. Checks that the outputs change only in cycle 3 of channel 0's slot,
// once per 208 clocks, and that they equal the magnitude of the sum of the outputs of
// the channels that were on, over the previous frame, for left and right.
module tb_pd82_mixer;
  import pd82_pkg::*;

  logic clk = 0, rst_n, en;
  logic [4:0] cyc;
  ch_idx_t ch;
  logic ch_on;
  logic signed [CHOUT_W-1:0] in_l, in_r;
  logic [OUT_W-1:0] out_l, out_r;
  logic frame;
  int checks = 0, failures = 0;
  int n_neg = 0, n_frames = 0;

  pd82_mixer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
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
    int sum_l = 0, sum_r = 0, exp_l = 0, exp_r = 0, last_frame = -1, n = 0;
    bit first = 1;
    rst_n = 0; en = 1; cyc = 0; ch = 0; ch_on = 0; in_l = 0; in_r = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      for (int c = 0; c < 8; c++) begin
        for (int k = 0; k < 26; k++) begin
          @(negedge clk);
          n++;
          cyc = 5'(k); ch = ch_idx_t'(c);
          in_l = 11'($urandom); in_r = 11'($urandom);
          if (f % 3 == 0) begin in_l = -11'sd900; in_r = 11'sd700; end  // drives a negative sum
          ch_on = $urandom_range(0, 3) != 0;
          #1;
          if (frame) begin
            if (last_frame >= 0) check(n - last_frame, 208, "frame period");
            last_frame = n;
            check(c * 26 + k, 4, "frame pulse after cycle 3 of slot 0");
            if (!first) begin
              check(out_l, exp_l, "left magnitude"); check(out_r, exp_r, "right magnitude");
              n_frames++;
            end
            first = 0;
          end
          if (k == 25) begin
            // Output assertion in cycle 3 of slot 0 takes the channels 0..7 of the frame.
            if (ch_on) begin sum_l += int'(in_l); sum_r += int'(in_r); end
            if (c == 7) begin
              exp_l = sum_l < 0 ? -sum_l : sum_l;
              exp_r = sum_r < 0 ? -sum_r : sum_r;
              if (sum_l < 0) n_neg++;
              sum_l = 0; sum_r = 0;
            end
          end
        end
      end
    end
    checks++;
    if (n_neg == 0 || n_frames < 30) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
