// tb_pd82_panning: checks the left/right products against (value * pan) / 256 rounded
// down, for the corner values (silence at $00, full level at $FF, extreme inputs) and
// random ones.
module tb_pd82_panning;
  import pd82_pkg::*;
  import pd82_ref_pkg::*;

  logic signed [FEED_W-1:0] value;
  logic [7:0] pan_l, pan_r;
  logic signed [CHOUT_W-1:0] out_l, out_r;
  int checks = 0, failures = 0;

  pd82_panning dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int v, input int l, input int r);
    value = v[10:0]; pan_l = l[7:0]; pan_r = r[7:0];
    #1;
    checks += 2;
    if (out_l != pan_ref(v, l) || out_r != pan_ref(v, r)) begin
      failures++;
      if (failures < 10)
        $display("FAIL v=%0d l=%0d r=%0d: got %0d/%0d expected %0d/%0d", v, l, r,
                 out_l, out_r, pan_ref(v, l), pan_ref(v, r));
    end
  endtask

  initial begin
    try(127, 0, 255);
    try(-128, 255, 0);
    try(1023, 255, 255);
    try(-1024, 255, 128);
    try(-1, 1, 255);
    repeat (2000)
      try($urandom_range(0, 2047) - 1024, $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
