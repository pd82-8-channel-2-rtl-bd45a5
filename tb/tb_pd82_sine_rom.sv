// tb_pd82_sine_rom: checks the sine lookup against floor(255*sin) computed here, for every
// address and several quadrant-enable patterns, plus table values stated in the design
// (T[0]=0, T[85]=$7F, T[128]=$B4, T[255]=$FF), the one-cycle read latency and the hold
// behaviour of en.
module tb_pd82_sine_rom;
  import pd82_ref_pkg::*;

  logic clk = 0;
  logic en;
  logic [3:0] mode;
  logic [9:0] addr;
  logic signed [8:0] data;
  int checks = 0, failures = 0;

  pd82_sine_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic read(input int a, input logic [3:0] m, output int v);
    @(negedge clk);
    en = 1; addr = a[9:0]; mode = m;
    @(negedge clk);
    en = 0;
    v = data;
  endtask

  initial begin
    int v;
    logic [3:0] modes [4] = '{4'b1111, 4'b1010, 4'b0101, 4'b1100};
    en = 0; mode = 0; addr = 0;
    foreach (modes[m])
      for (int a = 0; a < 1024; a++) begin
        read(a, modes[m], v);
        check(v, sine_ref(a, modes[m]), $sformatf("addr %0d mode %b", a, modes[m]));
      end
    // Values printed in the design's table.
    read(0, 4'hF, v);   check(v, 0, "T[0]");
    read(85, 4'hF, v);  check(v, 8'h7F, "T[85]");
    read(128, 4'hF, v); check(v, 8'hB4, "T[128]");
    read(255, 4'hF, v); check(v, 8'hFF, "T[255]");
    read(256, 4'hF, v); check(v, 8'hFF, "mirror of T[255]");
    read(512, 4'hF, v); check(v, 0, "negative half start");
    read(767, 4'hF, v); check(v, -255, "negative peak");
    // Latency: data changes only on the clock edge, and en low holds it.
    @(negedge clk); en = 1; addr = 10'd128; mode = 4'hF;
    #1 check(data, -255, "no change before edge");
    @(negedge clk); en = 0; addr = 10'd0;
    check(data, 180, "value after one edge");
    @(negedge clk); check(data, 180, "held with en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
