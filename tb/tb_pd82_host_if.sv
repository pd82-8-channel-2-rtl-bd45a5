// tb_pd82_host_if: drives the slot cycle counter and the host bus. Checks that a write
// held inside the window (cycles 5-22) is presented for exactly one cycle at cycle 23,
// that the last of several writes in one window wins, that a write seen only outside the
// window is lost, and that a write strobe with ce_n or we_n high is ignored.
module tb_pd82_host_if;
  import pd82_pkg::*;

  logic clk = 0, rst_n;
  logic [4:0] cyc;
  logic ce_n, we_n;
  logic [3:0] address;
  logic [7:0] data;
  logic wr_valid;
  logic [3:0] wr_addr;
  logic [7:0] wr_data;
  int checks = 0, failures = 0;

  pd82_host_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  // One slot; bus writes are driven in cycles [a0,a1] with (addr,dat), and in [b0,b1]
  // with (addr+1, dat+1). ce/we select which strobes are active. Returns the valid
  // count and the presented address/data.
  task automatic slot(input int a0, input int a1, input int b0, input int b1,
                      input logic [3:0] addr, input logic [7:0] dat, input bit use_ce,
                      output int nvalid, output int vcyc, output logic [3:0] ga,
                      output logic [7:0] gd);
    nvalid = 0; vcyc = -1; ga = 0; gd = 0;
    for (int c = 0; c < 26; c++) begin
      @(negedge clk);
      cyc = 5'(c);
      ce_n = 1; we_n = 1; address = 4'($urandom); data = 8'($urandom);
      if (c >= a0 && c <= a1) begin ce_n = !use_ce; we_n = 0; address = addr; data = dat; end
      if (c >= b0 && c <= b1) begin ce_n = 0; we_n = 0; address = addr + 1'b1; data = dat + 1'b1; end
      #1;
      if (wr_valid) begin nvalid++; vcyc = c; ga = wr_addr; gd = wr_data; end
    end
  endtask

  initial begin
    int nv, vc;
    logic [3:0] ga;
    logic [7:0] gd;
    rst_n = 0; cyc = 0; ce_n = 1; we_n = 1; address = 0; data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Write inside the window.
    slot(8, 12, -1, -1, 4'hA, 8'h5C, 1, nv, vc, ga, gd);
    check(nv, 1, "one write presented"); check(vc, 23, "presented in cycle 23");
    check(ga, 4'hA, "address"); check(gd, 8'h5C, "data");
    // Two writes in one window: the later wins.
    slot(5, 6, 20, 22, 4'h3, 8'h10, 1, nv, vc, ga, gd);
    check(nv, 1, "one write per slot"); check(ga, 4'h4, "later address wins"); check(gd, 8'h11, "later data wins");
    // Only outside the window: lost.
    slot(0, 4, 23, 25, 4'h7, 8'h77, 1, nv, vc, ga, gd);
    check(nv, 0, "write outside window lost");
    // ...and nothing carries into the next slot.
    slot(-1, -1, -1, -1, 4'h0, 8'h00, 1, nv, vc, ga, gd);
    check(nv, 0, "no stale write");
    // we_n low but ce_n high: not a write.
    slot(5, 22, -1, -1, 4'h9, 8'h99, 0, nv, vc, ga, gd);
    check(nv, 0, "ce_n high ignored");
    // Random single writes.
    repeat (100) begin
      int s, e;
      logic [3:0] ra; logic [7:0] rd;
      s = $urandom_range(5, 22); e = $urandom_range(s, 22);
      ra = 4'($urandom); rd = 8'($urandom);
      slot(s, e, -1, -1, ra, rd, 1, nv, vc, ga, gd);
      check(nv, 1, "random write seen"); check(ga, ra, "random address"); check(gd, rd, "random data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
