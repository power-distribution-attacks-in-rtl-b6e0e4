// tb_power_waster_array: checks that the enable reaches every waster on the
// same clock edge, that all of them toggle while enabled, and that all stop
// when the enable is removed (200 wasters).
module tb_power_waster_array;
  timeunit 1ns;
  timeprecision 1ps;
  localparam int unsigned NW = 200;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, active;
  always #10 clk = ~clk;

  power_waster_array #(.NUM_WASTERS(NW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lo, hi;
  int unsigned tg[NW];
  for (genvar i = 0; i < NW; i++) begin : g_probe
    assign tg[i] = dut.g_waster[i].u_pw.toggles;
  end

  initial begin
    #95;
    rst_n = 1'b1;
    @(negedge clk);
    check(active == 1'b0, "inactive after reset");
    enable = 1'b1;
    @(posedge clk);
    #1;
    check(active == 1'b1, "active one clock after enable");
    #1199;
    lo = 1 << 30; hi = 0;
    for (int i = 0; i < int'(NW); i++) begin
      int t;
      t = int'(tg[i]);
      if (t < lo) lo = t;
      if (t > hi) hi = t;
    end
    check(lo >= 1998 && hi <= 2001, $sformatf("toggles per waster %0d..%0d", lo, hi));
    check(hi - lo <= 1, "all wasters started on the same edge");
    @(negedge clk) enable = 1'b0;
    @(posedge clk);
    #100;
    lo = int'(dut.g_waster[0].u_pw.toggles);
    #1000;
    check(int'(dut.g_waster[0].u_pw.toggles) == lo && !active, "stopped after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
