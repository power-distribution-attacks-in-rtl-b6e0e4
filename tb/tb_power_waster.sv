// tb_power_waster: checks that a waster toggles at its nominal rate while
// enabled and is quiet while disabled.
module tb_power_waster;
  timeunit 1ns;
  timeprecision 1ps;

  logic en = 1'b0, out;
  power_waster dut (.*);

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

  int tog = 0;
  always @(out) tog++;

  initial begin
    #10ns;
    tog = 0;
    #1us;
    check(tog == 0 && out == 1'b0, "quiet while disabled");
    en = 1'b1;
    tog = 0;
    #1200ns;   // 2000 half periods of 600 ps
    check(tog >= 1999 && tog <= 2001, $sformatf("%0d toggles in 1.2 us", tog));
    check(dut.toggles >= 1999 && dut.toggles <= 2001, "toggle counter");
    en = 1'b0;
    #10ns;
    tog = 0;
    #1us;
    check(tog == 0 && out == 1'b0, "quiet after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
