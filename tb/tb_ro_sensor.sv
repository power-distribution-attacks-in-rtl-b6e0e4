// tb_ro_sensor: opens 10 us counting windows with a 50 MHz system clock at
// several supply voltages and checks the count against the ring frequency
// (about 1,050 counts at 1.1 V), that lower voltage gives fewer counts, that
// the count holds after the window closes and restarts with the next window.
module tb_ro_sensor;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  always #10 clk = ~clk;

  logic        ro_en = 1'b0, gate = 1'b0;
  logic [15:0] vdd_mv = 16'd1100;
  logic [19:0] count;

  ro_sensor dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window(output int c);
    @(negedge clk) gate = 1'b1;
    repeat (500) @(negedge clk);
    gate = 1'b0;
    repeat (8) @(negedge clk);
    c = int'(count);
  endtask

  int volts[3] = '{1100, 1000, 846};
  int c, prev, expect_c;
  initial begin
    ro_en = 1'b1;
    #100;
    ro_en = 1'b0;
    #10;
    check(count == '0, "cleared while the ring is disabled");
    ro_en = 1'b1;
    #200;
    prev = 1 << 30;
    foreach (volts[k]) begin
      vdd_mv = 16'(volts[k]);
      window(c);
      expect_c = int'(105.0 * 10.0 * (1.0 - 1.2 * (1100.0 - real'(volts[k])) / 1100.0));
      check(c >= expect_c - 3 && c <= expect_c + 3,
            $sformatf("%0d mV: count %0d, expected about %0d", volts[k], c, expect_c));
      check(c < prev, "fewer counts at lower voltage");
      prev = c;
      repeat (50) @(negedge clk);
      check(int'(count) == c, "count holds after the window");
    end
    ro_en = 1'b0;
    #10;
    check(count == '0, "cleared when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
