// tb_ring_oscillator: measures the model's frequency at several supply
// voltages and checks it against the linear law (105 MHz at 1.1 V, 1.2 % per
// % of voltage), that it stops while disabled, and that it restarts.
module tb_ring_oscillator;
  timeunit 1ns;
  timeprecision 1ps;

  logic        en = 1'b0;
  logic [15:0] vdd_mv = 16'd1100;
  logic        out;

  ring_oscillator dut (.*);

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

  int edges;
  always @(posedge out) edges++;

  real f_meas, f_exp;
  int  volts[4] = '{1100, 1050, 967, 846};
  initial begin
    edges = 0;
    #100ns;
    check(out == 1'b0 && edges == 0, "stopped while disabled");
    en = 1'b1;
    foreach (volts[k]) begin
      vdd_mv = 16'(volts[k]);
      #200ns;
      edges = 0;
      #10us;
      f_meas = real'(edges) / 10.0;                    // MHz
      f_exp  = 105.0 * (1.0 - 1.2 * (1100.0 - real'(volts[k])) / 1100.0);
      check(f_meas > f_exp - 0.2 && f_meas < f_exp + 0.2,
            $sformatf("%0d mV: %f MHz, expected %f", volts[k], f_meas, f_exp));
    end
    en = 1'b0;
    #50ns;
    edges = 0;
    #1us;
    check(edges == 0 && out == 1'b0, "stops when disabled");
    en = 1'b1;
    #1us;
    check(edges > 50, "restarts when enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
