// power_waster: behavioural model of one power waster, a single-stage ring
// oscillator that burns dynamic power while it is enabled. It is a
// simulation model: on the FPGA the waster is one look-up table configured
// as an inverter whose output feeds back to its own input, ANDed with an
// enable (an adaptive logic module holds two of them, a logic array block up
// to 20).
//
// While `en` is high `out` toggles every HALF_PERIOD_PS picoseconds; while it
// is low `out` rests low. `toggles` counts transitions, which is what the
// waster's dynamic power C * V^2 * f is proportional to; it is only an
// observation aid for simulation.
//
// The circuit (single-stage ring with enable) follows the attack set-up; the
// 600 ps half period is this model's assumption.
//
// Synthesis reads the timed toggle as a latch in a loop and reports a logic
// loop; that loop is the waster itself and is intended.
module power_waster #(
  parameter int unsigned HALF_PERIOD_PS = 600
) (
  input  logic en,
  output logic out
);
  timeunit 1ns;
  timeprecision 1ps;

  int unsigned toggles;

  initial begin
    out     = 1'b0;
    toggles = 0;
  end

  always begin
    if (!en) begin
      out = 1'b0;
      @(posedge en);
    end
    #(real'(HALF_PERIOD_PS) * 1ps);
    if (en) begin
      out = ~out;
      toggles++;
    end
  end

endmodule
