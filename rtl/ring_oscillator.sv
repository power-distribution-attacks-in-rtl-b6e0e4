// ring_oscillator: behavioural model of the sensor's ring oscillator. It is
// a simulation model, not synthesizable logic: on the FPGA the ring is a
// closed loop of STAGES inverting look-up tables, which no RTL can describe
// in a way a synthesis tool maps to a ring.
//
// The model toggles `out` with a half period that follows the supply voltage
// seen at the ring's position, `vdd_mv` (millivolts). Frequency falls linearly
// with voltage: f = F_NOM_KHZ * (1 - SENS_PPM * (V_NOM_MV - vdd) / V_NOM_MV / 1e6),
// which stands in for the measured calibration curve of frequency against
// voltage. While `en` is low the ring is stopped with `out` low, as a ring
// whose first stage is a NAND with an enable input.
//
// From the measurement set-up: 19 inverting stages, about 105 MHz at the
// nominal 1.1 V on the Cyclone V (150 MHz at 0.9 V on the Arria 10). The
// linear voltage law and its slope (1.2 % of frequency per % of voltage,
// enough for one count in 1,000 per millivolt) are this model's assumptions.
//
// The half period is computed at run time, so lint warns that the delay may
// be zero; it never is for any supply above 0 V. Synthesis reports the timed
// toggle as a loop, which is the ring itself.
module ring_oscillator #(
  parameter int unsigned STAGES    = 19,
  parameter int unsigned F_NOM_KHZ = 105_000,
  parameter int unsigned V_NOM_MV  = 1100,
  parameter int unsigned SENS_PPM  = 1_200_000
) (
  input  logic        en,
  input  logic [15:0] vdd_mv,
  output logic        out
);
  timeunit 1ns;
  timeprecision 1ps;

  // The odd stage count is what makes the loop oscillate.
  initial assert (STAGES % 2 == 1) else $fatal(1, "ring_oscillator: STAGES must be odd");

  function automatic realtime half_period(input logic [15:0] v);
    real f_khz;
    f_khz = real'(F_NOM_KHZ) * (1.0 - real'(SENS_PPM) / 1.0e6
            * (real'(V_NOM_MV) - real'(v)) / real'(V_NOM_MV));
    if (f_khz < 1000.0) f_khz = 1000.0;
    return 1.0e6 / f_khz / 2.0 * 1ns;
  endfunction

  initial out = 1'b0;

  always begin
    if (!en) begin
      out = 1'b0;
      @(posedge en);
    end
    #(half_period(vdd_mv));
    if (en) out = ~out;
  end

endmodule
