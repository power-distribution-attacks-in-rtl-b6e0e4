// power_waster_array: the attacker's circuit, NUM_WASTERS power wasters that
// are all switched on or off at the same instant. Behavioural model: the
// wasters themselves are simulation models (see power_waster).
//
// The enable is registered once in the attacker's clock domain and fans out to
// every waster, so all of them start on the same edge: the sudden step in
// supply current (di/dt) is what produces the inductive supply droop. `active`
// reports the registered enable. The waster outputs drive nothing; on the
// FPGA they are kept from being optimised away by placement constraints.
//
// From the attack set-up: 12,000 wasters on the Cyclone V (28,160 on the
// Arria 10), enabled all at once. The single enable register is this design's
// choice.
module power_waster_array #(
  parameter int unsigned NUM_WASTERS    = 12_000,
  parameter int unsigned HALF_PERIOD_PS = 600
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  output logic active
);
  timeunit 1ns;
  timeprecision 1ps;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active <= 1'b0;
    else        active <= enable;
  end

  logic [NUM_WASTERS-1:0] waster_out;

  for (genvar i = 0; i < NUM_WASTERS; i++) begin : g_waster
    power_waster #(.HALF_PERIOD_PS(HALF_PERIOD_PS)) u_pw (
      .en  (active),
      .out (waster_out[i])
    );
  end

endmodule
