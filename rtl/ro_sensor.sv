// ro_sensor: ring-oscillator voltage sensor, a 19-stage ring oscillator
// clocking a 20-bit frequency counter.
//
// The count of ring cycles in a fixed window measures the ring's frequency,
// and so the local supply voltage (lower voltage, slower ring, fewer counts).
// The controller opens the window by raising `gate` and closes it by
// lowering it. `gate` is brought into the ring's clock domain through two
// flip-flops; the first ring edge that sees it high clears the counter
// (counting that edge as 1), every later edge while it stays high adds one.
// After `gate` falls the count stops within three ring cycles and then holds,
// so the controller can read `count` safely a few system clocks later; the
// start of the next window resets it. This is how all sensors are read and
// reset at the same moment in every sampling period.
//
// Ring length and counter width follow the sensor description; the gate
// synchroniser and the clear-on-open scheme are this design's choices. The
// ring itself is the behavioural model ring_oscillator.
module ro_sensor #(
  parameter int unsigned STAGES    = 19,
  parameter int unsigned CNT_W     = 20,
  parameter int unsigned F_NOM_KHZ = 105_000,
  parameter int unsigned V_NOM_MV  = 1100
) (
  input  logic             ro_en,    // ring enable
  input  logic [15:0]      vdd_mv,   // local supply voltage (model input)
  input  logic             gate,     // counting window, system clock domain
  output logic [CNT_W-1:0] count     // ring cycles in the last window
);
  timeunit 1ns;
  timeprecision 1ps;

  logic ro_clk;

  ring_oscillator #(
    .STAGES    (STAGES),
    .F_NOM_KHZ (F_NOM_KHZ),
    .V_NOM_MV  (V_NOM_MV)
  ) u_ring (
    .en     (ro_en),
    .vdd_mv (vdd_mv),
    .out    (ro_clk)
  );

  // Gate synchroniser and edge detect in the ring's clock domain.
  logic gate_s1, gate_s2, gate_s3;

  // The ring-domain flops are cleared while the ring is disabled.
  always_ff @(posedge ro_clk or negedge ro_en) begin
    if (!ro_en) begin
      gate_s1 <= 1'b0;
      gate_s2 <= 1'b0;
      gate_s3 <= 1'b0;
    end else begin
      gate_s1 <= gate;
      gate_s2 <= gate_s1;
      gate_s3 <= gate_s2;
    end
  end

  // Frequency counter; saturates instead of wrapping.
  always_ff @(posedge ro_clk or negedge ro_en) begin
    if (!ro_en)                       count <= '0;
    else if (gate_s2 && !gate_s3)     count <= CNT_W'(1);
    else if (gate_s2 && count != '1)  count <= count + 1'b1;
  end

endmodule
