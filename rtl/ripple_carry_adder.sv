// ripple_carry_adder: the victim circuit of the delay-fault experiments.
//
// A launch register captures the operands, a WIDTH-stage ripple carry chain
// adds them, and a capture register samples the sum one clock later. The
// longest path runs through every stage of the carry chain, and by choosing
// operands the host sensitises carry paths of any length from 1 to WIDTH
// stages, so paths with a spread of timing slack can be exercised. When the
// supply voltage sags, the slowest sensitised paths miss the capture edge and
// the captured sum is wrong.
//
// Interface: `a`, `b` are sampled every clock; `sum` (WIDTH+1 bits, carry out
// on top) is the sum of the operands presented two clocks earlier.
//
// The ripple carry adder with a carry chain of up to 64 stages as victim is
// the measurement set-up's; the explicit register stages are this design's
// reading of how a captured path is timed.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   sum
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [WIDTH-1:0] a_q, b_q;   // launch registers
  logic [WIDTH:0]   carry;      // carry[i] enters stage i
  logic [WIDTH-1:0] s;

  // Ripple carry chain: one full adder per stage.
  assign carry[0] = 1'b0;
  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    assign s[i]       = a_q[i] ^ b_q[i] ^ carry[i];
    assign carry[i+1] = (a_q[i] & b_q[i]) | (carry[i] & (a_q[i] ^ b_q[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      sum <= '0;
    end else begin
      a_q <= a;
      b_q <= b;
      sum <= {carry[WIDTH], s};   // capture register
    end
  end

endmodule
