// sample_log_ram: simple dual-port memory that holds the logged sensor
// counts, one word per sensor per sample.
//
// One synchronous write port and one synchronous read port (data one clock
// after the address), as an FPGA block RAM provides. DEPTH defaults to 46
// sensors times 100 samples, WIDTH to the 20-bit counter.
//
// That the controller logs the sensor data to on-chip memory follows the
// monitor description; the depth (100 samples per run, the largest run used
// in the measurements) and the port arrangement are this design's choices.
module sample_log_ram #(
  parameter int unsigned DEPTH = 4600,
  parameter int unsigned WIDTH = 20,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
    rdata <= (raddr < AW'(DEPTH)) ? mem[raddr] : '0;
  end

endmodule
