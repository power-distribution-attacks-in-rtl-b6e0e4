// host_bus_if: the word-addressed register bus through which the host reaches
// the RSA core memory, the delay-fault tester and the sensor log.
//
// A write is a one-cycle pulse of `we` with `addr` and `wdata`. A read is a
// one-cycle pulse of `re`; the block answers with `rdata` and `rvalid` one
// cycle later. The host drives at most one of `we` and `re` in a cycle. The
// bus itself is this design's choice; the host in the measurements reached
// its on-chip memories over JTAG.
interface host_bus_if #(
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DATA_W = 32
) (
  input logic clk,
  input logic rst_n
);
  timeunit 1ns;
  timeprecision 1ps;

  logic              we;
  logic              re;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata;
  logic [DATA_W-1:0] rdata;
  logic              rvalid;

  modport host   (output we, re, addr, wdata, input rdata, rvalid);
  modport device (input we, re, addr, wdata, output rdata, rvalid);

  // Bus rules: never read and write in one cycle; a read answers exactly one
  // cycle later.
  property p_no_rw_collision;
    @(posedge clk) disable iff (!rst_n) !(we && re);
  endproperty
  a_no_rw_collision: assert property (p_no_rw_collision);

  property p_read_latency;
    @(posedge clk) disable iff (!rst_n) re |=> rvalid;
  endproperty
  a_read_latency: assert property (p_read_latency);
endinterface
