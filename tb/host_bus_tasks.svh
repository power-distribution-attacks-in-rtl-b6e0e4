// Host-side bus tasks shared by the testbenches. The including module must
// declare `clk` and a host_bus_if instance named `hb`.
task automatic hb_write(input logic [19:0] addr, input logic [31:0] data);
  @(negedge clk);
  hb.we = 1'b1; hb.addr = addr; hb.wdata = data;
  @(negedge clk);
  hb.we = 1'b0;
endtask

task automatic hb_read(input logic [19:0] addr, output logic [31:0] data);
  @(negedge clk);
  hb.re = 1'b1; hb.addr = addr;
  @(negedge clk);
  hb.re = 1'b0;
  data = hb.rdata;
endtask
