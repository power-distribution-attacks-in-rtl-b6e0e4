// tb_pdn_testbed_full: the end-to-end scenario of pdn_testbed_top with every
// parameter at its default: 46 sensors, 12,000 wasters, a 128-bit RSA
// datapath, 64 adder vectors, 100-sample log. It also checks that one RSA
// operation takes close to 0.59 ms worth of clocks at the 128-bit core's
// 94.74 MHz maximum clock (about 55,900 cycles). See pdn_scenario.svh.
module tb_pdn_testbed_full;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned GRID = 7, NS = 46, NW = 12_000, KB = 128;
  localparam int unsigned NV = 64, LD = 256, MAXS = 100, NSAMP = 10, ATTACK_US = 30;

  initial begin
    #20ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check_rsa_cycles(input int c);
    check(c > 55_900 * 85 / 100 && c < 55_900 * 115 / 100,
          $sformatf("RSA cycles %0d vs about 55,900 (0.59 ms at 94.74 MHz)", c));
  endtask

  pdn_testbed_top dut (.*);

  `include "pdn_scenario.svh"
endmodule
