// tb_pdn_testbed_top: end-to-end run of the whole test bed at reduced sizes
// (9 sensors, 200 wasters, 32-bit RSA datapath): a clean RSA operation, then
// an attack during which the monitor logs the droop and locates the attacker,
// the adder tester logs delay faults and a faulted RSA result gives away a
// prime factor of the modulus. See pdn_scenario.svh for the supply model.
module tb_pdn_testbed_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned GRID = 3, NS = GRID * GRID, NW = 200, KB = 32;
  localparam int unsigned NV = 16, LD = 64, MAXS = 20, NSAMP = 12, ATTACK_US = 80;

  initial begin
    #5ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check_rsa_cycles(input int c);
    int e;
    e = 2 * (3 + KB + KB / 2) * (KB + 3) + 12 * KB;
    check(c > e * 85 / 100 && c < e * 115 / 100, $sformatf("RSA cycles %0d vs about %0d", c, e));
  endtask

  pdn_testbed_top #(
    .NUM_SENSORS (NS),
    .NUM_WASTERS (NW),
    .KEY_BITS    (KB),
    .NUM_VECTORS (NV),
    .LOG_DEPTH   (LD),
    .MAX_SAMPLES (MAXS)
  ) dut (.*);

  `include "pdn_scenario.svh"
endmodule
