// tb_rsa_host_mem: checks the RSA operand memory through the host bus: word
// write and read-back of p, q, d and X, that a start pulse runs the attached
// core (N = 32) and raises the done flag, that operand writes are ignored
// while the core is busy, that Yp and Yq read back correctly and that the
// cycle counter matches the measured operation length.
module tb_rsa_host_mem;
  import pdn_pkg::*;
  import rsa_ref_pkg::*;
  localparam int unsigned N = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  host_bus_if hb (.clk(clk), .rst_n(rst_n));

  logic           core_start, core_busy, core_done;
  logic [N-1:0]   core_p, core_q, core_yp, core_yq;
  logic [2*N-1:0] core_d, core_x;

  rsa_host_mem #(.N(N)) dut (.clk, .rst_n, .bus(hb), .*);
  rsa_crt_core #(.N(N)) u_core (.clk, .rst_n, .start(core_start), .p(core_p), .q(core_q),
    .d(core_d), .x(core_x), .busy(core_busy), .done(core_done), .yp(core_yp), .yq(core_yq));

  `include "host_bus_tasks.svh"

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] rd;
  big_t pb, qb, db, xb;
  int   cyc;
  initial begin
    hb.we = 0; hb.re = 0; hb.addr = '0; hb.wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pb = 32'hFFFF_FFFB; qb = 32'h7FFF_FFFF;
    db = modinv(65537, (pb - 1) * (qb - 1));
    xb = 64'h1234_5678_9ABC_DEF0 % (pb * qb);
    hb_write(hb_addr(RSA_REG_P, 0), pb[31:0]);
    hb_write(hb_addr(RSA_REG_Q, 0), qb[31:0]);
    hb_write(hb_addr(RSA_REG_D, 0), db[31:0]);
    hb_write(hb_addr(RSA_REG_D, 1), db[63:32]);
    hb_write(hb_addr(RSA_REG_X, 0), xb[31:0]);
    hb_write(hb_addr(RSA_REG_X, 1), xb[63:32]);
    hb_read(hb_addr(RSA_REG_P, 0), rd); check(rd == pb[31:0], "p readback");
    hb_read(hb_addr(RSA_REG_Q, 0), rd); check(rd == qb[31:0], "q readback");
    hb_read(hb_addr(RSA_REG_D, 1), rd); check(rd == db[63:32], "d readback");
    hb_read(hb_addr(RSA_REG_X, 0), rd); check(rd == xb[31:0], "X readback");
    hb_read(hb_addr(RSA_REG_CTRL, 0), rd); check(rd[1:0] == 2'b00, "idle before start");
    hb_write(hb_addr(RSA_REG_CTRL, 0), 32'd1);
    cyc = 1;
    hb_read(hb_addr(RSA_REG_CTRL, 0), rd); check(rd[1:0] == 2'b10, "busy after start");
    hb_write(hb_addr(RSA_REG_P, 0), 32'd7);     // must be ignored
    hb_read(hb_addr(RSA_REG_P, 0), rd); check(rd == pb[31:0], "write ignored while busy");
    do begin
      hb_read(hb_addr(RSA_REG_CTRL, 0), rd);
    end while (rd[0] == 1'b0);
    check(rd[1] == 1'b0, "not busy when done");
    hb_read(hb_addr(RSA_REG_YP, 0), rd); check(big_t'(rd) == powmod(xb, db, pb), "Yp via bus");
    hb_read(hb_addr(RSA_REG_YQ, 0), rd); check(big_t'(rd) == powmod(xb, db, qb), "Yq via bus");
    hb_read(hb_addr(RSA_REG_CTRL, 1), rd);
    cyc = (3 + N + $countones(32'(db % (pb - 1)))) * (N + 3)
        + (3 + N + $countones(32'(db % (qb - 1)))) * (N + 3) + 6 * 2 * N;
    check(int'(rd) > cyc * 95 / 100 && int'(rd) < cyc * 105 / 100,
          $sformatf("cycle counter %0d vs about %0d", rd, cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
