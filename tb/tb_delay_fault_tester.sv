// tb_delay_fault_tester: loads a table of adder vectors through the host bus,
// runs the tester on the real adder, and checks that a clean run logs no
// faults, that corrupted captures (substituted for the adder's output for one clock by a small injector,
// standing in for voltage-induced delay faults) are each counted and logged
// with the right vector number, captured sum and timestamp relative to the
// time-zero pulse, that the vector counter matches the run length, and that
// the log stops at its depth while the counter keeps counting.
module tb_delay_fault_tester;
  import pdn_pkg::*;
  localparam int unsigned WIDTH = 64;
  localparam int unsigned NV    = 16;
  localparam int unsigned LD    = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  host_bus_if hb (.clk(clk), .rst_n(rst_n));
  logic             time_zero = 1'b0, fault_pulse;
  logic [WIDTH-1:0] adder_a, adder_b;
  logic [WIDTH:0]   adder_sum, sum_seen;
  // Fault injector between the adder and the tester: for one clock the
  // tester sees a corrupted capture.
  logic             inject = 1'b0;
  logic [WIDTH:0]   inj_val = '0;
  assign sum_seen = inject ? inj_val : adder_sum;

  delay_fault_tester #(.WIDTH(WIDTH), .NUM_VECTORS(NV), .LOG_DEPTH(LD)) dut (
    .clk, .rst_n, .bus(hb), .time_zero, .adder_a, .adder_b, .adder_sum(sum_seen), .fault_pulse);
  ripple_carry_adder #(.WIDTH(WIDTH)) u_add (.clk, .rst_n, .a(adder_a), .b(adder_b), .sum(adder_sum));

  `include "host_bus_tasks.svh"

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WIDTH-1:0] va[NV], vb[NV];
  logic [WIDTH:0]   ve[NV];
  logic [31:0]      rd, rd2;
  int               cyc = 0, t0_cyc, inj_cyc[3], inj_vec[3];
  logic [WIDTH:0]   inj_sum[3];

  always @(posedge clk) cyc++;

  initial begin
    hb.we = 0; hb.re = 0; hb.addr = '0; hb.wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < int'(NV); v++) begin
      va[v] = {$urandom, $urandom};
      vb[v] = (v % 2) ? ~va[v] + 64'(v) : {$urandom, $urandom};   // long carry paths
      ve[v] = {1'b0, va[v]} + {1'b0, vb[v]};
      for (int k = 0; k < 2; k++) begin
        hb_write(hb_addr(DFT_REG_VEC, v * 16 + k),     va[v][k*32 +: 32]);
        hb_write(hb_addr(DFT_REG_VEC, v * 16 + 4 + k), vb[v][k*32 +: 32]);
      end
      for (int k = 0; k < 3; k++)
        hb_write(hb_addr(DFT_REG_VEC, v * 16 + 8 + k), 32'(ve[v] >> (k * 32)));
    end
    hb_read(hb_addr(DFT_REG_VEC, 5 * 16 + 4), rd); check(rd == vb[5][31:0], "vector readback");

    // Clean run.
    hb_write(hb_addr(DFT_REG_CTRL, 0), 32'h3);
    repeat (200) @(negedge clk);
    hb_write(hb_addr(DFT_REG_CTRL, 0), 32'h0);
    repeat (4) @(negedge clk);
    hb_read(hb_addr(DFT_REG_CTRL, 1), rd); check(rd == 0, "no faults without an attack");
    hb_read(hb_addr(DFT_REG_CTRL, 3), rd); check(rd >= 200 && rd <= 203, $sformatf("vectors applied %0d", rd));

    // Run with injected capture faults.
    hb_write(hb_addr(DFT_REG_CTRL, 0), 32'h3);
    @(negedge clk) time_zero = 1'b1; t0_cyc = cyc;
    @(negedge clk) time_zero = 1'b0;
    for (int i = 0; i < 3; i++) begin
      repeat (37 + 11 * i) @(negedge clk);
      // The capture register now holds the result for vector idx_pipe[1].
      inj_vec[i] = int'(dut.chk_idx);
      inj_sum[i] = u_add.sum ^ (65'(1) << (20 + i));
      inj_cyc[i] = cyc;
      inj_val = inj_sum[i]; inject = 1'b1;
      @(negedge clk);
      inject = 1'b0;
    end
    repeat (10) @(negedge clk);
    hb_read(hb_addr(DFT_REG_CTRL, 1), rd);  check(rd == 3, $sformatf("fault count %0d", rd));
    hb_read(hb_addr(DFT_REG_CTRL, 2), rd);  check(rd == 3, $sformatf("log entries %0d", rd));
    for (int i = 0; i < 3; i++) begin
      hb_read(hb_addr(DFT_REG_LOG, i * 8 + 0), rd);
      // The counter reads 0 in the first clock after the pulse.
      check(int'(rd) == inj_cyc[i] - t0_cyc - 1, $sformatf("timestamp %0d expected %0d", rd, inj_cyc[i] - t0_cyc - 1));
      hb_read(hb_addr(DFT_REG_LOG, i * 8 + 1), rd);
      check(int'(rd) == inj_vec[i], $sformatf("vector %0d expected %0d", rd, inj_vec[i]));
      hb_read(hb_addr(DFT_REG_LOG, i * 8 + 2), rd);
      hb_read(hb_addr(DFT_REG_LOG, i * 8 + 3), rd2);
      check({rd2, rd} == inj_sum[i][63:0], "logged sum");
    end

    // Overflow the log: count keeps going, log stops at LD entries.
    for (int i = 0; i < 10; i++) begin
      repeat (5) @(negedge clk);
      inj_val = ~u_add.sum; inject = 1'b1;
      @(negedge clk);
      inject = 1'b0;
    end
    repeat (5) @(negedge clk);
    hb_read(hb_addr(DFT_REG_CTRL, 1), rd); check(rd == 13, $sformatf("fault count after overflow %0d", rd));
    hb_read(hb_addr(DFT_REG_CTRL, 2), rd); check(rd == LD, $sformatf("log entries after overflow %0d", rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
