// tb_sensor_controller: runs the monitor controller with modelled sensor
// counts (each count encodes the sensor number and the window it was taken
// in) and a real sample memory, then checks through the host bus that every
// sample of every sensor was logged at sample*NUM_SENSORS + sensor, that the
// windows are GATE_CYCLES long with the given sampling period, that the rings
// are enabled only during the run and that the done flag is set.
module tb_sensor_controller;
  import pdn_pkg::*;
  localparam int unsigned NS = 6, GATE = 40, GUARD = 8, MAXS = 10;
  localparam int unsigned AW = $clog2(NS * MAXS);

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  host_bus_if hb (.clk(clk), .rst_n(rst_n));
  logic          ro_en, gate, mem_we;
  logic [19:0]   counts [NS];
  logic [AW-1:0] mem_waddr, mem_raddr;
  logic [19:0]   mem_wdata, mem_rdata;

  sensor_controller #(.NUM_SENSORS(NS), .GATE_CYCLES(GATE), .GUARD_CYCLES(GUARD),
                      .MAX_SAMPLES(MAXS)) dut (.clk, .rst_n, .bus(hb), .*);
  sample_log_ram #(.DEPTH(NS * MAXS), .WIDTH(20)) u_ram (.clk, .we(mem_we), .waddr(mem_waddr),
    .wdata(mem_wdata), .raddr(mem_raddr), .rdata(mem_rdata));

  `include "host_bus_tasks.svh"

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sensor model: the count of sensor s after window w is 1000*(w+1) + s.
  int win = 0, gate_len = 0, last_len = 0, rise_cyc = 0, period = 0, cyc = 0;
  logic gate_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    gate_d <= gate;
    if (gate) gate_len++;
    if (gate && !gate_d) begin
      if (rise_cyc != 0) period = cyc - rise_cyc;
      rise_cyc = cyc;
    end
    if (!gate && gate_d) begin
      last_len = gate_len;
      gate_len = 0;
      win++;
    end
  end
  always_comb for (int s = 0; s < int'(NS); s++) counts[s] = 20'(1000 * win + s);

  logic [31:0] rd;
  int          nsamp = 7;
  initial begin
    hb.we = 0; hb.re = 0; hb.addr = '0; hb.wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!ro_en, "rings off before a run");
    hb_write(hb_addr(MON_REG_CTRL, 0), 32'(nsamp));
    repeat (3) @(negedge clk);
    check(ro_en, "rings on during a run");
    hb_read(hb_addr(MON_REG_CTRL, 0), rd); check(rd[1], "busy during a run");
    do hb_read(hb_addr(MON_REG_CTRL, 0), rd); while (!rd[0]);
    check(!ro_en, "rings off after the run");
    check(win == nsamp, $sformatf("%0d windows for %0d samples", win, nsamp));
    check(last_len == GATE, $sformatf("window length %0d", last_len));
    check(period == GATE + GUARD + 1, $sformatf("sampling period %0d", period));
    hb_read(hb_addr(MON_REG_CTRL, 1), rd); check(rd == 32'(nsamp), "samples logged");
    for (int w = 0; w < nsamp; w++)
      for (int s = 0; s < int'(NS); s++) begin
        hb_read(hb_addr(MON_REG_LOG, w * NS + s), rd);
        check(rd == 32'(1000 * (w + 1) + s), $sformatf("log w=%0d s=%0d: %0d", w, s, rd));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
