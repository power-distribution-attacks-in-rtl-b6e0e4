// pdn_testbed_top: a multi-tenant FPGA arranged for power-distribution
// attacks. Three kinds of tenant share one die and one supply network:
//
//  * the attacker: an array of power wasters (single-stage ring oscillators)
//    switched on all at once, whose sudden current step makes the core supply
//    droop across the whole die;
//  * the victims: an RSA core using the Chinese Remainder Theorem with its
//    host-visible operand memory, and a 64-stage ripple-carry adder driven by
//    a delay-fault tester that logs every wrong sum with a timestamp;
//  * the monitor: a grid of ring-oscillator voltage sensors whose counts a
//    controller takes together every 10 us and logs to a sample memory, from
//    which the host can map the droop and locate its source.
//
// The tenants share no wires: each has its own host bus (write and read
// pulses, 20-bit word address, 32-bit data, read data one clock after the
// read pulse). The only coupling between them is physical, through the
// supply, which this RTL cannot model: `sensor_vdd_mv` gives the supply
// voltage at each sensor and is driven by the simulation environment. The
// delay-fault tester's timestamps count from the clock in which the wasters
// become active, the moment the attack begins.
//
// Which tenants exist, their sizes (12,000 wasters, 46 sensors, 19-stage
// rings, 20-bit counters, 10 us windows, a 64-stage carry chain, a 128-bit
// RSA datapath) follow the measurement set-up on the Cyclone V; the separate
// host buses and the attack-start timestamp link are this design's choices.
//
// Lint reports rst_n as used both synchronously and asynchronously: the host
// bus assertions are disabled by it, which is simulation-only and intended.
module pdn_testbed_top
  import pdn_pkg::*;
#(
  parameter int unsigned NUM_SENSORS  = NUM_SENSORS_C5,
  parameter int unsigned NUM_WASTERS  = NUM_WASTERS_C5,
  parameter int unsigned KEY_BITS     = RSA_KEY_BITS,
  parameter int unsigned ADDER_W      = ADDER_WIDTH,
  parameter int unsigned NUM_VECTORS  = 64,
  parameter int unsigned LOG_DEPTH    = 256,
  parameter int unsigned GATE_CYCLES  = SAMPLE_PERIOD_NS / (1_000_000_000 / SYS_CLK_HZ),
  parameter int unsigned MAX_SAMPLES  = MON_MAX_SAMPLES,
  parameter int unsigned RO_F_NOM_KHZ = 105_000,
  parameter int unsigned V_NOM_MV     = 1100
) (
  input  logic        clk,
  input  logic        rst_n,

  // Attacker tenant.
  input  logic        attack_enable,
  output logic        attack_active,

  // Victim tenant: RSA core host bus.
  input  logic        rsa_we,
  input  logic        rsa_re,
  input  hb_addr_t    rsa_addr,
  input  hb_data_t    rsa_wdata,
  output hb_data_t    rsa_rdata,
  output logic        rsa_rvalid,

  // Victim tenant: delay-fault tester host bus and fault indicator.
  input  logic        dft_we,
  input  logic        dft_re,
  input  hb_addr_t    dft_addr,
  input  hb_data_t    dft_wdata,
  output hb_data_t    dft_rdata,
  output logic        dft_rvalid,
  output logic        dft_fault,

  // Monitor: sensor controller host bus and local supply at each sensor.
  input  logic        mon_we,
  input  logic        mon_re,
  input  hb_addr_t    mon_addr,
  input  hb_data_t    mon_wdata,
  output hb_data_t    mon_rdata,
  output logic        mon_rvalid,
  input  logic [15:0] sensor_vdd_mv [NUM_SENSORS]
);
  timeunit 1ns;
  timeprecision 1ps;

  // ---------------------------------------------------------------- attacker
  power_waster_array #(.NUM_WASTERS(NUM_WASTERS)) u_attacker (
    .clk    (clk),
    .rst_n  (rst_n),
    .enable (attack_enable),
    .active (attack_active)
  );

  logic attack_active_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) attack_active_d <= 1'b0;
    else        attack_active_d <= attack_active;
  end

  // ------------------------------------------------------------- RSA victim
  host_bus_if rsa_bus (.clk(clk), .rst_n(rst_n));
  assign rsa_bus.we    = rsa_we;
  assign rsa_bus.re    = rsa_re;
  assign rsa_bus.addr  = rsa_addr;
  assign rsa_bus.wdata = rsa_wdata;
  assign rsa_rdata     = rsa_bus.rdata;
  assign rsa_rvalid    = rsa_bus.rvalid;

  logic                  core_start, core_busy, core_done;
  logic [KEY_BITS-1:0]   core_p, core_q, core_yp, core_yq;
  logic [2*KEY_BITS-1:0] core_d, core_x;

  rsa_host_mem #(.N(KEY_BITS)) u_rsa_mem (
    .clk, .rst_n, .bus(rsa_bus),
    .core_start, .core_p, .core_q, .core_d, .core_x,
    .core_busy, .core_done, .core_yp, .core_yq
  );

  rsa_crt_core #(.N(KEY_BITS)) u_rsa (
    .clk, .rst_n,
    .start (core_start),
    .p     (core_p),
    .q     (core_q),
    .d     (core_d),
    .x     (core_x),
    .busy  (core_busy),
    .done  (core_done),
    .yp    (core_yp),
    .yq    (core_yq)
  );

  // ----------------------------------------------------------- adder victim
  host_bus_if dft_bus (.clk(clk), .rst_n(rst_n));
  assign dft_bus.we    = dft_we;
  assign dft_bus.re    = dft_re;
  assign dft_bus.addr  = dft_addr;
  assign dft_bus.wdata = dft_wdata;
  assign dft_rdata     = dft_bus.rdata;
  assign dft_rvalid    = dft_bus.rvalid;

  logic [ADDER_W-1:0] adder_a, adder_b;
  logic [ADDER_W:0]   adder_sum;

  delay_fault_tester #(
    .WIDTH       (ADDER_W),
    .NUM_VECTORS (NUM_VECTORS),
    .LOG_DEPTH   (LOG_DEPTH)
  ) u_dft (
    .clk, .rst_n, .bus(dft_bus),
    .time_zero   (attack_active && !attack_active_d),
    .adder_a, .adder_b, .adder_sum,
    .fault_pulse (dft_fault)
  );

  ripple_carry_adder #(.WIDTH(ADDER_W)) u_adder (
    .clk, .rst_n,
    .a   (adder_a),
    .b   (adder_b),
    .sum (adder_sum)
  );

  // ---------------------------------------------------------------- monitor
  host_bus_if mon_bus (.clk(clk), .rst_n(rst_n));
  assign mon_bus.we    = mon_we;
  assign mon_bus.re    = mon_re;
  assign mon_bus.addr  = mon_addr;
  assign mon_bus.wdata = mon_wdata;
  assign mon_rdata     = mon_bus.rdata;
  assign mon_rvalid    = mon_bus.rvalid;

  localparam int unsigned DEPTH = NUM_SENSORS * MAX_SAMPLES;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic                ro_en, gate, mem_we;
  logic [RO_CNT_W-1:0] counts [NUM_SENSORS];
  logic [AW-1:0]       mem_waddr, mem_raddr;
  logic [RO_CNT_W-1:0] mem_wdata, mem_rdata;

  for (genvar s = 0; s < NUM_SENSORS; s++) begin : g_sensor
    ro_sensor #(
      .STAGES    (RO_STAGES),
      .CNT_W     (RO_CNT_W),
      .F_NOM_KHZ (RO_F_NOM_KHZ),
      .V_NOM_MV  (V_NOM_MV)
    ) u_sensor (
      .ro_en  (ro_en),
      .vdd_mv (sensor_vdd_mv[s]),
      .gate   (gate),
      .count  (counts[s])
    );
  end

  sensor_controller #(
    .NUM_SENSORS (NUM_SENSORS),
    .CNT_W       (RO_CNT_W),
    .GATE_CYCLES (GATE_CYCLES),
    .MAX_SAMPLES (MAX_SAMPLES)
  ) u_monitor (
    .clk, .rst_n, .bus(mon_bus),
    .ro_en, .gate, .counts,
    .mem_we, .mem_waddr, .mem_wdata, .mem_raddr, .mem_rdata
  );

  sample_log_ram #(.DEPTH(DEPTH), .WIDTH(RO_CNT_W)) u_log (
    .clk,
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .raddr (mem_raddr),
    .rdata (mem_rdata)
  );

endmodule
