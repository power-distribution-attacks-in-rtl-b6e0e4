// sensor_controller: controller of the voltage-monitor network. It opens
// and closes the counting window of all ring-oscillator sensors together,
// snapshots all their counts at once in every sampling period, and logs the
// snapshots to the sample memory, where the host reads them afterwards.
//
// A run starts when the host writes the number of samples (1..MAX_SAMPLES).
// The controller enables the rings, waits WARMUP_CYCLES, then repeats:
// window open for GATE_CYCLES (500 clocks = 10 us at 50 MHz), window closed
// for GUARD_CYCLES while the sensors' synchronisers settle, snapshot of all
// counts in one clock. The snapshot is written to memory one sensor per clock
// (address sample*NUM_SENSORS + sensor) while the next window is already
// open, so the sampling period is GATE_CYCLES + GUARD_CYCLES + 1 clocks.
// After the last sample the rings are disabled and `done` is set.
//
// Register map (address bits [19:16] region, [15:0] word index):
//   region 0: write word 0 = number of samples, starts a run;
//             read word 0 = {busy, done}, word 1 = samples logged.
//   region 1: read word i = log memory word i.
// Reads answer one cycle after `re`.
//
// Reading and resetting all sensors at once in every sampling period and
// logging to memory follow the monitor description (10 us periods, at most a
// hundred samples per run); the guard interval, the write-behind logging and
// the register map are this design's choices.
module sensor_controller
  import pdn_pkg::*;
#(
  parameter int unsigned NUM_SENSORS   = 46,
  parameter int unsigned CNT_W         = 20,
  parameter int unsigned GATE_CYCLES   = 500,
  parameter int unsigned GUARD_CYCLES  = 8,
  parameter int unsigned WARMUP_CYCLES = 16,
  parameter int unsigned MAX_SAMPLES   = 100,
  localparam int unsigned DEPTH        = NUM_SENSORS * MAX_SAMPLES,
  localparam int unsigned AW           = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  host_bus_if.device       bus,
  // sensors
  output logic             ro_en,
  output logic             gate,
  input  logic [CNT_W-1:0] counts [NUM_SENSORS],
  // sample memory
  output logic             mem_we,
  output logic [AW-1:0]    mem_waddr,
  output logic [CNT_W-1:0] mem_wdata,
  output logic [AW-1:0]    mem_raddr,
  input  logic [CNT_W-1:0] mem_rdata
);
  timeunit 1ns;
  timeprecision 1ps;

  initial assert (NUM_SENSORS < GATE_CYCLES)
    else $fatal(1, "sensor_controller: logging must finish within one window");

  typedef enum logic [2:0] {SC_IDLE, SC_WARM, SC_GATE, SC_GUARD, SC_SNAP, SC_DRAIN} sc_state_e;

  localparam int unsigned TW = $clog2(GATE_CYCLES + GUARD_CYCLES + WARMUP_CYCLES + 1);
  localparam int unsigned SW = $clog2(MAX_SAMPLES + 1);
  localparam int unsigned NW = $clog2(NUM_SENSORS + 1);

  sc_state_e        state;
  logic [TW-1:0]    timer;
  logic [SW-1:0]    target, taken;
  logic             done_flag;
  logic [CNT_W-1:0] snap [NUM_SENSORS];
  logic             wr_busy;
  logic [NW-1:0]    wr_sensor;
  logic [AW-1:0]    wr_base;

  logic [3:0]  region;
  logic [15:0] index;
  assign region = bus.addr[19:16];
  assign index  = bus.addr[15:0];

  logic start_run;
  assign start_run = bus.we && region == MON_REG_CTRL && index == 16'd0 &&
                     bus.wdata != 32'd0 && bus.wdata <= 32'(MAX_SAMPLES) && state == SC_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= SC_IDLE;
      timer     <= '0;
      target    <= '0;
      taken     <= '0;
      done_flag <= 1'b0;
      ro_en     <= 1'b0;
      gate      <= 1'b0;
      for (int i = 0; i < int'(NUM_SENSORS); i++) snap[i] <= '0;
    end else begin
      unique case (state)
        SC_IDLE: begin
          if (start_run) begin
            target    <= SW'(bus.wdata);
            taken     <= '0;
            done_flag <= 1'b0;
            ro_en     <= 1'b1;
            timer     <= TW'(WARMUP_CYCLES - 1);
            state     <= SC_WARM;
          end
        end
        SC_WARM: begin
          if (timer == '0) begin
            gate  <= 1'b1;
            timer <= TW'(GATE_CYCLES - 1);
            state <= SC_GATE;
          end else timer <= timer - 1'b1;
        end
        SC_GATE: begin
          if (timer == '0) begin
            gate  <= 1'b0;
            timer <= TW'(GUARD_CYCLES - 1);
            state <= SC_GUARD;
          end else timer <= timer - 1'b1;
        end
        SC_GUARD: begin
          if (timer == '0) state <= SC_SNAP;
          else             timer <= timer - 1'b1;
        end
        SC_SNAP: begin
          // Read all sensors in the same clock.
          for (int i = 0; i < int'(NUM_SENSORS); i++) snap[i] <= counts[i];
          taken <= taken + 1'b1;
          if (taken + 1'b1 == target) begin
            state <= SC_DRAIN;
          end else begin
            gate  <= 1'b1;
            timer <= TW'(GATE_CYCLES - 1);
            state <= SC_GATE;
          end
        end
        SC_DRAIN: begin
          if (!wr_busy) begin
            ro_en     <= 1'b0;
            done_flag <= 1'b1;
            state     <= SC_IDLE;
          end
        end
        default: state <= SC_IDLE;
      endcase
    end
  end

  // Write-behind logging of the last snapshot.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy   <= 1'b0;
      wr_sensor <= '0;
      wr_base   <= '0;
    end else if (state == SC_SNAP) begin
      wr_busy   <= 1'b1;
      wr_sensor <= '0;
      wr_base   <= AW'(int'(taken) * int'(NUM_SENSORS));
    end else if (wr_busy) begin
      wr_sensor <= wr_sensor + 1'b1;
      if (wr_sensor == NW'(NUM_SENSORS - 1)) wr_busy <= 1'b0;
    end
  end

  assign mem_we    = wr_busy;
  assign mem_waddr = wr_base + AW'(wr_sensor);
  assign mem_wdata = snap[wr_sensor];
  assign mem_raddr = AW'(index);

  // Read port: control words are registered here, log words come from the
  // memory's own output register.
  logic        rd_log_q;
  logic [31:0] rd_ctrl_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_log_q   <= 1'b0;
      rd_ctrl_q  <= '0;
      bus.rvalid <= 1'b0;
    end else begin
      bus.rvalid <= bus.re;
      rd_log_q   <= bus.re && region == MON_REG_LOG && index < 16'(DEPTH);
      rd_ctrl_q  <= '0;
      if (bus.re && region == MON_REG_CTRL) begin
        if (index == 16'd0)      rd_ctrl_q <= {30'd0, state != SC_IDLE, done_flag};
        else if (index == 16'd1) rd_ctrl_q <= 32'(taken);
      end
    end
  end

  assign bus.rdata = rd_log_q ? 32'(mem_rdata) : rd_ctrl_q;

endmodule
