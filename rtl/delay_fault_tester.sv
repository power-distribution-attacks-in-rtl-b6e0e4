// delay_fault_tester: applies path-sensitising test vectors to the victim
// adder over and over and logs every wrong result with a timestamp.
//
// The host loads a table of vectors (a, b and the expected sum, computed off
// chip so that the reference cannot be hit by the same fault) and starts a
// run. Every clock the next vector is presented to the adder; the result
// comes back ADDER_LAT clocks later and is compared with its expected value.
// A mismatch is a delay fault: its timestamp (clocks since the last
// `time_zero` pulse, which marks the moment the attack began), the vector
// number and the captured sum go into the fault log, and a fault counter
// counts all faults, including those that no longer fit in the log.
//
// Register map (address bits [19:16] region, [15:0] word index):
//   region 0: write word 0: bit 0 = run, bit 1 = clear log and counters;
//             write word 1: number of active vectors (1..NUM_VECTORS).
//             read word 0 = running, 1 = fault count, 2 = log entries,
//             3 = vectors applied (low 32 bits).
//   region 1: vector table, word vec*16 + k: k = 0..3 operand a,
//             4..7 operand b, 8..11 expected sum (32-bit words, LSW first).
//   region 2: fault log, word entry*8 + k: k = 0 timestamp, 1 vector number,
//             2..5 captured sum.
// Reads answer one cycle after `re`.
//
// Repeatedly applying vectors during the attack and keeping a log of faults
// with timestamps is the experiment's method; the on-chip comparison, table
// sizes and register map are this design's choices.
module delay_fault_tester
  import pdn_pkg::*;
#(
  parameter int unsigned WIDTH       = 64,
  parameter int unsigned NUM_VECTORS = 64,
  parameter int unsigned LOG_DEPTH   = 256,
  parameter int unsigned ADDER_LAT   = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  host_bus_if.device       bus,
  input  logic             time_zero,
  output logic [WIDTH-1:0] adder_a,
  output logic [WIDTH-1:0] adder_b,
  input  logic [WIDTH:0]   adder_sum,
  output logic             fault_pulse
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned VW = $clog2(NUM_VECTORS);
  localparam int unsigned LW = $clog2(LOG_DEPTH);

  initial assert (WIDTH < 128) else $fatal(1, "delay_fault_tester: WIDTH must be below 128");

  typedef struct packed {
    logic [31:0]    timestamp;
    logic [VW-1:0]  vector;
    logic [WIDTH:0] sum;
  } fault_entry_t;

  logic [127:0]   vec_a   [NUM_VECTORS];
  logic [127:0]   vec_b   [NUM_VECTORS];
  logic [127:0]   vec_exp [NUM_VECTORS];
  fault_entry_t   log_mem [LOG_DEPTH];

  logic                 running;
  logic [VW:0]          num_active;
  logic [VW-1:0]        idx;
  logic [ADDER_LAT-1:0] valid_pipe;
  logic [VW-1:0]        idx_pipe [ADDER_LAT];
  logic [31:0]          timestamp, fault_count, applied;
  logic [LW:0]          log_count;

  logic [3:0]  region;
  logic [15:0] index;
  assign region = bus.addr[19:16];
  assign index  = bus.addr[15:0];

  assign adder_a = vec_a[idx][WIDTH-1:0];
  assign adder_b = vec_b[idx][WIDTH-1:0];

  logic [VW-1:0] chk_idx;
  logic          mismatch;
  assign chk_idx  = idx_pipe[ADDER_LAT-1];
  assign mismatch = valid_pipe[ADDER_LAT-1] && (adder_sum != vec_exp[chk_idx][WIDTH:0]);

  // Vector table writes.
  always_ff @(posedge clk) begin
    if (bus.we && region == DFT_REG_VEC && index < 16'(NUM_VECTORS * 16)) begin
      unique case (index[3:2])
        2'd0:    vec_a[index[VW+3:4]][index[1:0]*32 +: 32]   <= bus.wdata;
        2'd1:    vec_b[index[VW+3:4]][index[1:0]*32 +: 32]   <= bus.wdata;
        2'd2:    vec_exp[index[VW+3:4]][index[1:0]*32 +: 32] <= bus.wdata;
        default: ;
      endcase
    end
  end

  // Fault log writes.
  always_ff @(posedge clk) begin
    if (mismatch && log_count < (LW+1)'(LOG_DEPTH))
      log_mem[log_count[LW-1:0]] <= '{timestamp: timestamp, vector: chk_idx, sum: adder_sum};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= 1'b0;
      num_active  <= (VW+1)'(NUM_VECTORS);
      idx         <= '0;
      valid_pipe  <= '0;
      for (int i = 0; i < int'(ADDER_LAT); i++) idx_pipe[i] <= '0;
      timestamp   <= '0;
      fault_count <= '0;
      applied     <= '0;
      log_count   <= '0;
      fault_pulse <= 1'b0;
    end else begin
      fault_pulse <= mismatch;
      timestamp   <= time_zero ? 32'd0 : timestamp + 1'b1;

      // Vector sequencing and result pipeline.
      valid_pipe  <= {valid_pipe[ADDER_LAT-2:0], running};
      idx_pipe[0] <= idx;
      for (int i = 1; i < int'(ADDER_LAT); i++) idx_pipe[i] <= idx_pipe[i-1];
      if (running) begin
        idx     <= ((VW+1)'(idx) + 1'b1 >= num_active) ? '0 : idx + 1'b1;
        applied <= applied + 1'b1;
      end

      if (mismatch) begin
        fault_count <= fault_count + 1'b1;
        if (log_count < (LW+1)'(LOG_DEPTH)) log_count <= log_count + 1'b1;
      end

      if (bus.we && region == DFT_REG_CTRL) begin
        if (index == 16'd0) begin
          running <= bus.wdata[0];
          if (bus.wdata[0] && !running) idx <= '0;
          if (bus.wdata[1]) begin
            fault_count <= '0;
            log_count   <= '0;
            applied     <= '0;
          end
        end else if (index == 16'd1) begin
          if (bus.wdata > 32'd0 && bus.wdata <= 32'(NUM_VECTORS))
            num_active <= (VW+1)'(bus.wdata);
        end
      end
    end
  end

  // Read port.
  fault_entry_t rd_entry;
  logic [127:0] rd_sum;
  assign rd_entry = log_mem[index[LW+2:3]];
  assign rd_sum   = 128'(rd_entry.sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus.rdata  <= '0;
      bus.rvalid <= 1'b0;
    end else begin
      bus.rvalid <= bus.re;
      if (bus.re) begin
        bus.rdata <= '0;
        unique case (region)
          DFT_REG_CTRL: unique case (index)
            16'd0:   bus.rdata <= 32'(running);
            16'd1:   bus.rdata <= fault_count;
            16'd2:   bus.rdata <= 32'(log_count);
            16'd3:   bus.rdata <= applied;
            default: ;
          endcase
          DFT_REG_VEC: if (index < 16'(NUM_VECTORS * 16)) unique case (index[3:2])
            2'd0:    bus.rdata <= vec_a[index[VW+3:4]][index[1:0]*32 +: 32];
            2'd1:    bus.rdata <= vec_b[index[VW+3:4]][index[1:0]*32 +: 32];
            2'd2:    bus.rdata <= vec_exp[index[VW+3:4]][index[1:0]*32 +: 32];
            default: ;
          endcase
          DFT_REG_LOG: if (index < 16'(LOG_DEPTH * 8)) unique case (index[2:0])
            3'd0:    bus.rdata <= rd_entry.timestamp;
            3'd1:    bus.rdata <= 32'(rd_entry.vector);
            3'd2:    bus.rdata <= rd_sum[31:0];
            3'd3:    bus.rdata <= rd_sum[63:32];
            3'd4:    bus.rdata <= rd_sum[95:64];
            3'd5:    bus.rdata <= rd_sum[127:96];
            default: ;
          endcase
          default: ;
        endcase
      end
    end
  end

endmodule
