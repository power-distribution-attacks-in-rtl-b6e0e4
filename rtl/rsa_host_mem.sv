// rsa_host_mem: host-visible operand and control memory of the RSA core.
//
// The host writes p, q, d and X word by word, starts an operation and reads
// back Yp and Yq (it recombines them into Y itself). The words live in
// registers so the core sees whole operands. Writes to the operands are
// ignored while the core is busy, so an operation always runs on stable
// inputs. A cycle counter records how long the last operation took.
//
// Register map (region in address bits [19:16], 32-bit word index below,
// least significant word first):
//   region 0: write word 0 bit 0 = start; read word 0 = {busy, done},
//             word 1 = cycles of the last operation
//   region 1: p (N/32 words)      region 2: q (N/32 words)
//   region 3: d (2N/32 words)     region 4: X (2N/32 words)
//   region 5: Yp (N/32 words, read only)   region 6: Yq (read only)
// Reads answer one cycle after `re` (host_bus_if rules). N must be a
// multiple of 32.
//
// The memory's role (operands in, partial results out, control of the core)
// follows the RSA core description, where the host reached it over JTAG; the
// map, the busy write-protect and the cycle counter are this design's choices.
module rsa_host_mem
  import pdn_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic           clk,
  input  logic           rst_n,
  host_bus_if.device     bus,
  // to / from rsa_crt_core
  output logic           core_start,
  output logic [N-1:0]   core_p,
  output logic [N-1:0]   core_q,
  output logic [2*N-1:0] core_d,
  output logic [2*N-1:0] core_x,
  input  logic           core_busy,
  input  logic           core_done,
  input  logic [N-1:0]   core_yp,
  input  logic [N-1:0]   core_yq
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NW = N / 32;

  initial assert (N % 32 == 0) else $fatal(1, "rsa_host_mem: N must be a multiple of 32");

  logic [NW-1:0][31:0]   p_w, q_w;
  logic [2*NW-1:0][31:0] d_w, x_w;
  logic                  done_flag;
  logic [31:0]           cycles, last_cycles;

  logic [3:0]  region;
  logic [15:0] index;
  assign region = bus.addr[19:16];
  assign index  = bus.addr[15:0];

  assign core_p = p_w;
  assign core_q = q_w;
  assign core_d = d_w;
  assign core_x = x_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_w         <= '0;
      q_w         <= '0;
      d_w         <= '0;
      x_w         <= '0;
      core_start  <= 1'b0;
      done_flag   <= 1'b0;
      cycles      <= '0;
      last_cycles <= '0;
    end else begin
      core_start <= 1'b0;
      if (bus.we && !core_busy && !core_start) begin
        unique case (region)
          RSA_REG_CTRL: if (index == 16'd0 && bus.wdata[0]) begin
            core_start <= 1'b1;
            done_flag  <= 1'b0;
            cycles     <= '0;
          end
          RSA_REG_P: if (index < 16'(NW))     p_w[index[$clog2(NW+1)-1:0]] <= bus.wdata;
          RSA_REG_Q: if (index < 16'(NW))     q_w[index[$clog2(NW+1)-1:0]] <= bus.wdata;
          RSA_REG_D: if (index < 16'(2 * NW)) d_w[index[$clog2(2*NW+1)-1:0]] <= bus.wdata;
          RSA_REG_X: if (index < 16'(2 * NW)) x_w[index[$clog2(2*NW+1)-1:0]] <= bus.wdata;
          default: ;
        endcase
      end
      if (core_busy) cycles <= cycles + 1'b1;
      if (core_done) begin
        done_flag   <= 1'b1;
        last_cycles <= cycles + 1'b1;
      end
    end
  end

  // Read port, one cycle of latency.
  logic [NW-1:0][31:0] yp_w, yq_w;
  assign yp_w = core_yp;
  assign yq_w = core_yq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus.rdata  <= '0;
      bus.rvalid <= 1'b0;
    end else begin
      bus.rvalid <= bus.re;
      if (bus.re) begin
        bus.rdata <= '0;
        unique case (region)
          RSA_REG_CTRL: bus.rdata <= (index == 16'd0) ? {30'd0, core_busy, done_flag} : last_cycles;
          RSA_REG_P:  if (index < 16'(NW))     bus.rdata <= p_w[index[$clog2(NW+1)-1:0]];
          RSA_REG_Q:  if (index < 16'(NW))     bus.rdata <= q_w[index[$clog2(NW+1)-1:0]];
          RSA_REG_D:  if (index < 16'(2 * NW)) bus.rdata <= d_w[index[$clog2(2*NW+1)-1:0]];
          RSA_REG_X:  if (index < 16'(2 * NW)) bus.rdata <= x_w[index[$clog2(2*NW+1)-1:0]];
          RSA_REG_YP: if (index < 16'(NW))     bus.rdata <= yp_w[index[$clog2(NW+1)-1:0]];
          RSA_REG_YQ: if (index < 16'(NW))     bus.rdata <= yq_w[index[$clog2(NW+1)-1:0]];
          default: ;
        endcase
      end
    end
  end

endmodule
