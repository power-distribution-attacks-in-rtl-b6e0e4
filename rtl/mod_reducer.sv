// mod_reducer: serial shift-and-subtract modular reduction.
//
// Reduces a value of up to IN_W bits modulo an N-bit modulus, one input bit
// per clock, most significant bit first: r = 2r + bit, then r -= m if r >= m.
// Since r < m before each step, one subtraction always suffices. The RSA core
// uses it for X mod p, d mod (p-1) (the reduced exponents of the CRT) and
// R^2 mod p with R = 2^N (the Montgomery-domain constant), which is the
// reduction of a 1 followed by 2N zeros.
//
// Interface: pulse `start` with `value`, `len` (number of bits to consume,
// taken from value[len-1:0], 1..IN_W) and `m` (nonzero). `done` pulses once,
// len+1 cycles after start, with `result` = value[len-1:0] mod m.
//
// The CRT reductions come from the RSA description; doing them on chip with
// this serial unit is this design's choice.
module mod_reducer #(
  parameter int unsigned N    = 128,
  parameter int unsigned IN_W = 2 * N + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [IN_W-1:0]           value,
  input  logic [$clog2(IN_W+1)-1:0] len,
  input  logic [N-1:0]              m,
  output logic                      busy,
  output logic                      done,
  output logic [N-1:0]              result
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned LW = $clog2(IN_W + 1);

  logic [IN_W-1:0] v_sh;
  logic [N-1:0]    m_q;
  logic [N-1:0]    r;
  logic [LW-1:0]   left;
  logic            active;

  logic [N:0] r2;
  logic [N:0] r_sub;
  always_comb begin
    r2    = {r, v_sh[IN_W-1]};
    r_sub = r2 - {1'b0, m_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_sh   <= '0;
      m_q    <= '0;
      r      <= '0;
      left   <= '0;
      active <= 1'b0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          // Left-align the bits to be consumed.
          v_sh   <= value << (LW'(IN_W) - len);
          m_q    <= m;
          r      <= '0;
          left   <= len;
          active <= 1'b1;
        end
      end else begin
        r    <= (r2 >= {1'b0, m_q}) ? r_sub[N-1:0] : r2[N-1:0];
        v_sh <= v_sh << 1;
        left <= left - 1'b1;
        if (left == LW'(1)) begin
          active <= 1'b0;
          done   <= 1'b1;
          result <= (r2 >= {1'b0, m_q}) ? r_sub[N-1:0] : r2[N-1:0];
        end
      end
    end
  end

  assign busy = active;

endmodule
