// montgomery_multiplier: radix-2, bit-serial Montgomery modular multiplier.
//
// Computes result = a * b * 2^-N mod m without any division, which is what
// lets the RSA core run square-and-multiply on wide numbers. One bit of `a` is
// consumed per clock: the partial sum S gets b added when the bit is 1, then m
// is added when S is odd so that S can be halved exactly. After N steps S is
// below 2m and one conditional subtraction brings it below m.
//
// Interface: pulse `start` with a, b, m stable for that cycle (they are
// captured). Requirements: m odd, b < m, a < 2^N. `done` pulses for one cycle
// N+2 cycles after `start` (N steps plus one subtraction cycle); `result` then holds until the next start. `busy`
// is high from the cycle after start until done.
//
// The use of a Montgomery multiplier is from the RSA core description; the
// radix-2 serial form and the handshake are this design's choices (one cycle
// per bit gives the quadrupling of cycles per doubling of key length that the
// core is said to show).
module montgomery_multiplier #(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] result
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [1:0] {MM_IDLE, MM_LOOP, MM_FIX} mm_state_e;

  localparam int unsigned CW = $clog2(N + 1);

  mm_state_e      state;
  logic [N-1:0]   a_sh;
  logic [N-1:0]   b_q;
  logic [N-1:0]   m_q;
  logic [N+1:0]   s;
  logic [CW-1:0]  cnt;

  // One Montgomery step on the current partial sum.
  logic [N+1:0] t_add, t_red, s_next;
  always_comb begin
    t_add  = s + (a_sh[0] ? {2'b00, b_q} : '0);
    t_red  = t_add + (t_add[0] ? {2'b00, m_q} : '0);
    s_next = t_red >> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= MM_IDLE;
      a_sh   <= '0;
      b_q    <= '0;
      m_q    <= '0;
      s      <= '0;
      cnt    <= '0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        MM_IDLE: begin
          if (start) begin
            a_sh  <= a;
            b_q   <= b;
            m_q   <= m;
            s     <= '0;
            cnt   <= '0;
            state <= MM_LOOP;
          end
        end
        MM_LOOP: begin
          s    <= s_next;
          a_sh <= a_sh >> 1;
          cnt  <= cnt + 1'b1;
          if (cnt == CW'(N - 1)) state <= MM_FIX;
        end
        MM_FIX: begin
          result <= (s >= {2'b00, m_q}) ? N'(s - {2'b00, m_q}) : N'(s);
          done   <= 1'b1;
          state  <= MM_IDLE;
        end
        default: state <= MM_IDLE;
      endcase
    end
  end

  assign busy = (state != MM_IDLE);

endmodule
