// mod_exp: modular exponentiation result = base^exp mod m by left-to-right
// square-and-multiply in the Montgomery domain, on one Montgomery multiplier.
//
// Sequence (R = 2^N): xm = mont(base, R^2) and acc = mont(R^2, 1) = R mod m
// bring the base and the value 1 into the Montgomery domain; then for every
// exponent bit from the most significant down, acc = mont(acc, acc) and, if
// the bit is 1, acc = mont(acc, xm); finally mont(acc, 1) leaves the domain.
// All N exponent bits are processed, so an operation takes
// (3 + N + popcount(exp)) multiplications of N+3 cycles each (one issue cycle
// plus the multiplier latency).
//
// Interface: pulse `start` with base < m, exp, odd m > 1 and r2 = R^2 mod m
// (captured on start). `done` pulses once with `result`, which then holds.
//
// Square-and-multiply with a Montgomery multiplier is the structure the RSA
// core description gives; the left-to-right order and the handshake are this
// design's choices.
module mod_exp #(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] base,
  input  logic [N-1:0] exp,
  input  logic [N-1:0] m,
  input  logic [N-1:0] r2,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] result
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {
    OP_X_TO_MONT,   // xm  = mont(base, r2)
    OP_ONE_TO_MONT, // acc = mont(r2, 1)
    OP_SQUARE,      // acc = mont(acc, acc)
    OP_MULTIPLY,    // acc = mont(acc, xm)
    OP_FROM_MONT    // out = mont(acc, 1)
  } exp_op_e;

  typedef enum logic [1:0] {EX_IDLE, EX_ISSUE, EX_WAIT} exp_state_e;

  localparam int unsigned IW = $clog2(N);

  exp_state_e   state;
  exp_op_e      op;
  logic [N-1:0] e_q, m_q, r2_q, base_q;
  logic [N-1:0] xm, acc;
  logic [IW-1:0] bit_idx;

  logic         mm_start, mm_busy, mm_done;
  logic [N-1:0] mm_a, mm_b, mm_res;

  // Operand selection for the multiplier.
  always_comb begin
    unique case (op)
      OP_X_TO_MONT:   begin mm_a = base_q; mm_b = r2_q; end
      OP_ONE_TO_MONT: begin mm_a = r2_q;   mm_b = N'(1); end
      OP_SQUARE:      begin mm_a = acc;    mm_b = acc;   end
      OP_MULTIPLY:    begin mm_a = acc;    mm_b = xm;    end
      default:        begin mm_a = acc;    mm_b = N'(1); end
    endcase
  end

  assign mm_start = (state == EX_ISSUE);

  montgomery_multiplier #(.N(N)) u_mm (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (mm_start),
    .a      (mm_a),
    .b      (mm_b),
    .m      (m_q),
    .busy   (mm_busy),
    .done   (mm_done),
    .result (mm_res)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= EX_IDLE;
      op      <= OP_X_TO_MONT;
      e_q     <= '0;
      m_q     <= '0;
      r2_q    <= '0;
      base_q  <= '0;
      xm      <= '0;
      acc     <= '0;
      bit_idx <= '0;
      done    <= 1'b0;
      result  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        EX_IDLE: begin
          if (start) begin
            e_q     <= exp;
            m_q     <= m;
            r2_q    <= r2;
            base_q  <= base;
            bit_idx <= IW'(N - 1);
            op      <= OP_X_TO_MONT;
            state   <= EX_ISSUE;
          end
        end
        EX_ISSUE: state <= EX_WAIT;
        EX_WAIT: begin
          if (mm_done) begin
            state <= EX_ISSUE;
            unique case (op)
              OP_X_TO_MONT: begin
                xm <= mm_res;
                op <= OP_ONE_TO_MONT;
              end
              OP_ONE_TO_MONT: begin
                acc <= mm_res;
                op  <= OP_SQUARE;
              end
              OP_SQUARE: begin
                acc <= mm_res;
                if (e_q[bit_idx])        op <= OP_MULTIPLY;
                else if (bit_idx == '0)  op <= OP_FROM_MONT;
                else begin
                  bit_idx <= bit_idx - 1'b1;
                  op      <= OP_SQUARE;
                end
              end
              OP_MULTIPLY: begin
                acc <= mm_res;
                if (bit_idx == '0) op <= OP_FROM_MONT;
                else begin
                  bit_idx <= bit_idx - 1'b1;
                  op      <= OP_SQUARE;
                end
              end
              default: begin
                result <= mm_res;
                done   <= 1'b1;
                state  <= EX_IDLE;
              end
            endcase
          end
        end
        default: state <= EX_IDLE;
      endcase
    end
  end

  assign busy = (state != EX_IDLE);

  // A multiplication is only started on an idle multiplier.
  a_mm_start_idle: assert property (@(posedge clk) disable iff (!rst_n) mm_start |-> !mm_busy);

endmodule
