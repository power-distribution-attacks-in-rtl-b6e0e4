// rsa_crt_core: RSA decryption/signing core using the Chinese Remainder
// Theorem, built from a single modular exponentiation unit and a control
// state machine that computes the two half-size results one after the other:
//
//   Yp = (X mod p)^(d mod (p-1)) mod p,   Yq = (X mod q)^(d mod (q-1)) mod q.
//
// The host recombines Y = Yp and Yq into Y mod N = p*q. For each prime P the
// controller first runs the serial reducer three times (R^2 mod P with
// R = 2^N, X mod P, d mod (P-1)) and then the exponentiation. A fault in only
// one of Yp, Yq is what makes the CRT result leak a prime factor of N.
//
// Widths: p and q are N bits (N is the "key length" of the core: 128, 256 or
// 512), d and X are 2N bits. One operation takes about
// 2 * (N + N/2 + 3) * (N + 3) cycles, about 52,000 at N = 128, so cycles grow
// four-fold per doubling of N.
//
// Interface: pulse `start` with p, q, d, x stable until `done` (p and q odd
// primes, or at least odd and above 1). `done` pulses once; yp and yq hold
// until the next start. `busy` is high in between.
//
// One exponentiation unit, a control FSM, square-and-multiply and Montgomery
// multiplication follow the core's description; the on-chip reductions and
// the cycle-level schedule are this design's choices.
module rsa_crt_core #(
  parameter int unsigned N = 128
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   p,
  input  logic [N-1:0]   q,
  input  logic [2*N-1:0] d,
  input  logic [2*N-1:0] x,
  output logic           busy,
  output logic           done,
  output logic [N-1:0]   yp,
  output logic [N-1:0]   yq
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned IN_W = 2 * N + 1;
  localparam int unsigned LW   = $clog2(IN_W + 1);

  typedef enum logic [2:0] {
    RC_IDLE,
    RC_R2,      // r2 = 2^(2N) mod P
    RC_XRED,    // xr = X mod P
    RC_DRED,    // dr = d mod (P-1)
    RC_EXP,     // Y_P = xr^dr mod P
    RC_WAIT     // wait for the running sub-unit
  } rc_state_e;

  rc_state_e    state, next_after_wait;
  logic         sel_q;          // 0: working on p, 1: on q
  logic [N-1:0] prime, r2, xr;

  // Reducer.
  logic            red_start, red_busy, red_done;
  logic [IN_W-1:0] red_value;
  logic [LW-1:0]   red_len;
  logic [N-1:0]    red_m, red_res;

  // Exponentiation unit.
  logic         exp_start, exp_busy, exp_done;
  logic [N-1:0] exp_res, dr;

  assign prime = sel_q ? q : p;

  always_comb begin
    red_start = 1'b0;
    red_value = '0;
    red_len   = LW'(2 * N);
    red_m     = prime;
    unique case (state)
      RC_R2: begin
        red_start = 1'b1;
        red_value = IN_W'(1) << (2 * N);
        red_len   = LW'(IN_W);
      end
      RC_XRED: begin
        red_start = 1'b1;
        red_value = {1'b0, x};
      end
      RC_DRED: begin
        red_start = 1'b1;
        red_value = {1'b0, d};
        red_m     = prime - 1'b1;
      end
      default: ;
    endcase
  end

  assign exp_start = (state == RC_EXP);

  mod_reducer #(.N(N), .IN_W(IN_W)) u_red (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (red_start),
    .value  (red_value),
    .len    (red_len),
    .m      (red_m),
    .busy   (red_busy),
    .done   (red_done),
    .result (red_res)
  );

  mod_exp #(.N(N)) u_exp (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (exp_start),
    .base   (xr),
    .exp    (dr),
    .m      (prime),
    .r2     (r2),
    .busy   (exp_busy),
    .done   (exp_done),
    .result (exp_res)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= RC_IDLE;
      next_after_wait <= RC_IDLE;
      sel_q           <= 1'b0;
      r2              <= '0;
      xr              <= '0;
      dr              <= '0;
      yp              <= '0;
      yq              <= '0;
      done            <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        RC_IDLE: begin
          if (start) begin
            sel_q <= 1'b0;
            state <= RC_R2;
          end
        end
        RC_R2:   begin state <= RC_WAIT; next_after_wait <= RC_XRED; end
        RC_XRED: begin state <= RC_WAIT; next_after_wait <= RC_DRED; end
        RC_DRED: begin state <= RC_WAIT; next_after_wait <= RC_EXP;  end
        RC_EXP:  begin state <= RC_WAIT; next_after_wait <= RC_IDLE; end
        RC_WAIT: begin
          if (red_done) begin
            unique case (next_after_wait)
              RC_XRED: r2 <= red_res;
              RC_DRED: xr <= red_res;
              default: dr <= red_res;
            endcase
            state <= next_after_wait;
          end else if (exp_done) begin
            if (sel_q) begin
              yq    <= exp_res;
              done  <= 1'b1;
              state <= RC_IDLE;
            end else begin
              yp    <= exp_res;
              sel_q <= 1'b1;
              state <= RC_R2;
            end
          end
        end
        default: state <= RC_IDLE;
      endcase
    end
  end

  assign busy = (state != RC_IDLE);

  // Sub-units are only started when idle, and never both at once.
  a_red_start_idle: assert property (@(posedge clk) disable iff (!rst_n) red_start |-> !red_busy);
  a_exp_start_idle: assert property (@(posedge clk) disable iff (!rst_n) exp_start |-> !exp_busy);
  a_one_unit:       assert property (@(posedge clk) disable iff (!rst_n) !(red_busy && exp_busy));

endmodule
