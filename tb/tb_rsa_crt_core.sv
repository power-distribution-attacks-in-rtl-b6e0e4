// tb_rsa_crt_core: self-checking test of the CRT RSA core at N = 32.
//
// Generates keys from fixed primes (e = 65537, d = e^-1 mod (p-1)(q-1)),
// decrypts random ciphertexts and compares Yp, Yq and the recombined result
// with reference arithmetic; checks that the cycle count of one operation
// follows the square-and-multiply schedule; then flips one bit of the
// exponentiation accumulator while Yp is being computed, as a voltage-induced
// delay fault would, and checks that the faulty result reveals q.
module tb_rsa_crt_core;
  import rsa_ref_pkg::*;

  localparam int unsigned N = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           start = 1'b0;
  logic [N-1:0]   p, q, yp, yq;
  logic [2*N-1:0] d, x;
  logic           busy, done;

  rsa_crt_core #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_op(output int cycles);
    cycles = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  big_t pb, qb, nb, eb, db, xb, yb, f;
  big_t dp, dq;
  logic [N+1:0] s_snap;
  int   cyc, expect_cyc;
  logic [31:0] pairs[2][2] = '{'{32'hFFFF_FFFB, 32'h7FFF_FFFF}, '{32'hFFFF_FFEF, 32'hFFFF_FFFB}};

  initial begin
    p = '0; q = '0; d = '0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    eb = 65537;
    for (int k = 0; k < 2; k++) begin
      pb = big_t'(pairs[k][0]);
      qb = big_t'(pairs[k][1]);
      nb = pb * qb;
      db = modinv(eb, (pb - 1) * (qb - 1));
      check(mulmod(eb, db, (pb - 1) * (qb - 1)) == 1, "reference key generation");
      for (int t = 0; t < 4; t++) begin
        xb = big_t'({$urandom, $urandom}) % nb;
        p = N'(pb); q = N'(qb); d = (2*N)'(db); x = (2*N)'(xb);
        run_op(cyc);
        check(big_t'(yp) == powmod(xb, db, pb), $sformatf("Yp pair %0d trial %0d", k, t));
        check(big_t'(yq) == powmod(xb, db, qb), $sformatf("Yq pair %0d trial %0d", k, t));
        yb = crt_combine(big_t'(yp), big_t'(yq), pb, qb);
        check(yb == powmod(xb, db, nb), "CRT recombination equals X^d mod N");
        check(powmod(yb, eb, nb) == xb, "re-encryption gives back X");
        // Cycle budget: per prime three serial reductions of about 2N bits
        // and (3 + N + popcount(d mod (P-1))) multiplications of N+3 cycles.
        dp = db % (pb - 1);
        dq = db % (qb - 1);
        expect_cyc = (3 + N + $countones(dp[N-1:0])) * (N + 3)
                   + (3 + N + $countones(dq[N-1:0])) * (N + 3)
                   + 2 * (3 * 2 * N);
        check(cyc > expect_cyc * 95 / 100 && cyc < expect_cyc * 105 / 100,
              $sformatf("cycle count %0d vs expected about %0d", cyc, expect_cyc));
      end
    end

    // Fault attack: flip one accumulator bit during the Yp exponentiation.
    pb = big_t'(pairs[0][0]); qb = big_t'(pairs[0][1]); nb = pb * qb;
    db = modinv(eb, (pb - 1) * (qb - 1));
    xb = big_t'(64'h0123_4567_89AB_CDEF) % nb;
    p = N'(pb); q = N'(qb); d = (2*N)'(db); x = (2*N)'(xb);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (1500) @(negedge clk);
    check(dut.sel_q == 1'b0 && dut.u_exp.u_mm.busy, "fault injected while Yp is computed");
    s_snap = dut.u_exp.u_mm.s;
    force dut.u_exp.u_mm.s = s_snap ^ (N+2)'(32'h0000_0100);
    @(negedge clk);
    release dut.u_exp.u_mm.s;
    while (!done) @(negedge clk);
    yb = crt_combine(big_t'(yp), big_t'(yq), pb, qb);
    check(big_t'(yq) == powmod(xb, db, qb), "Yq unaffected by the fault");
    check(big_t'(yp) != powmod(xb, db, pb), "Yp corrupted by the fault");
    f = lenstra_factor(xb, yb, eb, nb);
    check(f == qb, $sformatf("faulty output reveals q (gcd = %0d)", f));
    // d recovered from the exposed prime decrypts like the true one.
    f = modinv(eb, (f - 1) * (nb / f - 1));
    check(powmod(powmod(xb, eb, nb), f, nb) == xb, "private exponent recovered from q");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
