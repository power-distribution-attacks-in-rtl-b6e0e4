// tb_mod_exp: checks base^exp mod m against reference arithmetic at N = 40
// for random odd moduli and exponents (including 0, 1 and all-ones), and
// that an operation takes (3 + N + popcount(exp)) multiplications of N+3
// cycles.
module tb_mod_exp;
  import rsa_ref_pkg::*;
  localparam int unsigned N = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start = 1'b0, busy, done;
  logic [N-1:0] base = '0, exp = '0, m = '1, r2 = '0, result;

  mod_exp #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat, expect_lat;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      m    = N'({$urandom, $urandom}) | N'(1);
      if (m < 3) m = N'(3);
      base = N'({$urandom, $urandom}) % m;
      exp  = N'({$urandom, $urandom}) >> ($urandom % 8);
      if (t == 0) exp = '0;
      if (t == 1) exp = N'(1);
      if (t == 2) exp = '1;
      r2   = N'((big_t'(1) << (2 * N)) % big_t'(m));
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(big_t'(result) == powmod(big_t'(base), big_t'(exp), big_t'(m)),
            $sformatf("t=%0d %h^%h mod %h got %h", t, base, exp, m, result));
      expect_lat = (3 + N + $countones(exp)) * (N + 3) + 1;
      check(lat >= expect_lat - 2 && lat <= expect_lat + 2,
            $sformatf("latency %0d expected %0d", lat, expect_lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
