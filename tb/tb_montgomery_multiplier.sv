// tb_montgomery_multiplier: checks a*b*2^-N mod m against reference
// arithmetic for random odd moduli at N = 48, including edge operands, and
// checks the N+2-cycle latency (counted from the start cycle) from start to done.
module tb_montgomery_multiplier;
  import rsa_ref_pkg::*;
  localparam int unsigned N = 48;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         start = 1'b0, busy, done;
  logic [N-1:0] a = '0, b = '0, m = '0, result;

  montgomery_multiplier #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  big_t rinv, expect_v;
  int   lat;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      m = N'({$urandom, $urandom}) | N'(1);
      if (t % 4 == 0) m[N-1] = 1'b1;
      a = N'({$urandom, $urandom});
      b = N'({$urandom, $urandom}) % m;
      if (t == 1) begin a = '1; b = m - 1'b1; end
      if (t == 2) begin a = '0; end
      if (t == 3) begin b = '0; end
      rinv = modinv(big_t'(1) << N, big_t'(m));
      expect_v = mulmod(mulmod(big_t'(a), big_t'(b), big_t'(m)), rinv, big_t'(m));
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(big_t'(result) == expect_v, $sformatf("mont t=%0d a=%h b=%h m=%h got %h", t, a, b, m, result));
      check(lat == N + 2, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
