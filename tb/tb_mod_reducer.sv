// tb_mod_reducer: checks value[len-1:0] mod m against reference arithmetic
// for random values, lengths and moduli at N = 40, including the R^2 mod m
// pattern, and the len+1-cycle latency.
module tb_mod_reducer;
  import rsa_ref_pkg::*;
  localparam int unsigned N    = 40;
  localparam int unsigned IN_W = 2 * N + 1;
  localparam int unsigned LW   = $clog2(IN_W + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            start = 1'b0, busy, done;
  logic [IN_W-1:0] value = '0;
  logic [LW-1:0]   len = '0;
  logic [N-1:0]    m = '1, result;

  mod_reducer #(.N(N), .IN_W(IN_W)) dut (.*);

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

  big_t v;
  int   lat;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      value = IN_W'({$urandom, $urandom, $urandom});
      len   = LW'(1 + $urandom % IN_W);
      m     = N'({$urandom, $urandom}) >> ($urandom % N);
      if (m == '0) m = N'(3);
      if (t == 0) begin value = IN_W'(1) << (2 * N); len = LW'(IN_W); end
      v = big_t'(value) & ((big_t'(1) << len) - 1);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(big_t'(result) == v % big_t'(m), $sformatf("t=%0d len=%0d m=%h got %h", t, len, m, result));
      check(lat == int'(len) + 1, $sformatf("latency %0d for len %0d", lat, len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
