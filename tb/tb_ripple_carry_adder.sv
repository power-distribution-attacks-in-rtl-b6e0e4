// tb_ripple_carry_adder: drives random and full-carry-propagation operands
// into the 64-bit victim adder every clock and checks each sum, including
// the carry out, two clocks later.
module tb_ripple_carry_adder;
  localparam int unsigned WIDTH = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [WIDTH-1:0] a = '0, b = '0;
  logic [WIDTH:0]   sum;

  ripple_carry_adder #(.WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WIDTH:0] expect_q[$];
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      if (t % 5 == 0) begin
        // Sensitise a carry path of length L starting at bit 0.
        int unsigned len = 1 + $urandom % WIDTH;
        a = WIDTH'(1);
        b = (len >= WIDTH) ? '1 : ((WIDTH'(1) << len) - 1'b1) & ~WIDTH'(1);
        b[0] = 1'b0;
        a = a | b;
        b = WIDTH'(1);
      end else begin
        a = {$urandom, $urandom};
        b = {$urandom, $urandom};
      end
      expect_q.push_back({1'b0, a} + {1'b0, b});
      @(negedge clk);
      if (expect_q.size() > 1) begin
        logic [WIDTH:0] e;
        e = expect_q.pop_front();
        checks++;
        if (sum !== e) begin
          failures++;
          $display("FAIL: t=%0d sum %h expected %h", t, sum, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
