// tb_sample_log_ram: writes random words to random addresses of the sample
// memory, reads them back with one clock of latency, and checks against a
// reference copy.
module tb_sample_log_ram;
  localparam int unsigned DEPTH = 4600, WIDTH = 20, AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we = 1'b0;
  logic [AW-1:0]    waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;

  sample_log_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic             written [DEPTH];
  initial begin
    for (int i = 0; i < int'(DEPTH); i++) written[i] = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we    = 1'b1;
      waddr = AW'($urandom % DEPTH);
      wdata = WIDTH'($urandom);
      ref_mem[waddr] = wdata;
      written[waddr] = 1'b1;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      if (!written[i]) continue;
      raddr = AW'(i);
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[i]) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", i, rdata, ref_mem[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
