// tb_time_base -- checks that the step strobe comes exactly once every
// CLK_PER_TICK clock cycles (5 here), first in the 5th cycle after reset, and
// that CLK_PER_TICK = 1 gives a permanent strobe.
module tb_time_base;
  logic clk = 0, rst_n = 0;
  logic tick5, tick1;
  int checks = 0, failures = 0;
  int cyc = 0;

  time_base #(.CLK_PER_TICK(5)) dut5 (.clk(clk), .rst_n(rst_n), .tick(tick5));
  time_base #(.CLK_PER_TICK(1)) dut1 (.clk(clk), .rst_n(rst_n), .tick(tick1));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (cyc = 1; cyc <= 200; cyc++) begin
      // sample before the cyc-th rising edge after reset release
      checks += 2;
      if (tick5 !== (cyc % 5 == 0)) begin failures++; $display("FAIL cyc %0d tick5=%b", cyc, tick5); end
      if (tick1 !== 1'b1) begin failures++; $display("FAIL cyc %0d tick1=%b", cyc, tick1); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
