// tb_on_delay -- switch-on delay with DELAY_TICKS = 5 and a step strobe every
// third clock. Random input runs of 1..9 steps are applied; the expected
// output is 1 only once the input has been 1 for 5 whole steps. Runs exactly
// 5 steps long check the delay to the step.
module tb_on_delay;
  localparam int D = 5;
  logic clk = 0, rst_n = 0, tick = 0, in = 0, out;
  int checks = 0, failures = 0, n_on = 0;
  int hold = 0;   // steps the input has been 1 before this step

  on_delay #(.DELAY_TICKS(D)) dut (.clk(clk), .rst_n(rst_n), .tick(tick), .in(in), .out(out));

  always #5 clk = ~clk;

  // One time step: three clocks, the strobe on the last one.
  task automatic one_step(logic v);
    in = v;
    for (int c = 0; c < 3; c++) begin
      tick = (c == 2);
      #1;
      checks++;
      if (out !== (v && hold >= D)) begin
        failures++;
        $display("FAIL t=%0t in=%b hold=%0d out=%b", $time, v, hold, out);
      end
      if (out) n_on++;
      @(negedge clk);
    end
    hold = v ? hold + 1 : 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      int len;
      len = (r % 4 == 0) ? D : $urandom_range(1, 9);
      repeat (len) one_step(1'b1);
      repeat ($urandom_range(1, 3)) one_step(1'b0);
    end
    if (n_on == 0) begin failures++; $display("FAIL output never on"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
