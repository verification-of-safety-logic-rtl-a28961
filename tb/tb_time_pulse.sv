// tb_time_pulse -- rising-edge time pulse of 3 steps, with and without the
// rising-edge reset. Random inputs are compared step by step with a count-down
// model; directed cases check the pulse length (exactly 3 steps), that edges
// during a pulse are ignored and that a reset edge ends the pulse. The step
// strobe comes every second clock.
module tb_time_pulse;
  localparam int P = 3;
  logic clk = 0, rst_n = 0, tick = 0, in = 0, rin = 0, out;
  int checks = 0, failures = 0;
  int rem = 0; bit in_q = 0, r_q = 0;
  int run_len = 0, n_pulses = 0, n_resets = 0;

  time_pulse #(.PULSE_TICKS(P)) dut (.clk(clk), .rst_n(rst_n), .tick(tick),
                                     .in(in), .rst_in(rin), .out(out));

  always #5 clk = ~clk;

  task automatic one_step(logic v, logic r);
    in = v; rin = r;
    for (int c = 0; c < 2; c++) begin
      tick = (c == 1);
      #1;
      checks++;
      if (out !== (rem != 0)) begin
        failures++;
        $display("FAIL t=%0t in=%b rin=%b rem=%0d out=%b", $time, v, r, rem, out);
      end
      @(negedge clk);
    end
    // pulse length bookkeeping
    if (rem != 0) run_len++;
    else if (run_len != 0) begin
      if (run_len == P) n_pulses++;
      run_len = 0;
    end
    // model update
    if (r && !r_q) begin rem = 0; n_resets++; run_len = 0; end
    else if (rem != 0) rem--;
    else if (v && !in_q) rem = P;
    in_q = v; r_q = r;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // one clean pulse with the input held long
    repeat (8) one_step(1, 0);
    repeat (2) one_step(0, 0);
    // edge while running is lost
    one_step(1, 0); one_step(0, 0); one_step(1, 0); repeat (4) one_step(0, 0);
    // reset edge during the pulse
    one_step(1, 0); one_step(1, 1); repeat (4) one_step(0, 0);
    repeat (3000) one_step($urandom_range(0, 2) != 0, $urandom_range(0, 9) == 0);
    checks++;
    if (n_pulses < 10 || n_resets < 10) begin
      failures++;
      $display("FAIL too few full pulses (%0d) or resets (%0d)", n_pulses, n_resets);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
