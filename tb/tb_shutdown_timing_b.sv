// tb_shutdown_timing_b -- timing logic, corrected wiring, with 3-step control
// pulses and a 15-step long pulse (step strobe every clock).
// Directed part: a held criterion must give 3-step control pulses starting 17
// steps apart (15-step long pulse plus one step in each pulse block); a manual
// trip in the pause must reach the output in the next step. Random part: the
// four criteria change at random and every output is compared each step with
// the reference model.
module tb_shutdown_timing_b;
  import ssd_ref_pkg::*;
  localparam int S = 3, L = 15;
  logic clk = 0, rst_n = 0;
  logic t = 0, p = 0, i = 0, m = 0;
  logic any_trip, ctl, lng, man, sd;
  int checks = 0, failures = 0;
  bit measure = 0;
  int step_no = 0, last_start = -1, n_period = 0, n_len = 0, run = 0, n_bypass = 0;
  ssd_ref ref_m;

  shutdown_timing_b #(.SHORT_TICKS(S), .LONG_TICKS(L)) dut (
    .clk(clk), .rst_n(rst_n), .tick(1'b1),
    .trip_temp(t), .trip_press(p), .trip_inflow(i), .manual(m),
    .any_trip(any_trip), .ctl_pulse(ctl), .long_pulse(lng),
    .manual_pulse(man), .shutdown(sd));

  always #5 clk = ~clk;

  task automatic cmp(string what, logic got, bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL step %0d %s=%b exp=%b", step_no, what, got, exp);
    end
  endtask

  // Apply inputs for one step, check, then advance the model.
  task automatic one_step(logic nt, logic np, logic ni, logic nm);
    t = nt; p = np; i = ni; m = nm;
    #1;
    ref_m.eval_core(t, p, i, m);
    cmp("any", any_trip, ref_m.any_trip);
    cmp("ctl", ctl, ref_m.ctl);
    cmp("long", lng, ref_m.long_p);
    cmp("man", man, ref_m.man_p);
    cmp("shutdown", sd, ref_m.shutdown);
    ref_m.step_core(t, p, i, m);
    @(negedge clk);
    step_no++;
  endtask

  // Watch the control pulse: length and start-to-start spacing.
  always @(posedge clk) if (rst_n) begin
    if (ctl && run == 0) begin
      if (last_start >= 0 && measure) begin
        checks++;
        if (step_no - last_start == L + 2) n_period++;
        else begin failures++; $display("FAIL period %0d", step_no - last_start); end
      end
      last_start = step_no;
    end
    if (ctl) run++;
    if (!ctl && run != 0) begin
      checks++;
      if (run == S) n_len++; else begin failures++; $display("FAIL pulse length %0d", run); end
      run = 0;
    end
  end

  initial begin
    ref_m = new(1'b1, S, L, 0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // held temperature criterion over several periods
    measure = 1;
    repeat (60) one_step(1, 0, 0, 0);
    measure = 0;
    repeat (20) one_step(0, 0, 0, 0);
    last_start = -1;
    // manual trip during the pause acts in the next step
    repeat (6) one_step(0, 1, 0, 0);
    one_step(0, 1, 0, 1);
    checks++;
    if (sd === 1'b1 && lng === 1'b1) n_bypass++;
    else begin failures++; $display("FAIL manual trip not passed during pause"); end
    repeat (30) one_step(0, 0, 0, 0);
    // random criteria, with runs
    repeat (5000) begin
      logic [3:0] v;
      v = {t, p, i, m};
      for (int k = 0; k < 4; k++) if ($urandom_range(0, 11) == 0) v[k] = ~v[k];
      one_step(v[3], v[2], v[1], v[0]);
    end
    checks++;
    if (n_period < 2 || n_len < 5) begin
      failures++;
      $display("FAIL too few periods (%0d) / full pulses (%0d)", n_period, n_len);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
