// tb_shutdown_timing_a -- timing logic, first wiring (rising-edge reset of the
// long pulse by the manual trip), 3-step / 15-step pulses, strobe every clock.
// Directed part: a manual trip in the pause ends the pause at once; a manual
// trip during the control pulse with a criterion held freezes the output at 0
// (the known fault of this wiring) for as long as the criterion holds, and
// releasing the criteria clears the freeze. Random part: all outputs are
// compared each step with the reference model.
module tb_shutdown_timing_a;
  import ssd_ref_pkg::*;
  localparam int S = 3, L = 15;
  logic clk = 0, rst_n = 0;
  logic t = 0, p = 0, i = 0, m = 0;
  logic any_trip, ctl, lng, sd;
  int checks = 0, failures = 0, step_no = 0;
  int n_freeze = 0, n_hasten = 0, ones;
  ssd_ref ref_m;

  shutdown_timing_a #(.SHORT_TICKS(S), .LONG_TICKS(L)) dut (
    .clk(clk), .rst_n(rst_n), .tick(1'b1),
    .trip_temp(t), .trip_press(p), .trip_inflow(i), .manual(m),
    .any_trip(any_trip), .ctl_pulse(ctl), .long_pulse(lng), .shutdown(sd));

  always #5 clk = ~clk;

  task automatic cmp(string what, logic got, bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL step %0d %s=%b exp=%b", step_no, what, got, exp);
    end
  endtask

  task automatic one_step(logic nt, logic np, logic ni, logic nm);
    t = nt; p = np; i = ni; m = nm;
    #1;
    ref_m.eval_core(t, p, i, m);
    cmp("any", any_trip, ref_m.any_trip);
    cmp("ctl", ctl, ref_m.ctl);
    cmp("long", lng, ref_m.long_p);
    cmp("shutdown", sd, ref_m.shutdown);
    ref_m.step_core(t, p, i, m);
    if (sd) ones++;
    @(negedge clk);
    step_no++;
  endtask

  initial begin
    ref_m = new(1'b0, S, L, 0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // pressure trip, then manual trip in the pause: pause cut short
    repeat (8) one_step(0, 1, 0, 0);
    one_step(0, 1, 0, 1);
    ones = 0;
    repeat (4) one_step(0, 1, 0, 1);
    checks++;
    if (ones > 0) n_hasten++;
    else begin failures++; $display("FAIL manual trip did not hasten the next control"); end
    repeat (30) one_step(0, 0, 0, 0);
    // pressure trip, manual trip in the second step of the control pulse
    one_step(0, 1, 0, 0);
    one_step(0, 1, 0, 0);
    one_step(0, 1, 0, 1);
    one_step(0, 1, 0, 1);
    ones = 0;
    repeat (4 * L) one_step(0, 1, 0, 1);
    checks++;
    if (ones == 0) n_freeze++;
    else begin failures++; $display("FAIL expected frozen output"); end
    // release everything, then a new criterion works again
    repeat (3) one_step(0, 0, 0, 0);
    ones = 0;
    repeat (5) one_step(1, 0, 0, 0);
    cmp("recovered", ones > 0, 1'b1);
    repeat (30) one_step(0, 0, 0, 0);
    repeat (5000) begin
      logic [3:0] v;
      v = {t, p, i, m};
      for (int k = 0; k < 4; k++) if ($urandom_range(0, 11) == 0) v[k] = ~v[k];
      one_step(v[3], v[2], v[1], v[0]);
    end
    $display("freeze cases %0d, hastened pauses %0d", n_freeze, n_hasten);
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
