// tb_stepwise_shutdown_full -- one complete stepwise shutdown at full size:
// default parameters (wiring B, 1 MHz clock, 10 ms step, 3 s / 15 s / 5 s).
//
// An over-pressure signal is raised and held for two control periods; then,
// during the 12 s pause, a manual trip is given. Timing is checked in clock
// cycles (1 cycle = 1 us):
//   - first control pulse starts within two steps of the criterion,
//   - each control pulse lasts exactly 3 s (300 steps = 3,000,000 cycles),
//   - the next pulse starts 15 s + 2 steps after the previous one,
//   - a manual trip reaches the output within two steps and lasts 3 s,
//   - the inflow criterion needs 5 s (500 steps) of inflow before it trips,
//   - one temperature over 125 C does not trip, two trip within two steps.
module tb_stepwise_shutdown_full;
  import ssd_pkg::*;

  localparam longint STEP  = 10_000;          // clocks per 10 ms step
  localparam longint PULSE = 300 * STEP;
  localparam longint PERIOD = (1500 + 2) * STEP;

  logic clk = 0, rst_n = 0;
  ana_sig_t temp_in [4];
  bin_sig_t press_in [2], inflow_in [2], manual_in [2];
  logic  sd, tick, tt, tp, iv, ti, tm, any_t, ctl, lng, man;
  temp_t smax;

  stepwise_shutdown dut (
    .clk(clk), .rst_n(rst_n), .temp_in(temp_in), .press_in(press_in),
    .inflow_in(inflow_in), .manual_in(manual_in), .shutdown(sd), .tick(tick),
    .temp_second_max(smax), .trip_temp(tt), .trip_press(tp), .inflow_voted(iv),
    .trip_inflow(ti), .trip_manual(tm), .any_trip(any_t), .ctl_pulse(ctl),
    .long_pulse(lng), .manual_pulse(man));

  always #500 clk = ~clk;   // 1 MHz

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  task automatic expect_range(string what, longint got, longint lo, longint hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s = %0d cycles, expected %0d .. %0d", what, got, lo, hi);
    end else
      $display("ok   %s = %0d cycles", what, got);
  endtask

  initial begin
    longint t0, r1, f1, r2, f2, rm, fm;
    for (int k = 0; k < 4; k++) temp_in[k] = '{value: temp_t'(800), fault: 1'b0};
    for (int k = 0; k < 2; k++) begin
      press_in[k] = '0; inflow_in[k] = '0; manual_in[k] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5 * STEP) @(negedge clk);
    // over-pressure criterion
    press_in[1].value = 1'b1; t0 = cyc;
    @(posedge sd); r1 = cyc;
    @(negedge sd); f1 = cyc;
    @(posedge sd); r2 = cyc;
    @(negedge sd); f2 = cyc;
    expect_range("criterion to first pulse", r1 - t0, 1, 2 * STEP);
    expect_range("first pulse length", f1 - r1, PULSE, PULSE);
    expect_range("pulse start to start", r2 - r1, PERIOD, PERIOD);
    expect_range("second pulse length", f2 - r2, PULSE, PULSE);
    // manual trip during the pause
    repeat (2 * PULSE) @(negedge clk);
    checks++;
    if (!lng || sd) begin failures++; $display("FAIL not in the pause"); end
    manual_in[0].value = 1'b1; t0 = cyc;
    @(posedge sd); rm = cyc;
    manual_in[0].value = 1'b0;
    @(negedge sd); fm = cyc;
    expect_range("manual trip to output", rm - t0, 1, 2 * STEP);
    expect_range("manual pulse length", fm - rm, PULSE, PULSE);
    press_in[1].value = 1'b0;
    repeat (PERIOD) @(negedge clk);
    // inflow criterion: 5 s switch-on delay
    inflow_in[0].value = 1'b1; t0 = cyc;
    @(posedge ti); rm = cyc;
    expect_range("inflow delay", rm - t0, 500 * STEP - STEP, 500 * STEP + STEP);
    @(posedge sd);
    expect_range("inflow criterion to pulse", cyc - rm, 1, 2 * STEP);
    inflow_in[0].value = 1'b0;
    repeat (PERIOD) @(negedge clk);
    // temperature criterion: one measurement over 125 C is not enough, two are
    temp_in[1].value = temp_t'(1300);
    repeat (5 * STEP) @(negedge clk);
    checks++;
    if (sd || tt) begin failures++; $display("FAIL single high temperature tripped"); end
    temp_in[2].value = temp_t'(1260); t0 = cyc;
    @(posedge sd);
    expect_range("temperature criterion to pulse", cyc - t0, 1, 2 * STEP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #120s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
