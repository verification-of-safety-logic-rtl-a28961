// stepwise_shutdown -- stepwise shutdown safety logic, top level.
//
// Four process criteria are formed from two-redundant field signals, each with
// a fault status: reactor temperature (2-out-of-4 over 125 C), reactor over-
// pressure (1-out-of-2), high reactor water inflow (1-out-of-2, held 5 s) and
// manual trip from the control room (1-out-of-2). While any criterion holds,
// `shutdown` gives a 3 s control pulse every 15 s; a manual trip acts at once.
// VARIANT selects the timing wiring: VARIANT_B (default) is the corrected
// design, VARIANT_A the alternative with a rising-edge reset of the 15 s pulse,
// which can freeze the output at 0 (see shutdown_timing_a).
//
// All durations are whole numbers of the time step TICK_MS; time_base makes
// the step strobe from the clock. The criteria and the timer lengths follow the
// source logic; the clock rate, the temperature encoding and the fault rules
// for partly faulty inputs are this design's choices.
//
// Field signals must be synchronous to clk. The status outputs show the four
// criteria and the internal pulses; manual_pulse is 0 in VARIANT_A, which has
// no separate manual pulse.
module stepwise_shutdown
  import ssd_pkg::*;
#(
  parameter variant_e    VARIANT         = VARIANT_B,
  parameter int unsigned CLK_PER_TICK    = 10_000,   // 1 MHz clock, 10 ms step
  parameter int unsigned TICK_MS         = 10,
  parameter int unsigned SHORT_PULSE_MS  = 3_000,
  parameter int unsigned LONG_PULSE_MS   = 15_000,
  parameter int unsigned INFLOW_DELAY_MS = 5_000,
  parameter temp_t       TEMP_LIMIT      = temp_t'(1250)  // 125.0 C
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ana_sig_t temp_in   [4],   // 111, 112, 211, 212
  input  bin_sig_t press_in  [2],   // 121, 221
  input  bin_sig_t inflow_in [2],   // 131, 231
  input  bin_sig_t manual_in [2],   // 141, 241
  output logic     shutdown,
  // status
  output logic     tick,
  output temp_t    temp_second_max,
  output logic     trip_temp,
  output logic     trip_press,
  output logic     inflow_voted,
  output logic     trip_inflow,
  output logic     trip_manual,
  output logic     any_trip,
  output logic     ctl_pulse,
  output logic     long_pulse,
  output logic     manual_pulse
);

  localparam int unsigned SHORT_TICKS  = ms_to_ticks(SHORT_PULSE_MS, TICK_MS);
  localparam int unsigned LONG_TICKS   = ms_to_ticks(LONG_PULSE_MS, TICK_MS);
  localparam int unsigned INFLOW_TICKS = ms_to_ticks(INFLOW_DELAY_MS, TICK_MS);

  time_base #(.CLK_PER_TICK(CLK_PER_TICK)) u_tb (
    .clk (clk), .rst_n (rst_n), .tick (tick)
  );

  temperature_module #(.TEMP_LIMIT(TEMP_LIMIT)) u_temp (
    .meas       (temp_in),
    .second_max (temp_second_max),
    .trip       (trip_temp)
  );

  vote_1oo2 u_press (
    .a (press_in[0]), .b (press_in[1]), .y (trip_press)
  );

  inflow_module #(.INFLOW_DELAY_TICKS(INFLOW_TICKS)) u_inflow (
    .clk (clk), .rst_n (rst_n), .tick (tick),
    .sw (inflow_in), .voted (inflow_voted), .trip (trip_inflow)
  );

  vote_1oo2 u_manual (
    .a (manual_in[0]), .b (manual_in[1]), .y (trip_manual)
  );

  if (VARIANT == VARIANT_B) begin : g_b
    shutdown_timing_b #(.SHORT_TICKS(SHORT_TICKS), .LONG_TICKS(LONG_TICKS)) u_timing (
      .clk (clk), .rst_n (rst_n), .tick (tick),
      .trip_temp (trip_temp), .trip_press (trip_press),
      .trip_inflow (trip_inflow), .manual (trip_manual),
      .any_trip (any_trip), .ctl_pulse (ctl_pulse), .long_pulse (long_pulse),
      .manual_pulse (manual_pulse), .shutdown (shutdown)
    );
  end else begin : g_a
    shutdown_timing_a #(.SHORT_TICKS(SHORT_TICKS), .LONG_TICKS(LONG_TICKS)) u_timing (
      .clk (clk), .rst_n (rst_n), .tick (tick),
      .trip_temp (trip_temp), .trip_press (trip_press),
      .trip_inflow (trip_inflow), .manual (trip_manual),
      .any_trip (any_trip), .ctl_pulse (ctl_pulse), .long_pulse (long_pulse),
      .shutdown (shutdown)
    );
    assign manual_pulse = 1'b0;
  end

endmodule
