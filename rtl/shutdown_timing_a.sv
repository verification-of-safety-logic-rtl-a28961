// shutdown_timing_a -- timing logic of the stepwise shutdown, first wiring (A).
//
// Same 3 s control / 15 s period scheme as wiring B, but the voted manual trip
// enters the OR directly and, on its rising edge, resets the 15 s pulse so the
// next 3 s control comes at once. The output is the 3 s control pulse alone.
//
//   any      = temp | press | inflow | manual
//   arm      = any & !long_pulse
//   ctl      = 3 s pulse on rising edge of arm
//   long     = 15 s pulse on rising edge of ctl, reset on rising edge of manual
//   shutdown = ctl
//
// This wiring is kept because it is the documented alternative and shows a
// real design fault: a manual trip that arrives while the control pulse runs
// clears the 15 s pulse, `arm` rises while the control pulse block cannot be
// retriggered, and then stays 1 as long as a criterion holds, so no further
// rising edge ever reaches the control pulse and the output stays 0. The
// wiring follows the source logic; use shutdown_timing_b for a working design.
// Timing is as in shutdown_timing_b.
module shutdown_timing_a #(
  parameter int unsigned SHORT_TICKS = 300,
  parameter int unsigned LONG_TICKS  = 1500
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic trip_temp,
  input  logic trip_press,
  input  logic trip_inflow,
  input  logic manual,
  output logic any_trip,
  output logic ctl_pulse,
  output logic long_pulse,
  output logic shutdown
);

  logic arm;

  assign any_trip = trip_temp || trip_press || trip_inflow || manual;
  assign arm      = any_trip && !long_pulse;

  time_pulse #(.PULSE_TICKS(SHORT_TICKS)) u_ctl (
    .clk (clk), .rst_n (rst_n), .tick (tick),
    .in (arm), .rst_in (1'b0), .out (ctl_pulse)
  );

  time_pulse #(.PULSE_TICKS(LONG_TICKS)) u_long (
    .clk (clk), .rst_n (rst_n), .tick (tick),
    .in (ctl_pulse), .rst_in (manual), .out (long_pulse)
  );

  assign shutdown = ctl_pulse;

endmodule
