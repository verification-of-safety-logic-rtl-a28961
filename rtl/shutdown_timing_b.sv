// shutdown_timing_b -- timing logic of the stepwise shutdown, corrected wiring (B).
//
// While any criterion holds, the process is driven towards a safer state for a
// 3 s control pulse; a 15 s pulse started by the control pulse then blocks the
// next control pulse, leaving a 12 s pause. If a criterion still holds when the
// 15 s pulse ends, the next 3 s control follows. The manual trip has its own
// 3 s pulse that drives the output directly, so a manual trip acts at once,
// also during the pause, and never disturbs the 15 s pulse.
//
//   any      = temp | press | inflow | manual_pulse          (OR, ">= 1")
//   arm      = any & !long_pulse                             (AND, inverted input)
//   ctl      = 3 s pulse on rising edge of arm
//   long     = 15 s pulse on rising edge of ctl
//   manual   = 3 s pulse on rising edge of the voted manual trip
//   shutdown = ctl | manual_pulse                            (OR, ">= 1")
//
// This wiring follows the source logic exactly. Timing: each pulse block adds
// one time step between its input edge and its output, so a held criterion
// gives control pulses of SHORT_TICKS steps that start LONG_TICKS + 2 steps
// apart (see time_pulse).
module shutdown_timing_b #(
  parameter int unsigned SHORT_TICKS = 300,    // 3 s
  parameter int unsigned LONG_TICKS  = 1500    // 15 s
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic trip_temp,
  input  logic trip_press,
  input  logic trip_inflow,
  input  logic manual,          // voted manual trip 141/241
  output logic any_trip,        // OR of the criteria
  output logic ctl_pulse,       // 3 s control pulse
  output logic long_pulse,      // 15 s pulse
  output logic manual_pulse,    // 3 s manual-trip pulse
  output logic shutdown
);

  logic arm;

  time_pulse #(.PULSE_TICKS(SHORT_TICKS)) u_man (
    .clk (clk), .rst_n (rst_n), .tick (tick),
    .in (manual), .rst_in (1'b0), .out (manual_pulse)
  );

  assign any_trip = trip_temp || trip_press || trip_inflow || manual_pulse;
  assign arm      = any_trip && !long_pulse;

  time_pulse #(.PULSE_TICKS(SHORT_TICKS)) u_ctl (
    .clk (clk), .rst_n (rst_n), .tick (tick),
    .in (arm), .rst_in (1'b0), .out (ctl_pulse)
  );

  time_pulse #(.PULSE_TICKS(LONG_TICKS)) u_long (
    .clk (clk), .rst_n (rst_n), .tick (tick),
    .in (ctl_pulse), .rst_in (1'b0), .out (long_pulse)
  );

  assign shutdown = ctl_pulse || manual_pulse;

  // Safety property of this wiring: whenever a criterion is present while the
  // 15 s pulse is idle, the control pulse is on in the next time step. This
  // holds for SHORT_TICKS >= 2 and LONG_TICKS >= SHORT_TICKS; wiring A breaks
  // it. arm_q is only used by the check.
  logic arm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) arm_q <= 1'b0;
    else if (tick) begin
      a_arm_serves: assert (!arm_q || ctl_pulse)
        else $error("shutdown_timing_b: criterion present but no control pulse");
      arm_q <= arm;
    end
  end

endmodule
