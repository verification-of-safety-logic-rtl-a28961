// time_pulse -- rising-edge triggered time pulse block (3 s and 15 s pulses).
//
// On a rising edge of `in` while idle, the block emits a pulse of exactly
// PULSE_TICKS time steps. It cannot be retriggered: edges that arrive while
// the pulse runs are lost. The rising edge is found by comparing the input
// with its value at the previous time step. This behaviour, including the
// priority order "expire, then count, then start", follows the source's
// timer description: the step counter holds 1..PULSE_TICKS while the pulse is
// high and returns to 0 after its last step.
//
// `rst_in` is the rising-edge reset used by one of the two published wirings:
// a rising edge on it ends a running pulse (counter to 0) at the next step.
// Reset taking priority over a simultaneous start is this design's choice.
// Tie rst_in to 0 where no reset is wired.
//
// Timing: an edge seen at step k gives out = 1 at steps k+1 .. k+PULSE_TICKS.
// Registers advance on clock edges with tick = 1. After rst_n the previous
// input is taken as 0, so an input that is already 1 starts a pulse.
module time_pulse #(
  parameter int unsigned PULSE_TICKS = 300
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic in,
  input  logic rst_in,
  output logic out
);

  localparam int unsigned CW = $clog2(PULSE_TICKS + 1);
  localparam logic [CW-1:0] LAST = CW'(PULSE_TICKS);

  logic [CW-1:0] timer;
  logic          in_old;
  logic          rst_old;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer   <= '0;
      in_old  <= 1'b0;
      rst_old <= 1'b0;
    end else if (tick) begin
      // The step counter never leaves its range.
      a_timer_range: assert (timer <= LAST)
        else $error("time_pulse: counter out of range");
      in_old  <= in;
      rst_old <= rst_in;
      if (rst_in && !rst_old)              timer <= '0;
      else if (timer >= LAST)              timer <= '0;
      else if (timer != '0)                timer <= timer + 1'b1;
      else if (in && !in_old)              timer <= CW'(1);
      else                                 timer <= '0;
    end
  end

  assign out = (timer != '0);


endmodule
