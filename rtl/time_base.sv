// time_base -- time-step strobe for all timers of the shutdown logic.
//
// The timers of the logic advance in discrete time steps of fixed length
// (10 ms by default, the finest step the source analyses). This block divides
// the system clock by CLK_PER_TICK and raises `tick` for one clock cycle per
// step. With CLK_PER_TICK = 1 the strobe is permanently high and every clock
// cycle is one step. The clock rate (1 MHz for the default 10 ms step) is this
// design's own choice.
//
// Timing: tick is high in the last cycle of each CLK_PER_TICK-cycle period,
// the first time CLK_PER_TICK cycles after reset is released.
module time_base #(
  parameter int unsigned CLK_PER_TICK = 10_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned CW = (CLK_PER_TICK > 1) ? $clog2(CLK_PER_TICK) : 1;
  localparam logic [CW-1:0] LAST = CW'(CLK_PER_TICK - 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            cnt <= '0;
    else if (cnt == LAST)  cnt <= '0;
    else                   cnt <= cnt + 1'b1;
  end

  assign tick = (cnt == LAST);

endmodule
