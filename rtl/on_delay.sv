// on_delay -- switch-on delay ("5 s / 0" block of the inflow channel).
//
// The output goes to 1 once the input has been 1 for DELAY_TICKS consecutive
// time steps and returns to 0 in the same step the input drops (no switch-off
// delay). A saturating counter counts the steps the input has been high; it
// is cleared whenever the input is low. The 5 s delay follows the source
// logic; its counter form is this design's.
//
// Timing: if `in` rises before time step k and stays high, `out` is 1 from
// step k + DELAY_TICKS on. Registers advance only on clock edges with tick = 1.
module on_delay #(
  parameter int unsigned DELAY_TICKS = 500
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic in,
  output logic out
);

  localparam int unsigned CW = $clog2(DELAY_TICKS + 1);
  localparam logic [CW-1:0] FULL = CW'(DELAY_TICKS);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (tick) begin
      if (!in)           cnt <= '0;
      else if (cnt != FULL) cnt <= cnt + 1'b1;
    end
  end

  assign out = in && (cnt == FULL);

endmodule
