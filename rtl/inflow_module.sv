// inflow_module -- high reactor water inflow criterion.
//
// The two inflow switches 131 and 231 are voted 1-out-of-2; the vote must
// hold for INFLOW_DELAY_TICKS time steps (5 s by default) before the
// criterion `trip` becomes 1, and it drops as soon as the vote drops.
// Structure and delay follow the source logic.
//
// Timing: `voted` is combinational; `trip` rises DELAY steps after the vote.
module inflow_module
  import ssd_pkg::*;
#(
  parameter int unsigned INFLOW_DELAY_TICKS = 500
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     tick,
  input  bin_sig_t sw [2],   // 131, 231
  output logic     voted,
  output logic     trip
);

  vote_1oo2 u_vote (
    .a (sw[0]),
    .b (sw[1]),
    .y (voted)
  );

  on_delay #(.DELAY_TICKS(INFLOW_DELAY_TICKS)) u_dly (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (tick),
    .in    (voted),
    .out   (trip)
  );

endmodule
