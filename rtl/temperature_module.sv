// temperature_module -- reactor over-temperature criterion.
//
// The four temperature measurements 111, 112, 211, 212 go through a second-
// maximum selector and a maximum-limit monitor: the criterion `trip` is 1 when
// at least two fault-free measurements exceed TEMP_LIMIT (125 C by default).
// Structure and limit follow the source logic; fault handling is described in
// second_max4. Purely combinational.
module temperature_module
  import ssd_pkg::*;
#(
  parameter temp_t TEMP_LIMIT = temp_t'(1250)
) (
  input  ana_sig_t meas [4],     // 111, 112, 211, 212
  output temp_t    second_max,   // selected value, for display
  output logic     trip
);

  logic [2:0] n_valid;

  second_max4 u_sel (
    .meas       (meas),
    .second_max (second_max),
    .n_valid    (n_valid)
  );

  limit_max #(.LIMIT(TEMP_LIMIT)) u_lim (
    .value (second_max),
    .over  (trip)
  );

  // With fewer than two valid measurements the second maximum is 0 and
  // the channel cannot trip.
  always_comb begin
    a_two_valid: assert (n_valid >= 3'd2 || !trip)
      else $error("temperature_module: trip with fewer than two valid inputs");
  end

endmodule
