// limit_max -- maximum-limit monitor.
//
// Output `over` is 1 while the input value is strictly greater than LIMIT.
// The strict comparison and the 125 C limit follow the source logic; the
// encoding (0.1 C per LSB, so 125 C = 1250) is this design's. No hysteresis
// is applied because none is specified. Purely combinational.
module limit_max
  import ssd_pkg::*;
#(
  parameter temp_t LIMIT = temp_t'(1250)
) (
  input  temp_t value,
  output logic  over
);

  assign over = (value > LIMIT);

endmodule
