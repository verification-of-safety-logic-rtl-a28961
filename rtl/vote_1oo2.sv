// vote_1oo2 -- 1-out-of-2 vote of a two-redundant binary signal.
//
// The output is 1 when either redundancy reports 1 and is not marked faulty.
// A signal with its fault status set is ignored; with both faulty the output
// falls to 0, the default value for a measurement whose signals are all faulty.
// The 1-out-of-2 voting and the all-faulty default follow the source logic;
// ignoring a single faulty input is this design's reading of "processing of
// faulty signals according to predetermined rules". Purely combinational.
// Used for the over-pressure (121/221), high-inflow (131/231) and manual-trip
// (141/241) signals.
module vote_1oo2
  import ssd_pkg::*;
(
  input  bin_sig_t a,   // redundancy 1
  input  bin_sig_t b,   // redundancy 2
  output logic     y
);

  assign y = (a.value && !a.fault) || (b.value && !b.fault);

endmodule
