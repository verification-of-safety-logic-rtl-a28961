// ssd_pkg -- types and constants shared by the stepwise shutdown logic.
//
// The logic is fed by a platform that delivers every measurement together with
// a fault status bit. A binary measurement (over-pressure switch, inflow switch,
// manual push button) is a bin_sig_t; an analogue temperature measurement is an
// ana_sig_t. Temperatures are unsigned fixed-point numbers in units of 0.1 C
// (a design choice: the source logic only names the 125 C limit).
// The timer lengths of the design are given in milliseconds; ms_to_ticks turns
// them into counts of the time step.
package ssd_pkg;

  // Width of a temperature word, 0.1 C per LSB, 0 .. 6553.5 C.
  parameter int unsigned TEMP_W = 16;

  typedef logic [TEMP_W-1:0] temp_t;

  // Binary field signal with its fault status (fault = 1: value not to be used).
  typedef struct packed {
    logic value;
    logic fault;
  } bin_sig_t;

  // Analogue field signal with its fault status.
  typedef struct packed {
    temp_t value;
    logic  fault;
  } ana_sig_t;

  // The two published wirings of the timing logic. B is the corrected one.
  typedef enum logic {
    VARIANT_A = 1'b0,
    VARIANT_B = 1'b1
  } variant_e;

  // Number of time steps in a duration; durations are whole multiples of the step.
  function automatic int unsigned ms_to_ticks(int unsigned ms, int unsigned tick_ms);
    return ms / tick_ms;
  endfunction

endpackage
