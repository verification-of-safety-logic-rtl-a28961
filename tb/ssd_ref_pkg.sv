// ssd_ref_pkg -- time-step reference model of the stepwise shutdown logic,
// used by the testbenches to compute expected outputs.
//
// It is written independently of the RTL: pulses are modelled with count-down
// counters (remaining steps) instead of the count-up step counters of the
// RTL, the temperature vote counts measurements above the limit instead of
// selecting the second maximum, and edges are detected against an explicit
// copy of the previous step's values. Usage per time step: call the eval_*
// functions with the current inputs to get the outputs of this step, then
// step() with the same inputs to advance the state.
package ssd_ref_pkg;
  import ssd_pkg::*;

  // 2-out-of-4: at least two fault-free measurements strictly above the limit.
  function automatic logic ref_temp_trip(ana_sig_t m [4], temp_t limit);
    int n = 0;
    for (int i = 0; i < 4; i++) if (!m[i].fault && m[i].value > limit) n++;
    return n >= 2;
  endfunction

  function automatic logic ref_1oo2(bin_sig_t a, bin_sig_t b);
    logic ua = a.fault ? 1'b0 : a.value;
    logic ub = b.fault ? 1'b0 : b.value;
    return ua | ub;
  endfunction

  class ssd_ref;
    bit          variant_b;
    int unsigned s_len, l_len, d_len;
    // state
    int unsigned inflow_hold;          // steps the inflow vote has been 1 (saturating)
    int unsigned ctl_rem, long_rem, man_rem;
    bit          arm_q, ctl_q, man_in_q;
    // outputs of the current step
    bit          trip_inflow, any_trip, arm, ctl, long_p, man_p, shutdown;

    function new(bit variant_b, int unsigned s_len, int unsigned l_len, int unsigned d_len);
      this.variant_b = variant_b;
      this.s_len = s_len; this.l_len = l_len; this.d_len = d_len;
      reset();
    endfunction

    function void reset();
      inflow_hold = 0; ctl_rem = 0; long_rem = 0; man_rem = 0;
      arm_q = 0; ctl_q = 0; man_in_q = 0;
    endfunction

    // Outputs for the current step; inflow_voted is the undelayed vote.
    function void eval(bit t, bit p, bit inflow_voted, bit manual);
      trip_inflow = inflow_voted && (inflow_hold >= d_len);
      eval_core(t, p, trip_inflow, manual);
    endfunction

    // Same with the delayed inflow criterion given directly.
    function void eval_core(bit t, bit p, bit i, bit manual);
      man_p  = variant_b && (man_rem != 0);
      ctl    = (ctl_rem != 0);
      long_p = (long_rem != 0);
      any_trip = t | p | i | (variant_b ? man_p : manual);
      arm      = any_trip & ~long_p;
      shutdown = ctl | man_p;
    endfunction

    function void step(bit t, bit p, bit inflow_voted, bit manual);
      eval(t, p, inflow_voted, manual);
      if (!inflow_voted) inflow_hold = 0;
      else if (inflow_hold < d_len) inflow_hold++;
      step_timing(manual);
    endfunction

    function void step_core(bit t, bit p, bit i, bit manual);
      eval_core(t, p, i, manual);
      step_timing(manual);
    endfunction

    // Advance the pulse counters; uses the outputs computed by eval*.
    function void step_timing(bit manual);
      bit ctl_now = ctl;
      bit long_start = ctl_now && !ctl_q && long_rem == 0;
      bit long_reset = !variant_b && manual && !man_in_q;
      // control pulse
      if (ctl_rem != 0)                   ctl_rem--;
      else if (arm && !arm_q)             ctl_rem = s_len;
      // long pulse
      if (long_reset)                     long_rem = 0;
      else if (long_rem != 0)             long_rem--;
      else if (long_start)                long_rem = l_len;
      // manual pulse (variant B)
      if (man_rem != 0)                   man_rem--;
      else if (variant_b && manual && !man_in_q) man_rem = s_len;
      arm_q = arm; ctl_q = ctl_now; man_in_q = manual;
    endfunction
  endclass

endpackage
