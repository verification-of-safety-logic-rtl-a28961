// tb_single_failure -- single-failure criterion of the stepwise shutdown
// logic (wiring B) under three failure models. At most one input signal of
// each measurement is failed at a time; failures start and end at random steps.
//   model 1: failures are detected (fault status set), failed signal random
//   model 2: failures undetected, failed signal keeps its previous value
//   model 3: failures undetected, failed signal random
// The process itself is a set of true conditions (temperature high, pressure,
// inflow, manual trip) from which all healthy signals are derived.
// Properties checked, 1 s steps (3 / 15 / 5 steps):
//   P2 (all models): while a true temperature, pressure or inflow condition
//       holds for a whole period (long pulse + control pulse + inflow delay +
//       margin), the output must have been 1 at some step of that window; a
//       true manual trip must raise the manual vote, and each rise of the vote
//       must find the output at 1 within two steps (a rise while the manual
//       pulse still runs is served by that pulse).
//   P1 (models 1 and 2): the output never starts without a true condition in
//       the two preceding steps. For model 2 this is checked only while no
//       failed signal is frozen at 1 (a signal frozen at 1 during a real demand
//       keeps demanding).
//   Model 3 must show at least one spurious start: a single undetected binary
//   signal at 1 trips a 1-out-of-2 vote (failure in the safe direction).
module tb_single_failure;
  import ssd_pkg::*;

  localparam int S = 3, L = 15, D = 5;
  localparam int WIN = L + S + D + 4;
  localparam int NSTEP = 20000;

  logic clk = 0, rst_n = 0;
  ana_sig_t temp_in [4];
  bin_sig_t press_in [2], inflow_in [2], manual_in [2];
  logic  sd, tick, tt, tp, iv, ti, tm, any_t, ctl, lng, man;
  temp_t smax;

  stepwise_shutdown #(.CLK_PER_TICK(1), .TICK_MS(1000)) dut (
    .clk(clk), .rst_n(rst_n), .temp_in(temp_in), .press_in(press_in),
    .inflow_in(inflow_in), .manual_in(manual_in), .shutdown(sd), .tick(tick),
    .temp_second_max(smax), .trip_temp(tt), .trip_press(tp), .inflow_voted(iv),
    .trip_inflow(ti), .trip_manual(tm), .any_trip(any_t), .ctl_pulse(ctl),
    .long_pulse(lng), .manual_pulse(man));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int spurious [1:3];
  int p2_windows [1:3];
  int p2_manual [1:3];

  // true process conditions
  bit c_temp, c_press, c_inflow, c_manual;
  int inflow_true_run;
  // failed signal index per measurement (-1: none), frozen values for model 2
  int  f_idx [4];
  logic [TEMP_W-1:0] frozen_t;
  bit  frozen_b [4];

  function automatic bit demand();
    return c_temp || c_press || (c_inflow && inflow_true_run >= D) || c_manual;
  endfunction

  // Process criteria that call for repeated control pulses while they hold.
  function automatic bit held_demand();
    return c_temp || c_press || (c_inflow && inflow_true_run >= D);
  endfunction

  task automatic run_model(int model);
    int demand_run = 0, seen_out = 0;
    bit d_q1 = 0, d_q2 = 0, sd_q = 0, sd_q2 = 0, man_vote = 0, c_manual_q = 0;
    bit man_vote_q1 = 0, man_vote_q2 = 0, man_vote_q3 = 0;
    int stuck_high_age = 1 << 20;
    c_temp = 0; c_press = 0; c_inflow = 0; c_manual = 0; inflow_true_run = 0;
    foreach (f_idx[k]) f_idx[k] = -1;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NSTEP; n++) begin
      bit any_stuck_high;
      // evolve the process: long runs of each condition
      if ($urandom_range(0, 60) == 0) c_temp   = ~c_temp;
      if ($urandom_range(0, 60) == 0) c_press  = ~c_press;
      if ($urandom_range(0, 40) == 0) c_inflow = ~c_inflow;
      if ($urandom_range(0, 80) == 0) c_manual = ~c_manual;
      // failures: start or end, at most one signal per measurement
      for (int g = 0; g < 4; g++) begin
        if (f_idx[g] < 0 && $urandom_range(0, 30) == 0) begin
          f_idx[g] = (g == 0) ? $urandom_range(0, 3) : $urandom_range(0, 1);
          frozen_b[g] = (g == 0) ? 1'b0 :
                        (g == 1) ? press_in[f_idx[g]].value :
                        (g == 2) ? inflow_in[f_idx[g]].value : manual_in[f_idx[g]].value;
          if (g == 0) frozen_t = temp_in[f_idx[g]].value;
        end else if (f_idx[g] >= 0 && $urandom_range(0, 30) == 0) f_idx[g] = -1;
      end
      // healthy signals follow the process
      for (int k = 0; k < 4; k++)
        temp_in[k] = '{value: temp_t'(c_temp ? $urandom_range(1260, 1400) : $urandom_range(900, 1240)),
                       fault: 1'b0};
      for (int k = 0; k < 2; k++) begin
        press_in[k]  = '{value: c_press,  fault: 1'b0};
        inflow_in[k] = '{value: c_inflow, fault: 1'b0};
        manual_in[k] = '{value: c_manual, fault: 1'b0};
      end
      // failed signals
      any_stuck_high = 0;
      if (f_idx[0] >= 0) begin
        case (model)
          1: temp_in[f_idx[0]] = '{value: temp_t'($urandom_range(0, 2000)), fault: 1'b1};
          2: temp_in[f_idx[0]].value = frozen_t;
          default: temp_in[f_idx[0]].value = temp_t'($urandom_range(0, 2000));
        endcase
      end
      for (int g = 1; g < 4; g++) if (f_idx[g] >= 0) begin
        bin_sig_t fs;
        case (model)
          1: fs = '{value: 1'($urandom_range(0, 1)), fault: 1'b1};
          2: fs = '{value: frozen_b[g], fault: 1'b0};
          default: fs = '{value: 1'($urandom_range(0, 1)), fault: 1'b0};
        endcase
        if (model == 2 && frozen_b[g]) any_stuck_high = 1;
        if (g == 1) press_in[f_idx[g]] = fs;
        if (g == 2) inflow_in[f_idx[g]] = fs;
        if (g == 3) manual_in[f_idx[g]] = fs;
      end
      if (model == 2 && f_idx[0] >= 0 && frozen_t > 1250) any_stuck_high = 1;
      stuck_high_age = any_stuck_high ? 0 : stuck_high_age + 1;
      inflow_true_run = c_inflow ? inflow_true_run + 1 : 0;
      #1;
      // P1: spurious start
      if (sd && !sd_q && !demand() && !d_q1 && !d_q2) begin
        if (model == 3) spurious[3]++;
        else if (model == 1 || stuck_high_age > 2 * WIN) begin
          spurious[model]++;
          failures++;
          $display("FAIL model %0d: spurious start at step %0d", model, n);
        end
      end
      // P2, manual trip: every rise of the manual vote reaches the output at once
      // (a held manual trip gives one 3-step pulse by design)
      man_vote = (manual_in[0].value && !manual_in[0].fault) || (manual_in[1].value && !manual_in[1].fault);
      if (c_manual && !c_manual_q && !man_vote) begin
        failures++;
        $display("FAIL model %0d: manual demand not voted (step %0d)", model, n);
      end
      if (man_vote_q2 && !man_vote_q3) begin
        checks++;
        p2_manual[model]++;
        if (!(sd || sd_q || sd_q2)) begin
          failures++;
          $display("FAIL model %0d: manual trip without output (step %0d)", model, n);
        end
      end
      // P2, process criteria: a held demand is served within the window
      if (held_demand()) begin
        demand_run++;
        if (sd) seen_out = 1;
        if (demand_run == WIN) begin
          checks++;
          p2_windows[model]++;
          if (!seen_out) begin
            failures++;
            $display("FAIL model %0d: demand held %0d steps without output (step %0d)", model, WIN, n);
          end
          demand_run = 0; seen_out = 0;
        end
      end else begin
        demand_run = 0; seen_out = 0;
      end
      d_q2 = d_q1; d_q1 = demand(); sd_q2 = sd_q; sd_q = sd;
      man_vote_q3 = man_vote_q2; man_vote_q2 = man_vote_q1; man_vote_q1 = man_vote;
      c_manual_q = c_manual;
      checks++;
      @(negedge clk);
    end
    $display("model %0d: %0d demand windows served, %0d manual trips served, %0d spurious starts",
             model, p2_windows[model], p2_manual[model], spurious[model]);
  endtask

  initial begin
    for (int k = 0; k < 4; k++) temp_in[k] = '{value: temp_t'(900), fault: 1'b0};
    for (int k = 0; k < 2; k++) begin press_in[k] = '0; inflow_in[k] = '0; manual_in[k] = '0; end
    for (int m = 1; m <= 3; m++) begin spurious[m] = 0; p2_windows[m] = 0; p2_manual[m] = 0; end
    for (int m = 1; m <= 3; m++) run_model(m);
    checks++;
    if (spurious[3] == 0) begin failures++; $display("FAIL model 3 never tripped spuriously"); end
    for (int m = 1; m <= 3; m++) begin
      checks++;
      if (p2_windows[m] == 0) begin failures++; $display("FAIL model %0d: no demand window", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
