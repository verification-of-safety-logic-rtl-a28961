// tb_stepwise_shutdown -- end-to-end test of the stepwise shutdown logic.
//
// Both wirings are instantiated side by side on the same field signals, with a
// 1 s time step made of 2 clocks (so 3 s = 3 steps, 15 s = 15, 5 s = 5) to keep
// the run short; all other parameters are at their defaults. Every step, the
// shutdown output and all status outputs are compared with the reference
// model. Directed scenarios make each mechanism happen, then a long random
// phase with faults follows. Mechanisms counted (each must occur):
//   temp_2oo4     temperature trip by two measurements over 125 C
//   temp_1oo4     one measurement over the limit does not trip
//   all_faulty    four faulty temperatures over the limit do not trip
//   press         over-pressure trip
//   fault_mask    a faulty binary input at 1 is ignored
//   inflow_short  inflow shorter than 5 s is filtered
//   inflow_trip   inflow held 5 s trips
//   manual        manual trip reaches the output
//   repeat        a held criterion gives a new control pulse after the pause
//   bypass_b      wiring B: manual pulse drives the output during the pause
//   hasten_a      wiring A: manual trip cuts the pause short
//   freeze_a      wiring A: output frozen at 0 while a criterion holds
module tb_stepwise_shutdown;
  import ssd_pkg::*;
  import ssd_ref_pkg::*;

  localparam int unsigned CPT = 2;
  localparam int unsigned S = 3, L = 15, D = 5;
  localparam int NMECH = 12;
  localparam string MNAME [NMECH] = '{"temp_2oo4", "temp_1oo4", "all_faulty", "press",
      "fault_mask", "inflow_short", "inflow_trip", "manual", "repeat", "bypass_b",
      "hasten_a", "freeze_a"};
  typedef enum int {M_T2, M_T1, M_AF, M_PR, M_FM, M_IS, M_IT, M_MN, M_RP, M_BY, M_HA, M_FR} mech_e;

  logic clk = 0, rst_n = 0;
  ana_sig_t temp_in [4];
  bin_sig_t press_in [2], inflow_in [2], manual_in [2];

  // outputs, wiring B
  logic  sd_b, tick_b, tt_b, tp_b, iv_b, ti_b, tm_b, any_b, ctl_b, long_b, man_b;
  temp_t smax_b;
  // outputs, wiring A
  logic  sd_a, tick_a, tt_a, tp_a, iv_a, ti_a, tm_a, any_a, ctl_a, long_a, man_a;
  temp_t smax_a;

  stepwise_shutdown #(.VARIANT(VARIANT_B), .CLK_PER_TICK(CPT), .TICK_MS(1000)) dut_b (
    .clk(clk), .rst_n(rst_n), .temp_in(temp_in), .press_in(press_in),
    .inflow_in(inflow_in), .manual_in(manual_in), .shutdown(sd_b), .tick(tick_b),
    .temp_second_max(smax_b), .trip_temp(tt_b), .trip_press(tp_b), .inflow_voted(iv_b),
    .trip_inflow(ti_b), .trip_manual(tm_b), .any_trip(any_b), .ctl_pulse(ctl_b),
    .long_pulse(long_b), .manual_pulse(man_b));

  stepwise_shutdown #(.VARIANT(VARIANT_A), .CLK_PER_TICK(CPT), .TICK_MS(1000)) dut_a (
    .clk(clk), .rst_n(rst_n), .temp_in(temp_in), .press_in(press_in),
    .inflow_in(inflow_in), .manual_in(manual_in), .shutdown(sd_a), .tick(tick_a),
    .temp_second_max(smax_a), .trip_temp(tt_a), .trip_press(tp_a), .inflow_voted(iv_a),
    .trip_inflow(ti_a), .trip_manual(tm_a), .any_trip(any_a), .ctl_pulse(ctl_a),
    .long_pulse(long_a), .manual_pulse(man_a));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, step_no = 0;
  int mech [NMECH];
  ssd_ref mb, ma;
  bit  any_b_run = 0; int ctl_b_starts_in_run = 0; bit ctl_b_q = 0;
  int  frozen_a = 0; bit tm_q = 0;

  task automatic cmp(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL step %0d %s=%b exp=%b", step_no, what, got, exp);
    end
  endtask

  // Compare one design with its model for the current step.
  task automatic check_one(string v, ssd_ref m, logic sd, logic tt, logic tp, logic iv,
                           logic ti, logic tm, logic any, logic ctl, logic lng, logic man);
    bit et, ep, ev, em;
    et = ref_temp_trip(temp_in, temp_t'(1250));
    ep = ref_1oo2(press_in[0], press_in[1]);
    ev = ref_1oo2(inflow_in[0], inflow_in[1]);
    em = ref_1oo2(manual_in[0], manual_in[1]);
    m.eval(et, ep, ev, em);
    cmp({v, ".trip_temp"}, tt, et);
    cmp({v, ".trip_press"}, tp, ep);
    cmp({v, ".inflow_voted"}, iv, ev);
    cmp({v, ".trip_inflow"}, ti, m.trip_inflow);
    cmp({v, ".trip_manual"}, tm, em);
    cmp({v, ".any_trip"}, any, m.any_trip);
    cmp({v, ".ctl_pulse"}, ctl, m.ctl);
    cmp({v, ".long_pulse"}, lng, m.long_p);
    cmp({v, ".manual_pulse"}, man, m.man_p);
    cmp({v, ".shutdown"}, sd, m.shutdown);
    m.step(et, ep, ev, em);
  endtask

  // Observe mechanisms (on the design outputs, which were just checked).
  task automatic observe();
    int n_over = 0, n_over_valid = 0, n_fault_over = 0;
    for (int k = 0; k < 4; k++) begin
      if (temp_in[k].value > 1250) n_over++;
      if (temp_in[k].value > 1250 && !temp_in[k].fault) n_over_valid++;
      if (temp_in[k].value > 1250 && temp_in[k].fault) n_fault_over++;
    end
    if (tt_b && n_over_valid == 2) mech[M_T2]++;
    if (!tt_b && n_over_valid == 1 && n_over == 1) mech[M_T1]++;
    if (!tt_b && n_fault_over == 4) mech[M_AF]++;
    if (tp_b) mech[M_PR]++;
    if (!tp_b && ((press_in[0].value && press_in[0].fault) || (press_in[1].value && press_in[1].fault)))
      mech[M_FM]++;
    if (ti_b) mech[M_IT]++;
    if (tm_b && sd_b) mech[M_MN]++;
    if (man_b && long_b && !ctl_b) mech[M_BY]++;
    if (tm_a && !tm_q && long_a) mech[M_HA]++;
    tm_q = tm_a;
    // repeat: a second control pulse while a criterion other than manual holds
    if (!(tt_b || tp_b || ti_b)) begin any_b_run = 0; ctl_b_starts_in_run = 0; end
    else if (!any_b_run) any_b_run = 1;
    if (any_b_run && ctl_b && !ctl_b_q) begin
      ctl_b_starts_in_run++;
      if (ctl_b_starts_in_run >= 2) mech[M_RP]++;
    end
    ctl_b_q = ctl_b;
    // freeze: criterion held, no pulse running, none coming, long pulse idle
    if (any_a && !ctl_a && !long_a) frozen_a++; else frozen_a = 0;
    if (frozen_a == 2 * L) mech[M_FR]++;
  endtask

  int inflow_run = 0;
  // One time step with the current inputs.
  task automatic one_step();
    while (!tick_b) @(negedge clk);
    cmp("tick_a", tick_a, 1'b1);
    check_one("B", mb, sd_b, tt_b, tp_b, iv_b, ti_b, tm_b, any_b, ctl_b, long_b, man_b);
    check_one("A", ma, sd_a, tt_a, tp_a, iv_a, ti_a, tm_a, any_a, ctl_a, long_a, man_a);
    cmp("smax_b", smax_b == smax_a, 1'b1);
    observe();
    // inflow shorter than the delay, filtered
    if (iv_b) inflow_run++;
    else begin
      if (inflow_run > 0 && inflow_run < D) mech[M_IS]++;
      inflow_run = 0;
    end
    @(negedge clk);
    step_no++;
  endtask

  task automatic steps(int n);
    repeat (n) one_step();
  endtask

  task automatic clear_inputs();
    for (int k = 0; k < 4; k++) temp_in[k] = '{value: temp_t'(900), fault: 1'b0};
    for (int k = 0; k < 2; k++) begin
      press_in[k] = '0; inflow_in[k] = '0; manual_in[k] = '0;
    end
  endtask

  initial begin
    mb = new(1'b1, S, L, D);
    ma = new(1'b0, S, L, D);
    foreach (mech[k]) mech[k] = 0;
    clear_inputs();
    repeat (3) @(negedge clk);
    rst_n = 1;
    steps(5);
    // temperature: one measurement over the limit, then two
    temp_in[2].value = 1300; steps(10);
    temp_in[0].value = 1400; steps(45);
    clear_inputs(); steps(25);
    // all four faulty and over the limit
    for (int k = 0; k < 4; k++) temp_in[k] = '{value: temp_t'(1500), fault: 1'b1};
    steps(10);
    clear_inputs(); steps(5);
    // over-pressure: faulty signal ignored, healthy one trips
    press_in[0] = '{value: 1'b1, fault: 1'b1}; steps(8);
    press_in[1] = '{value: 1'b1, fault: 1'b0}; steps(10);
    clear_inputs(); steps(25);
    // inflow: short bursts, then held
    repeat (3) begin inflow_in[1].value = 1; steps(3); inflow_in[1].value = 0; steps(2); end
    inflow_in[0].value = 1; steps(30);
    clear_inputs(); steps(25);
    // manual trip in the pause of a pressure trip
    press_in[0].value = 1; steps(8);
    manual_in[1].value = 1; steps(3);
    manual_in[1].value = 0; steps(20);
    clear_inputs(); steps(25);
    // manual trip during the control pulse, pressure held
    press_in[1].value = 1; steps(2);
    manual_in[0].value = 1; steps(4 * L);
    clear_inputs(); steps(25);
    // random phase
    repeat (4000) begin
      if ($urandom_range(0, 9) == 0) begin
        int k = $urandom_range(0, 3);
        temp_in[k].value = temp_t'($urandom_range(1200, 1300));
      end
      if ($urandom_range(0, 19) == 0) temp_in[$urandom_range(0, 3)].fault ^= 1'b1;
      if ($urandom_range(0, 14) == 0) press_in[$urandom_range(0, 1)].value ^= 1'b1;
      if ($urandom_range(0, 29) == 0) press_in[$urandom_range(0, 1)].fault ^= 1'b1;
      if ($urandom_range(0, 7) == 0)  inflow_in[$urandom_range(0, 1)].value ^= 1'b1;
      if ($urandom_range(0, 29) == 0) inflow_in[$urandom_range(0, 1)].fault ^= 1'b1;
      if ($urandom_range(0, 19) == 0) manual_in[$urandom_range(0, 1)].value ^= 1'b1;
      if ($urandom_range(0, 29) == 0) manual_in[$urandom_range(0, 1)].fault ^= 1'b1;
      one_step();
    end
    for (int k = 0; k < NMECH; k++) begin
      $display("mechanism %-13s happened %0d times", MNAME[k], mech[k]);
      checks++;
      if (mech[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", MNAME[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
