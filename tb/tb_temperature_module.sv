// tb_temperature_module -- check of the 2-out-of-4 over-temperature criterion.
// Expected trip: at least two fault-free measurements strictly above 125.0 C
// (1250). Random values are drawn close to the limit so both outcomes occur.
module tb_temperature_module;
  import ssd_pkg::*;
  import ssd_ref_pkg::*;

  ana_sig_t meas [4];
  temp_t    smax;
  logic     trip;
  int checks = 0, failures = 0, n_trip = 0;

  temperature_module dut (.meas(meas), .second_max(smax), .trip(trip));

  task automatic check();
    logic exp;
    #1;
    exp = ref_temp_trip(meas, temp_t'(1250));
    checks++;
    n_trip += exp ? 1 : 0;
    if (trip !== exp) begin
      failures++;
      $display("FAIL trip=%b exp=%b v=%0d/%0d/%0d/%0d f=%b%b%b%b", trip, exp,
               meas[0].value, meas[1].value, meas[2].value, meas[3].value,
               meas[0].fault, meas[1].fault, meas[2].fault, meas[3].fault);
    end
  endtask

  initial begin
    // exactly at the limit does not trip; one above the limit in two inputs does
    for (int i = 0; i < 4; i++) meas[i] = '{value: temp_t'(1250), fault: 1'b0};
    check();
    meas[0].value = 1251; check();
    meas[3].value = 1251; check();
    meas[3].fault = 1'b1; check();   // faulty input ignored: no trip
    repeat (3000) begin
      for (int i = 0; i < 4; i++) begin
        meas[i].value = temp_t'($urandom_range(1240, 1260));
        meas[i].fault = ($urandom_range(0, 4) == 0);
      end
      check();
    end
    if (n_trip == 0) begin failures++; $display("FAIL no trip case seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
