// tb_second_max4 -- random and directed check of the second-maximum selector.
// The expected value is found by sorting the fault-masked inputs in descending
// order; n_valid is checked against a count of fault-free inputs. Directed
// cases cover ties, all faulty and a single valid measurement.
module tb_second_max4;
  import ssd_pkg::*;

  ana_sig_t   meas [4];
  temp_t      smax;
  logic [2:0] n_valid;
  int checks = 0, failures = 0;

  second_max4 dut (.meas(meas), .second_max(smax), .n_valid(n_valid));

  task automatic check();
    int s [4];
    int nv = 0, t;
    for (int i = 0; i < 4; i++) begin
      s[i] = meas[i].fault ? 0 : int'(meas[i].value);
      nv += meas[i].fault ? 0 : 1;
    end
    // bubble sort, descending
    for (int p = 0; p < 3; p++)
      for (int i = 0; i < 3 - p; i++)
        if (s[i] < s[i+1]) begin t = s[i]; s[i] = s[i+1]; s[i+1] = t; end
    #1;
    checks += 2;
    if (int'(smax) != s[1]) begin
      failures++;
      $display("FAIL smax=%0d exp=%0d", smax, s[1]);
    end
    if (int'(n_valid) != nv) begin
      failures++;
      $display("FAIL n_valid=%0d exp=%0d", n_valid, nv);
    end
  endtask

  task automatic set(int v0, int v1, int v2, int v3, logic [3:0] f);
    meas[0] = '{value: temp_t'(v0), fault: f[0]};
    meas[1] = '{value: temp_t'(v1), fault: f[1]};
    meas[2] = '{value: temp_t'(v2), fault: f[2]};
    meas[3] = '{value: temp_t'(v3), fault: f[3]};
  endtask

  initial begin
    set(100, 200, 300, 400, 4'b0000); check();   // 300
    set(400, 300, 200, 100, 4'b0000); check();
    set(500, 500, 10, 20, 4'b0000);   check();   // tie at top: 500
    set(500, 500, 10, 20, 4'b0001);   check();   // 20
    set(900, 800, 700, 600, 4'b1111); check();   // all faulty: 0
    set(900, 800, 700, 600, 4'b1110); check();   // single valid: 0
    set(1300, 1300, 1300, 1300, 4'b0000); check();
    repeat (2000) begin
      for (int i = 0; i < 4; i++) begin
        meas[i].value = temp_t'($urandom_range(0, 2000));
        meas[i].fault = ($urandom_range(0, 3) == 0);
      end
      if ($urandom_range(0, 4) == 0) meas[$urandom_range(0, 3)].value = meas[$urandom_range(0, 3)].value;
      check();
    end
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
