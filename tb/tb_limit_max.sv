// tb_limit_max -- boundary and random check of the maximum-limit monitor at its
// default limit (1250 = 125.0 C) and at an overridden limit.
module tb_limit_max;
  import ssd_pkg::*;

  temp_t v;
  logic  over_d, over_o;
  int checks = 0, failures = 0;

  limit_max            dut_d (.value(v), .over(over_d));
  limit_max #(.LIMIT(temp_t'(300))) dut_o (.value(v), .over(over_o));

  task automatic check(temp_t x);
    v = x; #1;
    checks += 2;
    if (over_d !== (int'(x) > 1250)) begin failures++; $display("FAIL default v=%0d over=%b", x, over_d); end
    if (over_o !== (int'(x) > 300))  begin failures++; $display("FAIL 300 v=%0d over=%b", x, over_o); end
  endtask

  initial begin
    check(0); check(1249); check(1250); check(1251); check(299); check(300); check(301);
    check('1);
    repeat (500) check(temp_t'($urandom_range(0, 3000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
