// tb_vote_1oo2 -- exhaustive check of the 1-out-of-2 vote with fault status.
// All 16 combinations of value and fault for both redundancies are applied and
// the output is compared with an independently written truth table.
module tb_vote_1oo2;
  import ssd_pkg::*;

  bin_sig_t a, b;
  logic     y;
  int checks = 0, failures = 0;

  vote_1oo2 dut (.a(a), .b(b), .y(y));

  initial begin
    for (int k = 0; k < 16; k++) begin
      logic exp;
      {a.value, a.fault, b.value, b.fault} = 4'(k);
      #1;
      // usable = value 1 and fault 0; any usable signal trips
      exp = (a == '{value: 1'b1, fault: 1'b0}) || (b == '{value: 1'b1, fault: 1'b0});
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b exp=%b", a, b, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
