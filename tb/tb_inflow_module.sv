// tb_inflow_module -- high-inflow criterion: 1-out-of-2 vote with fault status
// followed by a 5-step switch-on delay (strobe every clock). Random switch
// values with occasional faults are compared with the reference model.
module tb_inflow_module;
  import ssd_pkg::*;
  import ssd_ref_pkg::*;
  localparam int D = 5;
  logic clk = 0, rst_n = 0;
  bin_sig_t sw [2];
  logic voted, trip;
  int checks = 0, failures = 0, n_trip = 0;
  int hold = 0;

  inflow_module #(.INFLOW_DELAY_TICKS(D)) dut (.clk(clk), .rst_n(rst_n), .tick(1'b1),
                                              .sw(sw), .voted(voted), .trip(trip));

  always #5 clk = ~clk;

  initial begin
    sw[0] = '0; sw[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      logic ev, et;
      // long runs: switch values change rarely
      if ($urandom_range(0, 7) == 0) sw[0].value = ~sw[0].value;
      if ($urandom_range(0, 7) == 0) sw[1].value = ~sw[1].value;
      sw[0].fault = ($urandom_range(0, 15) == 0);
      sw[1].fault = ($urandom_range(0, 15) == 0);
      #1;
      ev = ref_1oo2(sw[0], sw[1]);
      et = ev && hold >= D;
      checks += 2;
      if (voted !== ev) begin failures++; $display("FAIL k=%0d voted=%b exp=%b", k, voted, ev); end
      if (trip !== et)  begin failures++; $display("FAIL k=%0d trip=%b exp=%b", k, trip, et); end
      n_trip += et ? 1 : 0;
      hold = ev ? hold + 1 : 0;
      @(negedge clk);
    end
    if (n_trip == 0) begin failures++; $display("FAIL never tripped"); end
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
