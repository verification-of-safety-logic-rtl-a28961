// second_max4 -- the "2nd maximum" selector of the reactor temperature channel.
//
// Four temperature measurements (two per redundancy) enter; the output is the
// second largest of them. Comparing that value with a limit trips when at least
// two measurements exceed the limit, i.e. a 2-out-of-4 vote on analogue values.
// Selection and voting follow the source logic. How a faulty measurement is
// handled is this design's own choice: its value is replaced by 0 so it can
// never help to trip, and with all four faulty the output is 0, the default
// value the platform gives a measurement whose signals are all faulty.
//
// Each input is ranked by how many others are larger (ties broken by index);
// the input of rank 1 is the second maximum. Purely combinational.
module second_max4
  import ssd_pkg::*;
(
  input  ana_sig_t  meas [4],   // 111, 112, 211, 212
  output temp_t     second_max,
  output logic [2:0] n_valid    // number of measurements without fault
);

  temp_t v [4];

  always_comb begin
    for (int i = 0; i < 4; i++) v[i] = meas[i].fault ? '0 : meas[i].value;
  end

  always_comb begin
    int unsigned rank;
    second_max = '0;
    for (int i = 0; i < 4; i++) begin
      rank = 0;
      for (int j = 0; j < 4; j++) begin
        if (j != i && (v[j] > v[i] || (v[j] == v[i] && j < i))) rank++;
      end
      if (rank == 1) second_max = v[i];
    end
  end

  always_comb begin
    n_valid = '0;
    for (int i = 0; i < 4; i++) n_valid += {2'b00, !meas[i].fault};
  end

endmodule
