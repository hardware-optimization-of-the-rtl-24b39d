// tb_pgdbf_max_finder: compares Emax with a plain maximum over N = 300
// random energies (0..DV+1), including vectors whose maximum is each level
// 0..4 and vectors where a single VN holds the maximum.
module tb_pgdbf_max_finder;
  import pgdbf_pkg::*;
  localparam int N = 300;
  energy_t [N-1:0] energy;
  energy_t         e_max;
  int checks = 0, failures = 0;

  pgdbf_max_finder #(.N(N)) dut (.energy, .e_max);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int top, ref_max;
      top = t % 5;                       // largest level allowed in this vector
      for (int n = 0; n < N; n++) energy[n] = energy_t'($urandom_range(0, top));
      if (t % 3 == 0) begin              // single VN at the maximum
        for (int n = 0; n < N; n++) if (energy[n] == energy_t'(top)) energy[n] = energy_t'(top > 0 ? top - 1 : 0);
        energy[$urandom_range(0, N - 1)] = energy_t'(top);
      end
      #1;
      ref_max = 0;
      for (int n = 0; n < N; n++) if (int'(energy[n]) > ref_max) ref_max = int'(energy[n]);
      checks++;
      if (int'(e_max) != ref_max) begin
        failures++;
        $display("FAIL t=%0d e_max=%0d expected %0d", t, e_max, ref_max);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
