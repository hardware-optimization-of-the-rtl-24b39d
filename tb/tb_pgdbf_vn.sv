// tb_pgdbf_vn: random test of one variable node against a small model.
// Each cycle it drives random load, channel bit, update enable, CN values,
// Emax and random bit; it checks the combinational energy before the clock
// edge and the stored value after it.
module tb_pgdbf_vn;
  import pgdbf_pkg::*;
  logic          clk = 0, rst_n = 0;
  logic          load = 0, y_in = 0, upd_en = 0, r = 0;
  logic [DV-1:0] chk = '0;
  energy_t       e_max = '0, energy;
  logic          v;
  int checks = 0, failures = 0;
  bit m_v, m_y;
  int flips = 0;

  pgdbf_vn dut (.clk, .rst_n, .load, .y_in, .upd_en, .checks(chk), .e_max, .r, .energy, .v);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_v = 0; m_y = 0;
    for (int t = 0; t < 5000; t++) begin
      int exp_e;
      @(negedge clk);
      load   = ($urandom_range(0, 15) == 0);
      y_in   = 1'($urandom);
      upd_en = ($urandom_range(0, 3) != 0);
      chk    = DV'($urandom);
      r      = 1'($urandom);
      exp_e  = int'(m_v ^ m_y) + int'(chk[0]) + int'(chk[1]) + int'(chk[2]);
      // Emax is usually the VN's own energy, so that flips happen often
      e_max  = ($urandom_range(0, 1) == 0) ? energy_t'(exp_e) : energy_t'($urandom_range(0, 4));
      #1;
      checks++;
      if (energy !== energy_t'(exp_e)) begin
        failures++;
        $display("FAIL t=%0d energy %0d expected %0d", t, energy, exp_e);
      end
      if (load) begin
        m_v = y_in; m_y = y_in;
      end else if (upd_en && r && e_max == energy_t'(exp_e)) begin
        m_v = !m_v; flips++;
      end
      @(posedge clk); #1;
      checks++;
      if (v !== m_v) begin
        failures++;
        $display("FAIL t=%0d v=%b expected %b", t, v, m_v);
      end
    end
    checks++;
    if (flips < 100) begin failures++; $display("FAIL only %0d flips", flips); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
