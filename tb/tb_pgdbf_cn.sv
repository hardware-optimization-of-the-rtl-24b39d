// tb_pgdbf_cn: exhaustive test of the check node. For every one of the 2^DC
// input patterns the output must equal the parity obtained by counting ones.
module tb_pgdbf_cn;
  localparam int DC = 6;
  logic [DC-1:0] v_in;
  logic          c_out;
  int checks = 0, failures = 0;

  pgdbf_cn #(.DC(DC)) dut (.v_in, .c_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < (1 << DC); p++) begin
      int ones;
      v_in = DC'(p);
      #1;
      ones = 0;
      for (int b = 0; b < DC; b++) ones += (p >> b) & 1;
      checks++;
      if (c_out !== 1'(ones % 2)) begin
        failures++;
        $display("FAIL pattern %b: got %b", v_in, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
