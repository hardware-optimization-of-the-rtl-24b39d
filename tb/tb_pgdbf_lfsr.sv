// tb_pgdbf_lfsr: checks the LFSR bit source. The model keeps the register as
// 32 separate bits and applies the recurrence s[t+32] = s[t] ^ s[t+10] ^
// s[t+30] ^ s[t+31] of x^32 + x^22 + x^2 + x + 1; state and output bit are
// compared every cycle, with random enable gaps. It also checks that the
// share of ones follows the threshold (0.8 and 0.25, within 2 %).
module tb_pgdbf_lfsr;
  localparam logic [31:0] SEED = 32'h1D87_2B41;
  logic        clk = 0, rst_n = 0, en = 0, bit_out;
  logic [31:0] threshold = 32'hCCCC_CCCD, state;
  int checks = 0, failures = 0;

  pgdbf_lfsr #(.SEED(SEED)) dut (.clk, .rst_n, .en, .threshold, .bit_out, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sb[32];  // sb[0] = oldest bit (state[31]) ... sb[31] = newest (state[0])
    for (int i = 0; i < 32; i++) sb[i] = SEED[31 - i];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      int ones, samples;
      real share, want;
      ones = 0;
      samples = 0;
      threshold = (pass == 0) ? 32'hCCCC_CCCD : 32'h4000_0000;
      want      = (pass == 0) ? 0.8 : 0.25;
      while (samples < 40000) begin
        logic [31:0] m_state;
        @(negedge clk);
        en = ($urandom_range(0, 4) != 0);
        for (int i = 0; i < 32; i++) m_state[31 - i] = sb[i];
        #1;
        checks++;
        if (state !== m_state || bit_out !== (m_state < threshold)) begin
          failures++;
          if (failures < 10) $display("FAIL state %h expected %h", state, m_state);
        end
        if (en) begin
          bit nb;
          nb = sb[0] ^ sb[10] ^ sb[30] ^ sb[31];
          for (int i = 0; i < 31; i++) sb[i] = sb[i+1];
          sb[31] = nb;
          ones += bit_out;
          samples++;
        end
      end
      share = real'(ones) / real'(samples);
      checks++;
      if (share < want - 0.02 || share > want + 0.02) begin
        failures++;
        $display("FAIL share of ones %f, expected %f", share, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
