// tb_pgdbf_perturbation: drives the perturbation block with S = 10, N = 27
// (so the hard connection network repeats R' 2.7 times) through IVRG loads,
// serial shift-in, rotations and forced-one cycles, and compares R' and all
// N outputs with a model array every cycle.
module tb_pgdbf_perturbation;
  localparam int S = 10;
  localparam int N = 27;
  logic         clk = 0, rst_n = 0;
  logic         ivrg_load = 0, shift_en = 0, lfsr_bit = 0, rotate = 0, force_ones = 0;
  logic [S-1:0] cn_init = '0, r_short;
  logic [N-1:0] r;
  int checks = 0, failures = 0;
  bit m[S];
  int n_load = 0, n_shift = 0, n_rot = 0;

  pgdbf_perturbation #(.S(S), .N(N)) dut (
    .clk, .rst_n, .ivrg_load, .cn_init, .shift_en, .lfsr_bit, .rotate, .force_ones, .r_short, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int t);
    for (int i = 0; i < S; i++) begin
      checks++;
      if (r_short[i] !== m[i]) begin failures++; $display("FAIL t=%0d R'[%0d]", t, i); end
    end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (r[n] !== (m[n % S] | force_ones)) begin failures++; $display("FAIL t=%0d R[%0d]", t, n); end
    end
  endtask

  initial begin
    foreach (m[i]) m[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int op;
      @(negedge clk);
      op = $urandom_range(0, 9);
      ivrg_load  = (op == 0);
      shift_en   = (op == 1 || op == 2);
      rotate     = (op >= 3 && op <= 7) || (op == 2 && $urandom_range(0, 1) == 1);
      force_ones = ($urandom_range(0, 7) == 0);
      cn_init    = S'($urandom);
      lfsr_bit   = 1'($urandom);
      #1;
      compare(t);
      if (ivrg_load) begin
        for (int i = 0; i < S; i++) m[i] = !cn_init[i];
        n_load++;
      end else if (shift_en) begin
        for (int i = S - 1; i > 0; i--) m[i] = m[i-1];
        m[0] = lfsr_bit;
        n_shift++;
      end else if (rotate) begin
        bit last;
        last = m[S-1];
        for (int i = S - 1; i > 0; i--) m[i] = m[i-1];
        m[0] = last;
        n_rot++;
      end
    end
    checks++;
    if (n_load == 0 || n_shift == 0 || n_rot == 0) begin failures++; $display("FAIL missing operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
