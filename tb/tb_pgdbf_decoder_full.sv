// tb_pgdbf_decoder_full: the decoder at its default size (N = 1296, M = 648,
// Z = 54, S = 4Z = 216, IVRG initialisation, K = 300) decoding words of the
// all-zero and all-one codewords sent through a binary symmetric channel
// with crossover 0.005, 0.01, 0.012 and 0.014 (the noise levels at which the
// decoders are compared). Each result is compared bit for bit with the
// reference model, the latency must be iterations + 3 cycles (one iteration
// per clock), and words the model decodes must come back as the sent word.
// Every second word is started in the done cycle of the previous one.
module tb_pgdbf_decoder_full;
  import pgdbf_pkg::*;
  import pgdbf_ref_pkg::*;
  localparam int Z = 54;
  localparam int N = 24 * Z;
  localparam int S = 4 * Z;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] y = '0, v_out;
  logic ready, done, success;
  logic [8:0] iterations;
  int checks = 0, failures = 0;
  int cyc = 0;

  pgdbf_decoder dut (.clk, .rst_n, .start, .y, .ready, .done, .success, .iterations, .v_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  initial begin
    pgdbf_ref mdl;
    real alphas [4] = '{0.005, 0.01, 0.012, 0.014};
    int n_sent_ok, n_iter_sum;
    n_sent_ok = 0;
    n_iter_sum = 0;
    mdl = new(Z, S, 300, 0, 0, 32'h1, 32'h0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < 16; w++) begin
      bit yb [];
      bit cw;
      int t_start, t_done, exp_cyc, mism, nerr;
      cw = w[0];
      yb = new[N];
      nerr = 0;
      for (int n = 0; n < N; n++) begin
        bit e;
        e = real'($urandom_range(0, 999999)) < alphas[w / 4] * 1.0e6;
        nerr += e;
        yb[n] = cw ^ e;
        y[n]  = yb[n];
      end
      if (w % 2 == 0 || !done) begin
        @(negedge clk);
        while (!ready) @(negedge clk);
      end else begin
        check(ready, "not ready in the done cycle");
      end
      start = 1;
      @(posedge clk);
      t_start = cyc;
      #1 start = 0;
      while (!done) begin
        @(posedge clk);
        #1;
      end
      t_done = cyc - t_start;
      mdl.decode(yb);
      exp_cyc = (mdl.ok && mdl.iters == 0) ? 2 : mdl.iters + 3;
      check(success == mdl.ok, $sformatf("w%0d success %0d expected %0d", w, success, mdl.ok));
      check(int'(iterations) == int'(mdl.iters), $sformatf("w%0d iterations %0d expected %0d", w, iterations, mdl.iters));
      check(t_done == exp_cyc, $sformatf("w%0d %0d cycles, expected %0d", w, t_done, exp_cyc));
      mism = 0;
      for (int n = 0; n < N; n++) mism += (v_out[n] != mdl.v[n]);
      check(mism == 0, $sformatf("w%0d %0d bits differ from the model", w, mism));
      if (mdl.ok) begin
        mism = 0;
        for (int n = 0; n < N; n++) mism += (v_out[n] != cw);
        check(mism == 0, $sformatf("w%0d decoded to another codeword", w));
        n_sent_ok += (mism == 0);
      end
      n_iter_sum += int'(iterations);
      $display("word %0d: alpha %.3f, %0d channel errors, success %0d after %0d iterations",
               w, alphas[w / 4], nerr, success, iterations);
    end
    $display("words recovered %0d of 16, mean iterations %.2f", n_sent_ok, real'(n_iter_sum) / 16.0);
    check(n_sent_ok > 0, "no word recovered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
