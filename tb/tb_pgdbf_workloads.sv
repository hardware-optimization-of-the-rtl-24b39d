// tb_pgdbf_workloads: the evaluated decoder configurations at full code size
// (N = 1296, Z = 54, K = 300), side by side:
//   0: LFSR initialisation, S = 4Z  = 216   (LFSR-PGDBF of the comparison)
//   1: IVRG initialisation, S = Z   = 54    (smallest band)
//   2: IVRG initialisation, S = 12Z = 648   (largest band IVRG allows, S = M)
//   3: LFSR initialisation, S = 24Z = 1296  (one register per VN)
//   4: IVRG, S = 4Z, first 10 iterations plain GDBF (throughput variant)
// All five decode the same words (all-zero or all-one codeword through a
// binary symmetric channel with crossover 0.01 and 0.014). Each result is
// compared bit for bit with the reference model, including the latency, and
// the mean iteration count per configuration is printed.
module tb_pgdbf_workloads;
  import pgdbf_pkg::*;
  import pgdbf_ref_pkg::*;
  localparam int Z  = 54;
  localparam int N  = 24 * Z;
  localparam int NI = 5;
  localparam int          SS [NI]   = '{4 * Z, Z, 12 * Z, 24 * Z, 4 * Z};
  localparam bit          LF [NI]   = '{1, 0, 0, 1, 0};
  localparam int          GI [NI]   = '{0, 0, 0, 0, 10};
  localparam logic [31:0] TH        = 32'hCCCC_CCCD;
  localparam logic [31:0] SEED      = 32'h1D87_2B41;
  localparam int WORDS = 12;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] y = '0;
  logic [NI-1:0] ready, done, success;
  logic [N-1:0] v_out [NI];
  logic [8:0]   iters [NI];
  int checks = 0, failures = 0;
  int cyc = 0;

  for (genvar i = 0; i < NI; i++) begin : g_dut
    pgdbf_decoder #(.Z(Z), .S(SS[i]), .INIT(LF[i] ? INIT_LFSR : INIT_IVRG), .K_MAX(300),
                    .GDBF_ITERS(GI[i]), .LFSR_THRESHOLD(TH), .LFSR_SEED(SEED)) dut (
      .clk, .rst_n, .start, .y, .ready(ready[i]), .done(done[i]), .success(success[i]),
      .iterations(iters[i]), .v_out(v_out[i]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  initial begin
    pgdbf_ref mdl [NI];
    int sum_it [NI], n_ok [NI];
    for (int i = 0; i < NI; i++) begin
      mdl[i] = new(Z, SS[i], 300, GI[i], LF[i], SEED, TH);
      sum_it[i] = 0;
      n_ok[i] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < WORDS; w++) begin
      bit yb [];
      bit cw;
      int t_start, t_done [NI];
      real a;
      a  = (w < WORDS / 2) ? 0.01 : 0.014;
      cw = w[0];
      yb = new[N];
      for (int n = 0; n < N; n++) begin
        yb[n] = cw ^ (real'($urandom_range(0, 999999)) < a * 1.0e6);
        y[n]  = yb[n];
      end
      @(negedge clk);
      while (ready != '1) @(negedge clk);
      start = 1;
      @(posedge clk);
      t_start = cyc;
      #1 start = 0;
      for (int i = 0; i < NI; i++) t_done[i] = -1;
      while (1) begin
        bit all;
        @(posedge clk);
        #1;
        all = 1;
        for (int i = 0; i < NI; i++) begin
          if (done[i] && t_done[i] < 0) t_done[i] = cyc - t_start;
          if (t_done[i] < 0) all = 0;
        end
        if (all) break;
      end
      for (int i = 0; i < NI; i++) begin
        int exp_cyc, mism;
        mdl[i].decode(yb);
        if (LF[i]) exp_cyc = mdl[i].iters + 2;
        else       exp_cyc = (mdl[i].ok && mdl[i].iters == 0) ? 2 : mdl[i].iters + 3;
        check(success[i] == mdl[i].ok, $sformatf("w%0d cfg%0d success", w, i));
        check(int'(iters[i]) == int'(mdl[i].iters), $sformatf("w%0d cfg%0d iterations %0d expected %0d", w, i, iters[i], mdl[i].iters));
        check(t_done[i] == exp_cyc, $sformatf("w%0d cfg%0d %0d cycles, expected %0d", w, i, t_done[i], exp_cyc));
        mism = 0;
        for (int n = 0; n < N; n++) mism += (v_out[i][n] != mdl[i].v[n]);
        check(mism == 0, $sformatf("w%0d cfg%0d %0d bits differ from the model", w, i, mism));
        if (success[i]) begin
          mism = 0;
          for (int n = 0; n < N; n++) mism += (v_out[i][n] != cw);
          n_ok[i] += (mism == 0);
        end
        sum_it[i] += int'(iters[i]);
      end
    end
    for (int i = 0; i < NI; i++) begin
      $display("configuration %0d (S = %0d, %s, GDBF iterations %0d): %0d of %0d words recovered, mean iterations %.2f",
               i, SS[i], LF[i] ? "LFSR" : "IVRG", GI[i], n_ok[i], WORDS, real'(sum_it[i]) / real'(WORDS));
      check(n_ok[i] > 0, $sformatf("configuration %0d recovered no word", i));
    end
    check(mdl[4].n_forced > 0, "no forced GDBF iteration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
