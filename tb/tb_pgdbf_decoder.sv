// tb_pgdbf_decoder: end-to-end test of the decoder at Z = 12 (N = 288,
// M = 144, S = 4Z = 48) in three configurations side by side:
//   0: IVRG initialisation, K = 300                (main configuration)
//   1: LFSR initialisation, K = 300
//   2: IVRG initialisation, K = 20, first 3 iterations plain GDBF
// Words are the all-zero or all-one codeword sent through a binary symmetric
// channel with crossover 0 .. 0.12. Every result (decoded word, success,
// iteration count, cycles from start to done) is compared with the
// bit-exact reference model of pgdbf_ref_pkg; a word reported as decoded
// must satisfy every check. Heavily corrupted words of this short code may
// converge to a different codeword; those are counted and reported. Each mechanism must occur at least once: a word
// that is already a codeword, decoding after iterations, stopping at K, the
// IVRG load, the LFSR fill, forced GDBF iterations, a maximum-energy VN held
// back by a 0 random bit, and rotation of R' (two or more iterations).
module tb_pgdbf_decoder;
  import pgdbf_pkg::*;
  import pgdbf_ref_pkg::*;
  localparam int Z = 12;
  localparam int N = 24 * Z;
  localparam int S = 4 * Z;
  localparam logic [31:0] TH   = 32'hCCCC_CCCD;
  localparam logic [31:0] SEED = 32'h1D87_2B41;
  localparam int NI = 3;
  localparam int K [NI] = '{300, 300, 20};
  localparam int G [NI] = '{0, 0, 3};

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] y = '0;
  logic [NI-1:0] ready, done, success;
  logic [N-1:0]  v_out [NI];
  logic [8:0] it0, it1;
  logic [4:0] it2;
  int checks = 0, failures = 0;
  int cyc = 0;

  pgdbf_decoder #(.Z(Z), .S(S), .INIT(INIT_IVRG), .K_MAX(K[0]), .GDBF_ITERS(G[0])) dut0 (
    .clk, .rst_n, .start, .y, .ready(ready[0]), .done(done[0]), .success(success[0]),
    .iterations(it0), .v_out(v_out[0]));
  pgdbf_decoder #(.Z(Z), .S(S), .INIT(INIT_LFSR), .K_MAX(K[1]), .GDBF_ITERS(G[1]),
                  .LFSR_THRESHOLD(TH), .LFSR_SEED(SEED)) dut1 (
    .clk, .rst_n, .start, .y, .ready(ready[1]), .done(done[1]), .success(success[1]),
    .iterations(it1), .v_out(v_out[1]));
  pgdbf_decoder #(.Z(Z), .S(S), .INIT(INIT_IVRG), .K_MAX(K[2]), .GDBF_ITERS(G[2])) dut2 (
    .clk, .rst_n, .start, .y, .ready(ready[2]), .done(done[2]), .success(success[2]),
    .iterations(it2), .v_out(v_out[2]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %s", what); end
  endtask

  function automatic int iters_of(int i);
    return (i == 0) ? int'(it0) : (i == 1) ? int'(it1) : int'(it2);
  endfunction

  initial begin
    pgdbf_ref mdl [NI];
    int n_cw = 0, n_dec = 0, n_kstop = 0, n_ivrg = 0, n_fill = 0, n_rot = 0;
    int n_ok [NI];
    int n_other = 0;
    real alphas [6] = '{0.0, 0.01, 0.03, 0.05, 0.08, 0.12};
    for (int i = 0; i < NI; i++) begin
      mdl[i] = new(Z, S, K[i], G[i], i == 1, SEED, TH);
      n_ok[i] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    begin
      int t0;
      t0 = cyc;
      while (!ready[1]) @(posedge clk);
      check(cyc - t0 == S, $sformatf("LFSR fill took %0d cycles", cyc - t0));
      n_fill++;
    end

    for (int w = 0; w < 60; w++) begin
      bit yb [];
      bit cw;
      int t_start, t_done [NI];
      real a;
      a  = alphas[w % 6];
      cw = (w % 4 == 3);
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
      t_done = '{-1, -1, -1};
      while (t_done[0] < 0 || t_done[1] < 0 || t_done[2] < 0) begin
        @(posedge clk);
        #1;
        for (int i = 0; i < NI; i++) if (done[i] && t_done[i] < 0) t_done[i] = cyc - t_start;
      end
      for (int i = 0; i < NI; i++) begin
        int exp_cyc, mism;
        mdl[i].decode(yb);
        if (i == 1) exp_cyc = mdl[i].iters + 2;   // LFSR: no FIRST cycle
        else        exp_cyc = (mdl[i].ok && mdl[i].iters == 0) ? 2 : mdl[i].iters + 3;
        check(success[i] == mdl[i].ok, $sformatf("w%0d dut%0d success %0d expected %0d", w, i, success[i], mdl[i].ok));
        check(iters_of(i) == int'(mdl[i].iters), $sformatf("w%0d dut%0d iterations %0d expected %0d", w, i, iters_of(i), mdl[i].iters));
        check(t_done[i] == exp_cyc, $sformatf("w%0d dut%0d %0d cycles, expected %0d", w, i, t_done[i], exp_cyc));
        mism = 0;
        for (int n = 0; n < N; n++) mism += (v_out[i][n] != mdl[i].v[n]);
        check(mism == 0, $sformatf("w%0d dut%0d %0d bits differ from the model", w, i, mism));
        if (success[i]) begin
          bit c_hw [];
          int unsat;
          // the decoded word must satisfy every check (model's own matrix)
          c_hw = new[12 * Z];
          foreach (mdl[i].v[n]) mdl[i].v[n] = v_out[i][n];
          mdl[i].checks(c_hw);
          unsat = 0;
          foreach (c_hw[m]) unsat += c_hw[m];
          check(unsat == 0, $sformatf("w%0d dut%0d reports success with %0d unsatisfied checks", w, i, unsat));
          mism = 0;
          for (int n = 0; n < N; n++) mism += (v_out[i][n] != cw);
          if (mism == 0) n_ok[i]++;
          else n_other++;
        end
        if (mdl[i].ok && mdl[i].iters == 0) n_cw++;
        if (mdl[i].ok && mdl[i].iters > 0) n_dec++;
        if (!mdl[i].ok) n_kstop++;
        if (mdl[i].iters >= 2) n_rot++;
        if (i != 1) n_ivrg++;
      end
    end
    $display("words already codewords %0d, decoded after iterations %0d, stopped at K %0d",
             n_cw, n_dec, n_kstop);
    $display("IVRG loads %0d, LFSR fills %0d, words with R' rotation %0d", n_ivrg, n_fill, n_rot);
    $display("forced GDBF iterations %0d, VNs held back by R = 0: %0d / %0d / %0d",
             mdl[2].n_forced, mdl[0].n_blocked, mdl[1].n_blocked, mdl[2].n_blocked);
    $display("words decoded to the sent codeword per configuration: %0d %0d %0d; to another codeword: %0d",
             n_ok[0], n_ok[1], n_ok[2], n_other);
    check(n_ok[0] > 0 && n_ok[1] > 0 && n_ok[2] > 0, "a configuration never recovered the sent word");
    check(n_cw > 0, "no word was already a codeword");
    check(n_dec > 0, "no word decoded after iterations");
    check(n_kstop > 0, "K was never reached");
    check(n_ivrg > 0 && n_fill > 0, "an initialisation method never ran");
    check(n_rot > 0, "R' never rotated");
    check(mdl[2].n_forced > 0, "no forced GDBF iteration");
    check(mdl[0].n_blocked > 0 && mdl[1].n_blocked > 0, "random bit never held a flip back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
