// tb_pgdbf_ctrl: checks the control unit in both initialisation modes
// (IVRG and LFSR) with K_MAX = 6, GDBF_ITERS = 2 and S = 5. The testbench
// plays the role of the CN array: the syndrome becomes zero after a chosen
// number of flipping iterations (or never). Per word it checks the cycle
// count from start to done (one cycle more with IVRG, for its FIRST cycle), iterations, success, one IVRG load in the FIRST
// cycle, and force_ones exactly in the first GDBF_ITERS iterations; after
// reset it checks the S-cycle LFSR fill in LFSR mode.
module tb_pgdbf_ctrl;
  import pgdbf_pkg::*;
  localparam int K  = 6;
  localparam int G  = 2;
  localparam int S  = 5;
  localparam int IW = $clog2(K + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] syn, ready, load, ivrg_load, lfsr_en, upd_en, rotate, force_ones, done, success;
  logic [IW-1:0] iters [2];
  int checks = 0, failures = 0;
  int need;                 // flipping iterations until the syndrome clears
  int upd_cnt [2];
  int fill_cnt = 0;

  pgdbf_ctrl #(.INIT(INIT_IVRG), .S(S), .K_MAX(K), .GDBF_ITERS(G)) dut_ivrg (
    .clk, .rst_n, .start, .syndrome_zero(syn[0]), .ready(ready[0]), .load(load[0]),
    .ivrg_load(ivrg_load[0]), .lfsr_en(lfsr_en[0]), .upd_en(upd_en[0]), .rotate(rotate[0]),
    .force_ones(force_ones[0]), .done(done[0]), .success(success[0]), .iterations(iters[0]));
  pgdbf_ctrl #(.INIT(INIT_LFSR), .S(S), .K_MAX(K), .GDBF_ITERS(G)) dut_lfsr (
    .clk, .rst_n, .start, .syndrome_zero(syn[1]), .ready(ready[1]), .load(load[1]),
    .ivrg_load(ivrg_load[1]), .lfsr_en(lfsr_en[1]), .upd_en(upd_en[1]), .rotate(rotate[1]),
    .force_ones(force_ones[1]), .done(done[1]), .success(success[1]), .iterations(iters[1]));

  always #5 clk = ~clk;

  always_comb for (int i = 0; i < 2; i++) syn[i] = (upd_cnt[i] >= need);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    need = 0;
    upd_cnt[0] = 0; upd_cnt[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // LFSR fill after reset
    while (!ready[1]) begin
      @(negedge clk);
      if (lfsr_en[1]) fill_cnt++;
      check(!ready[1] || fill_cnt == S, "ready during LFSR fill");
      @(posedge clk);
    end
    check(fill_cnt == S, $sformatf("LFSR fill took %0d cycles", fill_cnt));
    check(ready[0] == 1 && lfsr_en[0] == 0, "IVRG controller not idle after reset");

    for (int w = 0; w < 40; w++) begin
      int cyc, n_ivrg [2], n_force [2], exp_it, exp_cyc [2];
      bit exp_ok, seen [2];
      need = (w % 10 == 9) ? 1000 : (w % 9);
      exp_ok  = (need <= K);
      exp_it  = exp_ok ? need : K;
      exp_cyc[0] = (exp_ok && need == 0) ? 2 : exp_it + 3;   // IVRG: extra FIRST cycle
      exp_cyc[1] = exp_it + 2;                               // LFSR
      @(negedge clk);
      upd_cnt[0] = 0; upd_cnt[1] = 0;
      start = 1;
      #1;
      check(load == 2'b11, "load not given with start");
      @(posedge clk); #1 start = 0;
      cyc = 0;
      n_ivrg = '{0, 0}; n_force = '{0, 0}; seen = '{0, 0};
      while (!(seen[0] && seen[1])) begin
        @(negedge clk);
        cyc++;
        for (int i = 0; i < 2; i++) begin
          if (ivrg_load[i]) begin
            n_ivrg[i]++;
            check(cyc == 1, "IVRG load outside the FIRST cycle");
          end
          if (upd_en[i]) begin
            check(rotate[i], "no rotation with an iteration");
            check(force_ones[i] == (upd_cnt[i] < G), $sformatf("force_ones at iteration %0d", upd_cnt[i] + 1));
            n_force[i] += force_ones[i];
          end
          check(lfsr_en[i] == 0, "LFSR shifted during decoding");
          if (done[i] && !seen[i]) begin
            seen[i] = 1;
            check(cyc == exp_cyc[i], $sformatf("word %0d mode %0d done after %0d cycles, expected %0d", w, i, cyc, exp_cyc[i]));
            check(ready[i], "not ready in the done cycle");
            check(success[i] == exp_ok, $sformatf("word %0d success", w));
            check(int'(iters[i]) == exp_it, $sformatf("word %0d iterations %0d expected %0d", w, iters[i], exp_it));
          end
        end
        begin
          bit [1:0] upd_seen;
          upd_seen = upd_en;
          @(posedge clk);
          #1;
          for (int i = 0; i < 2; i++) if (upd_seen[i]) upd_cnt[i]++;
        end
        if (cyc > 3 * K + 10) break;
      end
      check(seen[0] && seen[1], "done never came");
      check(n_ivrg[0] == 1 && n_ivrg[1] == 0, "IVRG load count");
      check(n_force[0] == (exp_it < G ? exp_it : G), "forced GDBF iteration count");
      @(negedge clk);
      check(ready == 2'b11, "not ready after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
