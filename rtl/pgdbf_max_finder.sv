// pgdbf_max_finder: maximum finder (MF) over the N VN energies.
//
// Leading-zero counting topology: since an energy can only take the E_LVLS
// values 0..DV+1, every energy is decoded into a one-hot level vector and the
// N vectors are OR-reduced into one "level present" vector. The index of its
// most significant 1, found by counting its leading zeros, is Emax. This keeps
// the path to a wide OR plus a small priority encoder instead of a tree of
// N-1 comparators. The decoder names this topology for its MF; the exact
// circuit here is this design's own. Purely combinational.
module pgdbf_max_finder
  import pgdbf_pkg::*;
#(
  parameter int unsigned N = NB * Z_DEF
) (
  input  energy_t [N-1:0] energy,  // E_n of every VN
  output energy_t         e_max    // max over n of E_n
);

  logic [E_LVLS-1:0] present;
  logic [E_W-1:0]    lzc;          // leading zeros of present

  always_comb begin
    present = '0;
    for (int unsigned n = 0; n < N; n++) begin
      present |= E_LVLS'(1) << energy[n];   // one-hot level of VN n
    end
  end

  // Leading-zero count from the top level downwards.
  always_comb begin
    lzc = E_W'(E_LVLS - 1);
    for (int lv = 0; lv < E_LVLS; lv++) begin
      if (present[lv]) lzc = E_W'(E_LVLS - 1 - lv);
    end
  end

  assign e_max = energy_t'(E_LVLS - 1) - lzc;

endmodule
