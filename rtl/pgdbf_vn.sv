// pgdbf_vn: one variable node (VN) of the PGDBF decoder.
//
// Holds two 1-bit registers: the channel bit y and the current value v.
// Combinationally it forms the energy E = (v XOR y) + sum of its DV CN values
// and sends it to the maximum finder. It flips v (v <= v XOR 1) when E equals
// the maximum energy Emax and its random bit r is 1, so the register is
// updated once per clock cycle: one decoding iteration per cycle. This is the
// structure of the decoder's VN (two registers, XOR, adder, equality compare,
// AND with the random bit, XOR flip).
// Interface: load (one cycle) copies y_in into both registers; upd_en enables
// the flip in that cycle. Reset clears both registers (a choice of this design).
module pgdbf_vn
  import pgdbf_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,      // take a new channel bit
  input  logic          y_in,      // channel (BSC output) bit
  input  logic          upd_en,    // this cycle is a decoding iteration
  input  logic [DV-1:0] checks,    // values of the DV neighbouring CNs
  input  energy_t       e_max,     // maximum energy over all VNs
  input  logic          r,         // random bit R_n of this iteration
  output energy_t       energy,    // E_n
  output logic          v          // current hard decision
);

  logic y_q;
  logic differs;   // current value differs from the channel bit
  logic flip;

  always_comb begin
    differs = v ^ y_q;
    energy  = energy_t'(differs);
    for (int unsigned l = 0; l < DV; l++) energy += energy_t'(checks[l]);
    flip = (energy == e_max) & r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q <= 1'b0;
      v   <= 1'b0;
    end else if (load) begin
      y_q <= y_in;
      v   <= y_in;
    end else if (upd_en) begin
      v   <= v ^ flip;
    end
  end

endmodule
