// pgdbf_perturbation: perturbation block (PB) that produces the N random bits
// R^(k) of each decoding iteration from a short register band R' of S bits.
//
// How it works:
//   * Hard connection network F_g: VN n receives bit R'[n mod S], i.e. R' is
//     repeated floor(N/S) times followed by its first N mod S bits.
//   * Cyclic shift F_c: after each iteration (rotate = 1) the band moves one
//     place, R'[(i+1) mod S] <= R'[i], so every VN sees a new bit next time.
//   * Initialisation, two methods:
//       IVRG  (ivrg_load = 1): R'[i] <= NOT c_i, the complement of CN i at the
//             first iteration, one CN per register (needs S <= M);
//       LFSR  (shift_en = 1): the band shifts one place and takes the serial
//             bit lfsr_bit into R'[0], so S cycles fill it; this reuses the
//             same register chain as the cyclic shift.
//   * force_ones makes every R_n equal to 1, so the VNs flip as in plain
//     GDBF; the decoder uses it for its first iterations if so configured.
// All of this follows the described PB; the priority ivrg_load > shift_en >
// rotate, the reset value 0 and the CN-to-register pairing i -> i are this
// design's choices. Outputs are combinational from the band register.
module pgdbf_perturbation
  import pgdbf_pkg::*;
#(
  parameter int unsigned S = 4 * Z_DEF,   // length of R'
  parameter int unsigned N = NB * Z_DEF   // number of VNs
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ivrg_load,  // load R' with the complemented CN values
  input  logic [S-1:0]  cn_init,    // CN values 0..S-1 of the first iteration
  input  logic          shift_en,   // shift in one LFSR bit
  input  logic          lfsr_bit,
  input  logic          rotate,     // cyclic shift after an iteration
  input  logic          force_ones, // GDBF behaviour: all R_n = 1
  output logic [S-1:0]  r_short,    // R' (for observation)
  output logic [N-1:0]  r           // R^(k), one bit per VN
);

  initial begin
    assert (S >= 2 && S <= N) else $fatal(1, "pgdbf_perturbation: need 2 <= S <= N");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          r_short <= '0;
    else if (ivrg_load)  r_short <= ~cn_init;
    else if (shift_en)   r_short <= {r_short[S-2:0], lfsr_bit};
    else if (rotate)     r_short <= {r_short[S-2:0], r_short[S-1]};
  end

  for (genvar n = 0; n < N; n++) begin : g_fg
    assign r[n] = r_short[n % S] | force_ones;
  end

endmodule
