// pgdbf_decoder: fully parallel Probabilistic Gradient Descent Bit-Flipping
// (PGDBF) decoder for a regular (3,6) quasi-cyclic LDPC code on a binary
// symmetric channel, with a low-cost perturbation block.
//
// Every clock cycle is one decoding iteration: the N VN values feed the M
// check nodes through the interconnection block; each VN forms its energy
// E_n = (v_n XOR y_n) + sum of its DV CN values; the maximum finder returns
// Emax; and each VN whose energy equals Emax flips if its random bit R_n is 1.
// Decoding stops when every check is satisfied or after K_MAX iterations.
// The random bits come from a short band R' of S registers repeated over the
// N VNs and rotated by one place per iteration. R' is initialised either by
// IVRG (the complement of the first S CN values of each word, the default)
// or by a 32-bit LFSR with a threshold comparator, filled once after reset.
//
// Interface: when ready = 1, pulse start with the received word on y. done
// pulses iterations + 3 cycles later with IVRG (2 cycles if the received word
// is already a codeword) and iterations + 2 cycles later with LFSR; v_out
// then holds the decoded word, success tells whether it satisfies every
// check and iterations how many flipping iterations were used. They stay
// valid until the next start, which may come in the done cycle itself.
// Defaults are the target configuration: N = 1296, Z = 54, S = 4Z = 216,
// K = 300. The parity-check matrix (pgdbf_pkg), the extra FIRST cycle, the
// LFSR details and the handshake are this design's choices.
module pgdbf_decoder
  import pgdbf_pkg::*;
#(
  parameter int unsigned Z              = Z_DEF,
  parameter int unsigned N              = NB * Z,
  parameter int unsigned M              = MB * Z,
  parameter int unsigned S              = 4 * Z,
  parameter init_e       INIT           = INIT_IVRG,
  parameter int unsigned K_MAX          = 300,
  parameter int unsigned GDBF_ITERS     = 0,
  parameter logic [31:0] LFSR_THRESHOLD = 32'hCCCC_CCCD,  // P(1) ~ 0.8
  parameter logic [31:0] LFSR_SEED      = 32'h1D87_2B41,
  localparam int unsigned IW            = $clog2(K_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  y,           // received hard-decision word
  output logic          ready,
  output logic          done,
  output logic          success,
  output logic [IW-1:0] iterations,
  output logic [N-1:0]  v_out        // decoded word
);

  initial begin
    assert (INIT != INIT_IVRG || S <= M)
      else $fatal(1, "pgdbf_decoder: IVRG initialisation needs S <= M");
  end

  logic                 load, ivrg_load, lfsr_en, upd_en, rotate, force_ones;
  logic                 syndrome_zero;
  logic [M-1:0]         c;
  logic [N-1:0][DV-1:0] vn_checks;
  energy_t [N-1:0]      energy;
  energy_t              e_max;
  logic [N-1:0]         r;
  logic [S-1:0]         r_short;
  logic                 lfsr_bit;

  pgdbf_ctrl #(
    .INIT(INIT), .S(S), .K_MAX(K_MAX), .GDBF_ITERS(GDBF_ITERS)
  ) u_ctrl (
    .clk, .rst_n, .start, .syndrome_zero,
    .ready, .load, .ivrg_load, .lfsr_en, .upd_en, .rotate, .force_ones,
    .done, .success, .iterations
  );

  pgdbf_check_array #(.Z(Z), .N(N), .M(M)) u_checks (
    .v(v_out), .c, .vn_checks, .syndrome_zero
  );

  for (genvar n = 0; n < N; n++) begin : g_vn
    pgdbf_vn u_vn (
      .clk, .rst_n, .load, .y_in(y[n]), .upd_en,
      .checks(vn_checks[n]), .e_max, .r(r[n]),
      .energy(energy[n]), .v(v_out[n])
    );
  end

  pgdbf_max_finder #(.N(N)) u_mf (.energy, .e_max);

  if (INIT == INIT_LFSR) begin : g_lfsr
    logic [31:0] lfsr_state;
    pgdbf_lfsr #(.SEED(LFSR_SEED)) u_lfsr (
      .clk, .rst_n, .en(lfsr_en), .threshold(LFSR_THRESHOLD),
      .bit_out(lfsr_bit), .state(lfsr_state)
    );
  end else begin : g_no_lfsr
    assign lfsr_bit = 1'b0;
  end

  pgdbf_perturbation #(.S(S), .N(N)) u_pb (
    .clk, .rst_n, .ivrg_load, .cn_init(c[S-1:0]),
    .shift_en(lfsr_en), .lfsr_bit, .rotate, .force_ones,
    .r_short, .r
  );

endmodule
