// pgdbf_lfsr: pseudo-random bit source used to initialise R' (LFSR-PGDBF).
//
// A 32-bit Fibonacci LFSR with the maximal-length polynomial
// x^32 + x^22 + x^2 + x + 1 steps once per enabled cycle; its 32-bit state is
// read as an unsigned integer and compared with a threshold, giving
// bit_out = (state < threshold). The probability of a 1 is therefore about
// threshold / 2^32, so the threshold sets the weight of the random sequence.
// The 32-bit width and the threshold comparison follow the described
// generator; the polynomial, the seed and the "less than" sense are this
// design's choices. bit_out is combinational from the state; the state
// advances on every clock edge with en = 1. Reset loads SEED (must be non-zero).
module pgdbf_lfsr #(
  parameter logic [31:0] SEED = 32'h1D87_2B41
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,         // advance the LFSR by one step
  input  logic [31:0] threshold,  // P(bit_out = 1) ~ threshold / 2^32
  output logic        bit_out,
  output logic [31:0] state
);

  initial begin
    assert (SEED != '0) else $fatal(1, "pgdbf_lfsr: SEED must be non-zero");
  end

  logic feedback;
  assign feedback = state[31] ^ state[21] ^ state[1] ^ state[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[30:0], feedback};
  end

  assign bit_out = state < threshold;

endmodule
