// pgdbf_check_array: interconnection block and the array of M check nodes.
//
// The interconnection block is the fixed wiring given by the parity-check
// matrix of pgdbf_pkg: edge d of CN m reads VN vn_of_cn(m, d), and edge l of
// VN n reads CN cn_of_vn(n, l). Each CN is a pgdbf_cn (DC-input XOR). The
// block also reduces the CN values to syndrome_zero, which tells the
// controller that every parity check holds and decoding can stop.
// Purely combinational: the CN values of iteration k follow the VN registers
// within the same clock cycle. N = NB*Z VNs, M = MB*Z CNs.
module pgdbf_check_array
  import pgdbf_pkg::*;
#(
  parameter int unsigned Z = Z_DEF,
  parameter int unsigned N = NB * Z,
  parameter int unsigned M = MB * Z
) (
  input  logic [N-1:0]          v,             // current VN values
  output logic [M-1:0]          c,             // CN values (1 = unsatisfied)
  output logic [N-1:0][DV-1:0]  vn_checks,     // the DV CN values seen by each VN
  output logic                  syndrome_zero  // all CNs satisfied
);

  for (genvar m = 0; m < M; m++) begin : g_cn
    logic [DC-1:0] cn_in;
    for (genvar d = 0; d < DC; d++) begin : g_edge
      assign cn_in[d] = v[vn_of_cn(m, d, Z)];
    end
    pgdbf_cn #(.DC(DC)) u_cn (.v_in(cn_in), .c_out(c[m]));
  end

  for (genvar n = 0; n < N; n++) begin : g_vn
    for (genvar l = 0; l < DV; l++) begin : g_edge
      assign vn_checks[n][l] = c[cn_of_vn(n, l, Z)];
    end
  end

  assign syndrome_zero = ~|c;

endmodule
