// pgdbf_cn: one check node (CN) of the PGDBF decoder.
//
// The CN value is the parity of its DC neighbouring VN values (c = XOR of all
// inputs), as in the decoder's check equation: 0 means the check is satisfied.
// Purely combinational; DC = 6 is the check degree of the target code.
module pgdbf_cn #(
  parameter int unsigned DC = 6
) (
  input  logic [DC-1:0] v_in,  // values of the neighbouring VNs
  output logic          c_out  // 1 = parity check unsatisfied
);
  always_comb c_out = ^v_in;
endmodule
