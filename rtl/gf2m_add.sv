// gf2m_add: addition in GF(2^M).
//
// In a binary field the sum of two elements is the bitwise XOR of their
// coefficient vectors, with no carries and no reduction. Combinational; the
// point multiplier uses it in the same cycle as the squarer. Both the XOR
// form and single-cycle operation follow the source design.
module gf2m_add #(
  parameter int unsigned M = 163
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] s
);
  always_comb s = a ^ b;
endmodule
