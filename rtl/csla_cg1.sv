// csla_cg1: carry generator for an input carry of 1 (CG1).
//
// Computes the full-carry word c11 that the adder would produce if its carry
// input were 1: c11(i) = c11(i-1).s0(i) + c0(i), with the carry entering bit 0
// fixed at 1. With that fixed input, bit 0 reduces to c11(0) = s0(0) + c0(0)
// (that is A(0) or B(0)); the remaining bits form the same one-AND-OR-per-bit
// ripple chain as CG0.
//
// Interface: s0, c0 (N bits) from the HSG unit in; c11 (N bits) out. Bit i is
// the carry out of bit position i. Purely combinational; delay linear in N.
module csla_cg1 #(
  parameter int unsigned N = csla_pkg::CSLA_WIDTH
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c11
);
  // Bit 0 has the fixed input carry folded in; each higher bit is one
  // AND-OR stage of the ripple chain.
  assign c11[0] = s0[0] | c0[0];

  for (genvar i = 1; i < N; i++) begin : g_chain
    assign c11[i] = (c11[i-1] & s0[i]) | c0[i];
  end
endmodule
