// csla_cg0: carry generator for an input carry of 0 (CG0).
//
// Computes the full-carry word c01 that the adder would produce if its carry
// input were 0: c01(i) = c01(i-1).s0(i) + c0(i), with the carry entering bit 0
// fixed at 0. With that fixed input, bit 0 reduces to c01(0) = c0(0), so the
// first stage needs no gate at all; the remaining bits form a ripple chain of
// one AND-OR per bit driven only by the half-sum and half-carry words.
//
// Interface: s0, c0 (N bits) from the HSG unit in; c01 (N bits) out. Bit i is
// the carry out of bit position i; s0(0) is not read, since with a zero input
// carry bit 0 can only carry when it generates. Purely combinational; the delay grows
// linearly with N (one AND-OR per bit).
module csla_cg0 #(
  parameter int unsigned N = csla_pkg::CSLA_WIDTH
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c01
);
  // Bit 0 has the fixed input carry folded in; each higher bit is one
  // AND-OR stage of the ripple chain.
  assign c01[0] = c0[0];

  for (genvar i = 1; i < N; i++) begin : g_chain
    assign c01[i] = (c01[i-1] & s0[i]) | c0[i];
  end
endmodule
