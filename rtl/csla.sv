// csla: carry select adder with the redundant logic removed (top level).
//
// Adds two N-bit operands and a carry input: {cout, s} = a + b + cin.
// A conventional carry select adder runs two full ripple carry adders, one
// for each value of the input carry, and multiplexes their sums. Both copies
// compute the same half-sum and half-carry words, so here that work is done
// once, and the sum is formed once, after the carry has been selected:
//
//   HSG  : s0 = a ^ b, c0 = a & b                       (shared)
//   CG0  : carry word c01 for input carry 0              (ripple AND-OR chain)
//   CG1  : carry word c11 for input carry 1              (ripple AND-OR chain)
//   CS   : c = cin ? c11 : c01, cout = c(N-1)            (select carries first)
//   FSG  : s(i) = s0(i) ^ c(i-1), s(0) = s0(0) ^ cin     (one XOR row)
//
// The unit split and the equations follow the published proposal; the
// default width of 32 bits and the AND-OR form of the select are this design's
// choices. Interface: a, b (N bits), cin in; s (N bits), cout out. Purely
// combinational, no clock; the critical path is the CG ripple chain plus one
// select and one XOR level, from cin it is only the select and the XOR.
module csla #(
  parameter int unsigned N = csla_pkg::CSLA_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] s0, c0;    // half-sum and half-carry words
  logic [N-1:0] c01, c11;  // anticipated carry words for cin = 0 / 1
  logic [N-1:0] c;         // selected carry word

  csla_hsg #(.N(N)) u_hsg (.a(a), .b(b), .s0(s0), .c0(c0));
  csla_cg0 #(.N(N)) u_cg0 (.s0(s0), .c0(c0), .c01(c01));
  csla_cg1 #(.N(N)) u_cg1 (.s0(s0), .c0(c0), .c11(c11));
  csla_cs  #(.N(N)) u_cs  (.c01(c01), .c11(c11), .cin(cin), .c(c), .cout(cout));
  csla_fsg #(.N(N)) u_fsg (.s0(s0), .c(c), .cin(cin), .s(s));
endmodule
