// csla_hsg: half-sum generation (HSG) unit of the carry select adder.
//
// Forms, for every bit position i, the half-sum s0(i) = A(i) xor B(i) and the
// half-carry c0(i) = A(i) and B(i). This is the only place the operands are
// read: both carry generators and the final-sum stage share these two words,
// which is what removes the duplicated half-adder logic of a conventional
// carry select adder built from two ripple carry adders.
//
// Interface: a, b (N bits) in; s0, c0 (N bits) out. Purely combinational,
// one gate level deep.
module csla_hsg #(
  parameter int unsigned N = csla_pkg::CSLA_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s0,
  output logic [N-1:0] c0
);
  always_comb begin
    s0 = a ^ b;
    c0 = a & b;
  end
endmodule
