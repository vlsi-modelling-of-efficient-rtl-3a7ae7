// csla_fsg: final-sum generation (FSG) unit of the carry select adder.
//
// Forms the sum from the half-sum word and the already selected carry word:
// s(0) = s0(0) xor cin and s(i) = s0(i) xor c(i-1) for i > 0. Because the
// carry is selected before this stage, one XOR row serves both values of the
// input carry; no second sum word and no sum multiplexer exist.
//
// Interface: s0, c (N bits) and cin in; s (N bits) out. Purely combinational,
// one gate level deep. c(N-1) is not read here: it leaves the adder as cout.
module csla_fsg #(
  parameter int unsigned N = csla_pkg::CSLA_WIDTH
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N-1:0] s
);
  // Carry into each bit position: cin for bit 0, c(i-1) above it.
  assign s[0] = s0[0] ^ cin;

  for (genvar i = 1; i < N; i++) begin : g_sum
    assign s[i] = s0[i] ^ c[i-1];
  end
endmodule
