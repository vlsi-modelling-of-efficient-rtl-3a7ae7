// csla_cs: carry selection (CS) unit of the carry select adder.
//
// Chooses the final carry word c from the two anticipated carry words before
// any sum bit is formed: c = c01 when cin is 0 and c = c11 when cin is 1; the
// adder's carry output is c(n-1).
//
// The two carry words always follow a fixed bit pattern: a carry that occurs
// with input carry 0 also occurs with input carry 1, so wherever c01(i) is 1,
// c11(i) is 1 as well. The select therefore needs no full multiplexer per bit:
// c(i) = c01(i) + cin.c11(i), one AND-OR per bit. This reduction is this
// design's reading of the optimized CS unit; it is exact for every pair of
// words that CG0 and CG1 can produce, and a deferred assertion flags any
// input pair that breaks the pattern.
//
// Interface: c01, c11 (N bits) and cin in; c (N bits) and cout out. Purely
// combinational, one AND-OR deep.
module csla_cs #(
  parameter int unsigned N = csla_pkg::CSLA_WIDTH
) (
  input  logic [N-1:0] c01,
  input  logic [N-1:0] c11,
  input  logic         cin,
  output logic [N-1:0] c,
  output logic         cout
);
  always_comb begin
    c    = c01 | (c11 & {N{cin}});
    cout = c[N-1];
  end

  // Carry words from CG0/CG1 never have c01(i)=1 with c11(i)=0.
  always_comb begin
    assert #0 ((c01 & ~c11) == '0)
      else $error("csla_cs: carry words break the c01 <= c11 pattern");
  end
endmodule
