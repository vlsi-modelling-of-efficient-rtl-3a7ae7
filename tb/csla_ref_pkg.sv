// csla_ref_pkg: reference arithmetic for the carry select adder testbenches.
//
// The values here come from plain integer addition, not from the adder's
// equations: the carry out of bit i is bit i+1 of the sum of the operands'
// low i+1 bits plus the carry input. Widths up to 63 bits are supported.
package csla_ref_pkg;
  // Carry word of a + b + cin over n bits: bit i is the carry out of bit i.
  function automatic logic [63:0] ref_carries(input logic [63:0] a, input logic [63:0] b,
                                              input logic cin, input int n);
    logic [63:0] r;
    logic [64:0] m;
    logic [64:0] t;
    r = '0;
    for (int i = 0; i < n; i++) begin
      m = (65'd1 << (i + 1)) - 65'd1;
      t = ({1'b0, a} & m) + ({1'b0, b} & m) + {64'd0, cin};
      r[i] = t[i+1];
    end
    return r;
  endfunction

  // {cout, sum} of a + b + cin over n bits, returned in the low n+1 bits.
  function automatic logic [64:0] ref_add(input logic [63:0] a, input logic [63:0] b,
                                          input logic cin, input int n);
    logic [64:0] m;
    m = (65'd1 << n) - 65'd1;
    return (({1'b0, a} & m) + ({1'b0, b} & m) + {64'd0, cin}) & ((m << 1) | 65'd1);
  endfunction
endpackage
