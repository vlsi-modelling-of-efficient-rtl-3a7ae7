// tb_csla: end-to-end self-checking testbench for the carry select adder at
// its default width.
//
// Applies directed corner cases and random operand pairs with both carry
// inputs and compares {cout, s} with integer addition. It also watches the
// adder's internal words and counts how often each mechanism of the design
// was exercised: a select with cin = 0 and with cin = 1 where the two
// anticipated carry words differ (so the choice matters), a carry out, a carry
// rippling through every bit of the generator chain, and a carry select that
// alone flips the sum (same operands, different cin, different sum). Any
// mechanism never seen counts as a failure. The adder is combinational: each
// vector is checked 1 time unit after it is applied. A watchdog ends a stuck
// run with a failure.
module tb_csla;
  import csla_ref_pkg::*;
  localparam int unsigned N = csla_pkg::CSLA_WIDTH;
  localparam int NRAND = 20000;

  logic [N-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_sel0 = 0, n_sel1 = 0, n_cout = 0, n_full_ripple = 0, n_cin_flip = 0;

  csla dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vcin);
    logic [64:0] e;
    e = ref_add(64'(va), 64'(vb), vcin, N);
    a = va; b = vb; cin = vcin;
    #1;
    checks++;
    if ({cout, s} !== e[N:0]) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b got %b_%h expected %b_%h",
                                  va, vb, vcin, cout, s, e[N], e[N-1:0]);
    end
    if (dut.c01 != dut.c11) begin
      if (vcin) n_sel1++;
      else      n_sel0++;
    end
    if (cout) n_cout++;
    if ((vcin ? dut.c11 : dut.c01) == '1 && dut.c0 == '0) n_full_ripple++;
  endtask

  // both carry inputs on one operand pair; counts pairs whose sums differ
  task automatic apply_pair(input logic [N-1:0] va, input logic [N-1:0] vb);
    logic [N-1:0] s_first;
    apply(va, vb, 1'b0);
    s_first = s;
    apply(va, vb, 1'b1);
    if (s != s_first) n_cin_flip++;
  endtask

  task automatic expect_seen(input string what, input int n);
    checks++;
    $display("mechanism %-28s seen %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", what);
    end
  endtask

  initial begin
    apply_pair('0, '0);
    apply_pair('1, '0);
    apply_pair('0, '1);
    apply_pair('1, '1);
    apply_pair('1, N'(1));
    apply_pair({N/2{2'b01}}, {N/2{2'b10}});
    apply_pair({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});
    for (int k = 0; k < N; k++) apply_pair(N'(1) << k, '1);
    for (int k = 0; k < NRAND; k++) begin
      apply_pair(N'({$urandom, $urandom}), N'({$urandom, $urandom}));
    end
    expect_seen("select cin=0 (words differ)", n_sel0);
    expect_seen("select cin=1 (words differ)", n_sel1);
    expect_seen("carry out", n_cout);
    expect_seen("full-length carry ripple", n_full_ripple);
    expect_seen("sum changed by cin alone", n_cin_flip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
