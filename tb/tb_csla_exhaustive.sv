// tb_csla_exhaustive: exhaustive check of the carry select adder at small
// widths.
//
// Instantiates the adder at widths 1, 2, 5 and 8 bits and applies every
// combination of a, b and cin to each, comparing {cout, s} with integer
// addition (2^17 vectors at 8 bits). This covers the width edge cases of the
// generate loops (a one-bit adder has no ripple stage at all). Combinational:
// each vector is checked 1 time unit after it is applied. A watchdog ends a
// stuck run with a failure.
module tb_csla_exhaustive;
  logic [7:0] a8, b8, s8;
  logic [4:0] a5, b5, s5;
  logic [1:0] a2, b2, s2;
  logic       a1, b1, s1;
  logic       cin, co8, co5, co2, co1;
  int checks = 0, failures = 0;

  csla #(.N(8)) dut8 (.a(a8), .b(b8), .cin(cin), .s(s8), .cout(co8));
  csla #(.N(5)) dut5 (.a(a5), .b(b5), .cin(cin), .s(s5), .cout(co5));
  csla #(.N(2)) dut2 (.a(a2), .b(b2), .cin(cin), .s(s2), .cout(co2));
  csla #(.N(1)) dut1 (.a(a1), .b(b1), .cin(cin), .s(s1), .cout(co1));

  task automatic check(input int width, input int got, input int exp_v, input int va,
                       input int vb, input int vc);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d a=%0d b=%0d cin=%0d got %0d expected %0d",
                                  width, va, vb, vc, got, exp_v);
    end
  endtask

  initial begin
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        for (int ic = 0; ic < 2; ic++) begin
          a8 = 8'(ia); b8 = 8'(ib); cin = 1'(ic);
          a5 = 5'(ia); b5 = 5'(ib);
          a2 = 2'(ia); b2 = 2'(ib);
          a1 = 1'(ia); b1 = 1'(ib);
          #1;
          check(8, int'({co8, s8}), ia + ib + ic, ia, ib, ic);
          if (ia < 32 && ib < 32) check(5, int'({co5, s5}), ia + ib + ic, ia, ib, ic);
          if (ia < 4 && ib < 4)   check(2, int'({co2, s2}), ia + ib + ic, ia, ib, ic);
          if (ia < 2 && ib < 2)   check(1, int'({co1, s1}), ia + ib + ic, ia, ib, ic);
        end
      end
    end
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
