// tb_csla_hsg: self-checking testbench for the half-sum generation unit.
//
// Drives directed corner operands and random operands and compares s0 and c0
// with the half-adder truth table evaluated bit by bit. Combinational block:
// each vector is applied, then checked 1 time unit later. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_csla_hsg;
  localparam int unsigned N = csla_pkg::CSLA_WIDTH;
  localparam int NRAND = 5000;

  logic [N-1:0] a, b, s0, c0;
  int checks = 0, failures = 0;

  csla_hsg dut (.a(a), .b(b), .s0(s0), .c0(c0));

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb);
    logic es, ec;
    a = va; b = vb;
    #1;
    for (int i = 0; i < N; i++) begin
      // half adder: sum is 1 for exactly one input high, carry for both high
      es = (int'(va[i]) + int'(vb[i])) == 1;
      ec = (int'(va[i]) + int'(vb[i])) == 2;
      checks++;
      if (s0[i] !== es || c0[i] !== ec) begin
        failures++;
        if (failures < 10) $display("FAIL bit %0d a=%h b=%h s0=%h c0=%h", i, va, vb, s0, c0);
      end
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('0, '1);
    apply('1, '1);
    apply({N/2{2'b01}}, {N/2{2'b10}});
    apply({N/2{2'b01}}, {N/2{2'b11}});
    for (int k = 0; k < NRAND; k++) apply(N'({$urandom, $urandom}), N'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
