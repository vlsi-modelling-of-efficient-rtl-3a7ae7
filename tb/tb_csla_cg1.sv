// tb_csla_cg1: self-checking testbench for the carry generator CG1.
//
// Forms the half-sum and half-carry words from operand pairs (directed corner
// cases, then random ones), drives them into CG1 and compares its carry word
// with the carries of integer addition a + b + 1, bit by bit. Combinational
// block: each vector is checked 1 time unit after it is applied. A watchdog
// ends the run with a failure if it does not finish in time.
module tb_csla_cg1;
  import csla_ref_pkg::*;
  localparam int unsigned N = csla_pkg::CSLA_WIDTH;
  localparam int NRAND = 5000;

  logic [N-1:0] s0, c0, c11;
  int checks = 0, failures = 0;
  int full_chain = 0;

  csla_cg1 dut (.s0(s0), .c0(c0), .c11(c11));

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb);
    logic [63:0] exp_c;
    s0 = va ^ vb;
    c0 = va & vb;
    #1;
    exp_c = ref_carries(64'(va), 64'(vb), 1'b1, N);
    checks++;
    if (c11 !== exp_c[N-1:0]) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h c11=%h expected=%h", va, vb, c11, exp_c[N-1:0]);
    end
    if (exp_c[N-1:0] == '1) full_chain++;
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('0, '1);
    apply('1, '1);
    apply('1, N'(1));
    apply({1'b0, {(N-1){1'b1}}}, N'(1));
    for (int k = 0; k < N; k++) apply('1 ^ (N'(1) << k), N'(1));
    for (int k = 0; k < N; k++) apply(N'(1) << k, N'(1) << k);
    for (int k = 0; k < NRAND; k++) apply(N'({$urandom, $urandom}), N'({$urandom, $urandom}));
    // the directed cases must have carried through every bit at least once
    checks++;
    if (full_chain == 0) failures++;
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
