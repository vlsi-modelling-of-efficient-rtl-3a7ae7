// tb_csla_cs: self-checking testbench for the carry selection unit.
//
// Feeds the unit the two carry words that integer addition gives for input
// carry 0 and 1 (the only word pairs the carry generators can produce), with
// both values of cin, and checks that c equals the carry word of a + b + cin
// and that cout is its top bit. Vectors where the two words differ are counted
// so that the select is shown to matter. Combinational: each vector is checked
// 1 time unit after it is applied. A watchdog ends a stuck run with a failure.
module tb_csla_cs;
  import csla_ref_pkg::*;
  localparam int unsigned N = csla_pkg::CSLA_WIDTH;
  localparam int NRAND = 5000;

  logic [N-1:0] c01, c11, c;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int differ = 0;

  csla_cs dut (.c01(c01), .c11(c11), .cin(cin), .c(c), .cout(cout));

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vcin);
    logic [63:0] w0, w1, we;
    w0 = ref_carries(64'(va), 64'(vb), 1'b0, N);
    w1 = ref_carries(64'(va), 64'(vb), 1'b1, N);
    we = ref_carries(64'(va), 64'(vb), vcin, N);
    c01 = w0[N-1:0];
    c11 = w1[N-1:0];
    cin = vcin;
    #1;
    if (w0[N-1:0] != w1[N-1:0]) differ++;
    checks++;
    if (c !== we[N-1:0] || cout !== we[N-1]) begin
      failures++;
      if (failures < 10) $display("FAIL c01=%h c11=%h cin=%b c=%h cout=%b expected=%h",
                                  c01, c11, cin, c, cout, we[N-1:0]);
    end
  endtask

  initial begin
    for (int ci = 0; ci < 2; ci++) begin
      apply('0, '0, 1'(ci));
      apply('1, '0, 1'(ci));
      apply('1, '1, 1'(ci));
      apply({N/2{2'b01}}, {N/2{2'b10}}, 1'(ci));
      for (int k = 0; k < N; k++) apply('1 ^ (N'(1) << k), '0, 1'(ci));
    end
    for (int k = 0; k < NRAND; k++)
      apply(N'({$urandom, $urandom}), N'({$urandom, $urandom}), 1'($urandom));
    checks++;
    if (differ == 0) failures++;
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
