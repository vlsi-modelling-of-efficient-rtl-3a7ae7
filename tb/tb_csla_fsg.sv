// tb_csla_fsg: self-checking testbench for the final-sum generation unit.
//
// Two kinds of vectors. First, consistent ones: the half-sum word of an
// operand pair and the carry word of a + b + cin, for which the output must
// equal the low N bits of the integer sum. Second, arbitrary words, for which
// each sum bit must be the half-sum bit flipped by the carry into that
// position. Combinational: each vector is checked 1 time unit after it is
// applied. A watchdog ends a stuck run with a failure.
module tb_csla_fsg;
  import csla_ref_pkg::*;
  localparam int unsigned N = csla_pkg::CSLA_WIDTH;
  localparam int NRAND = 5000;

  logic [N-1:0] s0, c, s;
  logic         cin;
  int checks = 0, failures = 0;

  csla_fsg dut (.s0(s0), .c(c), .cin(cin), .s(s));

  task automatic apply_add(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vcin);
    logic [63:0] w;
    logic [64:0] sum;
    w   = ref_carries(64'(va), 64'(vb), vcin, N);
    sum = ref_add(64'(va), 64'(vb), vcin, N);
    s0  = va ^ vb;
    c   = w[N-1:0];
    cin = vcin;
    #1;
    checks++;
    if (s !== sum[N-1:0]) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b s=%h expected=%h", va, vb, vcin, s, sum[N-1:0]);
    end
  endtask

  task automatic apply_raw(input logic [N-1:0] vs0, input logic [N-1:0] vc, input logic vcin);
    logic e;
    s0 = vs0; c = vc; cin = vcin;
    #1;
    for (int i = 0; i < N; i++) begin
      e = vs0[i];
      if ((i == 0) ? vcin : vc[i-1]) e = ~e;
      checks++;
      if (s[i] !== e) begin
        failures++;
        if (failures < 10) $display("FAIL bit %0d s0=%h c=%h cin=%b s=%h", i, vs0, vc, vcin, s);
      end
    end
  endtask

  initial begin
    for (int ci = 0; ci < 2; ci++) begin
      apply_add('0, '0, 1'(ci));
      apply_add('1, '0, 1'(ci));
      apply_add('1, '1, 1'(ci));
      apply_raw('0, '1, 1'(ci));
      apply_raw('1, '0, 1'(ci));
    end
    for (int k = 0; k < NRAND; k++) begin
      apply_add(N'({$urandom, $urandom}), N'({$urandom, $urandom}), 1'($urandom));
      apply_raw(N'({$urandom, $urandom}), N'({$urandom, $urandom}), 1'($urandom));
    end
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
