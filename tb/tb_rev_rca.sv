// Self-checking testbench for rev_rca at its default width (16 bits):
// corner cases (all-ones plus carry-in, which ripples through every cell)
// and random operands, each compared with a 64-bit integer sum.
module tb_rev_rca;
  localparam int unsigned W = 16;
  localparam int unsigned NRAND = 20000;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;

  rev_rca dut (.*);

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic tc);
    longint unsigned exp;
    a = ta; b = tb; cin = tc;
    #1;
    exp = longint'(ta) + longint'(tb) + longint'(tc);
    checks++;
    if ({cout, sum} !== (W+1)'(exp)) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %h exp %h", ta, tb, tc, {cout, sum}, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, 1'b0);
    for (int i = 0; i < W; i++) apply(W'(1) << i, '1, 1'b0);
    for (int i = 0; i < NRAND; i++) apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
