// Self-checking testbench for rev_vedic_merge at its default N = 16.
// The four inputs are real 8x8 products of random bytes, as in the 16x16
// multiplier; the merged output is compared with the integer product of the
// reassembled 16-bit operands. Extreme operands make both internal carries
// (RCA1's and RCA2's) occur, and they are counted.
module tb_rev_vedic_merge;
  localparam int unsigned N = 16;
  localparam int unsigned H = N / 2;

  logic [N-1:0]   q0, q1, q2, q3;
  logic [2*N-1:0] p;
  int             checks = 0, failures = 0;
  int             n_c1 = 0, n_c2 = 0;

  rev_vedic_merge dut (.*);

  task automatic apply(input logic [H-1:0] al, input logic [H-1:0] ah,
                       input logic [H-1:0] bl, input logic [H-1:0] bh);
    longint unsigned exp, xsum;
    q0 = N'(al * bl);
    q1 = N'(ah * bl);
    q2 = N'(al * bh);
    q3 = N'(ah * bh);
    #1;
    exp   = longint'({ah, al}) * longint'({bh, bl});
    xsum = longint'(q1) + longint'(q2);
    if (xsum >= (64'd1 << N)) n_c1++;
    if ((xsum % (64'd1 << N)) + (longint'(q0) >> H) >= (64'd1 << N)) n_c2++;
    checks++;
    if (p !== (2*N)'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h: got %h exp %h", {ah, al}, {bh, bl}, p, exp);
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
    apply('0, '0, '0, '0);
    apply('1, '1, '1, '1);
    apply('1, '0, '0, '1);
    apply('1, '1, '1, '0);
    apply('1, 8'h80, 8'hff, 8'h80);  // RCA1 no carry, RCA2 carry
    for (int i = 0; i < 20000; i++)
      apply(H'($urandom), H'($urandom), H'($urandom), H'($urandom));
    checks++;
    if (n_c1 == 0 || n_c2 == 0) begin
      failures++;
      $display("FAIL carry cases not reached: c1=%0d c2=%0d", n_c1, n_c2);
    end
    $display("carry out of RCA1: %0d times, of RCA2: %0d times", n_c1, n_c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
