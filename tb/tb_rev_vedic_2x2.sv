// Self-checking testbench for rev_vedic_2x2: every one of the
// 16 operand pairs, the 4-bit product compared with the integer
// product of the operands.
module tb_rev_vedic_2x2;
  logic [1:0]  a, b;
  logic [3:0] p;
  int          checks = 0, failures = 0;

  rev_vedic_2x2 dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 4; ia++) begin
      for (int ib = 0; ib < 4; ib++) begin
        a = 2'(ia);
        b = 2'(ib);
        #1;
        checks++;
        if (int'(p) != ia * ib) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d", ia, ib, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
