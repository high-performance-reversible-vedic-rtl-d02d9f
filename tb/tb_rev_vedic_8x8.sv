// Self-checking testbench for rev_vedic_8x8: every one of the
// 65536 operand pairs, the 16-bit product compared with the integer
// product of the operands.
module tb_rev_vedic_8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int          checks = 0, failures = 0;

  rev_vedic_8x8 dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        a = 8'(ia);
        b = 8'(ib);
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
