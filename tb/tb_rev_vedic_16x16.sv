// End-to-end self-checking testbench for the 16x16 reversible Vedic
// multiplier at its only (full) size. Operands: corner values, every pair of
// walking ones, and random pairs; each 32-bit product is compared with the
// 64-bit integer product. The multiplier is combinational, so each product
// is checked one step after its operands are applied (no latency).
//
// Mechanisms of the top-level adder stage are counted from the operands
// (independently of the design) and each must occur at least once:
//   - a carry out of the cross-product adder (AH*BL + AL*BH >= 2^16)
//   - a carry out of the adder that adds the zero-padded high half of AL*BL
//   - a carry from the middle sum into the AH*BH adder
module tb_rev_vedic_16x16;
  localparam int unsigned NRAND = 200000;

  logic [15:0] a, b;
  logic [31:0] p;
  int          checks = 0, failures = 0;
  int          n_cross_carry = 0, n_pad_carry = 0, n_mid_carry = 0;

  rev_vedic_16x16 dut (.*);

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb);
    longint unsigned exp, q0, xsum, mid;
    a = ta; b = tb;
    #1;
    exp   = longint'(ta) * longint'(tb);
    q0    = longint'(ta[7:0]) * longint'(tb[7:0]);
    xsum = longint'(ta[15:8]) * longint'(tb[7:0]) + longint'(ta[7:0]) * longint'(tb[15:8]);
    mid   = (xsum % 65536) + (q0 >> 8);
    if (xsum >= 65536) n_cross_carry++;
    if (mid >= 65536) n_pad_carry++;
    if (xsum + (q0 >> 8) >= 65536) n_mid_carry++;
    checks++;
    if (p !== 32'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h exp %h", ta, tb, p, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h0000, 16'h0000);
    apply(16'hffff, 16'hffff);
    apply(16'hffff, 16'h0001);
    apply(16'h0001, 16'hffff);
    apply(16'hffff, 16'h0000);
    apply(16'h8000, 16'h8000);
    apply(16'h00ff, 16'hff00);
    apply(16'h1234, 16'h5678);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        apply(16'(1) << i, 16'(1) << j);
    for (int i = 0; i < NRAND; i++) apply(16'($urandom), 16'($urandom));

    $display("cross-product carry: %0d, padded-adder carry: %0d, middle carry: %0d",
             n_cross_carry, n_pad_carry, n_mid_carry);
    checks++;
    if (n_cross_carry == 0 || n_pad_carry == 0 || n_mid_carry == 0) begin
      failures++;
      $display("FAIL a carry case of the adder stage was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
