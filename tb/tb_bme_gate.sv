// Self-checking testbench for bme_gate: applies all 16 input combinations and
// compares the four outputs with the gate's equations evaluated bit-wise in
// integer arithmetic. Also checks that, with C = 0, Q and R are the AND
// products the multipliers rely on.
module tb_bme_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;

  bme_gate dut (.*);

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d c=%0d d=%0d got=%0d exp=%0d", what, a, b, c, d, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ia, ib, ic, id;
      ia = (v >> 3) & 1; ib = (v >> 2) & 1; ic = (v >> 1) & 1; id = v & 1;
      {a, b, c, d} = 4'(v);
      #1;
      check("P", p, 1'(ia));
      check("Q", q, 1'(((ia * ib) + ic) % 2));
      check("R", r, 1'(((ia * id) + ic) % 2));
      check("S", s, 1'((((1 - ia) * ib) + ic + id) % 2));
      if (ic == 0) begin
        check("Q as AND", q, 1'(ia * ib));
        check("R as AND", r, 1'(ia * id));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
