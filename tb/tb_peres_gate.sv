// Self-checking testbench for peres_gate: drives all eight inputs and compares
// the outputs with the gate's published truth table, held here as a constant.
module tb_peres_gate;
  logic a, b, c, x, y, z;
  int   checks = 0, failures = 0;

  // Rows indexed by {A,B,C}; each entry is {X,Y,Z}.
  localparam logic [2:0] TRUTH [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                       3'b110, 3'b111, 3'b101, 3'b100};

  peres_gate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({x, y, z} !== TRUTH[v]) begin
        failures++;
        $display("FAIL abc=%03b got xyz=%03b exp=%03b", v[2:0], {x, y, z}, TRUTH[v]);
      end
      // As a half adder (C = 0): y + 2z == a + b
      if (c == 1'b0) begin
        checks++;
        if (int'(y) + 2 * int'(z) != int'(a) + int'(b)) begin
          failures++;
          $display("FAIL half adder a=%0d b=%0d", a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
