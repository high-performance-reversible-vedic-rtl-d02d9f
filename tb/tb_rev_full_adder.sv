// Self-checking testbench for rev_full_adder: all eight input combinations,
// {cout, sum} compared with the integer sum a + b + cin, and the garbage
// outputs compared with their expected values (a and a^b).
module tb_rev_full_adder;
  logic       a, b, cin, sum, cout;
  logic [1:0] g;
  int         checks = 0, failures = 0;

  rev_full_adder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      total = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({cout, sum} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d got %0d exp %0d", a, b, cin, {cout, sum}, total);
      end
      checks++;
      if (g !== {a ^ b, a}) begin
        failures++;
        $display("FAIL garbage a=%0d b=%0d got %02b", a, b, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
