// tb_full_adder: exhaustive self-check of the one-bit full adder.
// All eight input combinations are applied; the expected sum and carry are
// the two bits of the integer a + b + cin.
module tb_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] expected;
      {a, b, cin} = v[2:0];
      #1;
      expected = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b: got %0b%0b, expected %0b", a, b, cin, cout, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
