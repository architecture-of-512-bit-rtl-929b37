// tb_rca: self-check of the ripple carry adder at its default width (4 bits)
// and at 5 bits. Every operand pair and both carry-in values are applied to
// the 4-bit adder, 2000 random ones to the 5-bit adder; the reference is the
// integer sum a + b + cin.
module tb_rca;
  localparam int unsigned W4 = 4;
  localparam int unsigned W5 = 5;

  logic [W4-1:0] a4, b4, s4;
  logic          c4, co4;
  logic [W5-1:0] a5, b5, s5;
  logic          c5, co5;
  int checks = 0, failures = 0;

  rca             dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  rca #(.W(W5))   dut5 (.a(a5), .b(b5), .cin(c5), .sum(s5), .cout(co5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W4+1)); v++) begin
      {c4, a4, b4} = v[2*W4:0];
      #1;
      checks++;
      if ({co4, s4} !== (W4+1)'(a4) + (W4+1)'(b4) + (W4+1)'(c4)) begin
        failures++;
        $display("FAIL W=4 a=%h b=%h cin=%0b got %h", a4, b4, c4, {co4, s4});
      end
    end
    for (int n = 0; n < 2000; n++) begin
      a5 = W5'($urandom); b5 = W5'($urandom); c5 = 1'($urandom);
      #1;
      checks++;
      if ({co5, s5} !== (W5+1)'(a5) + (W5+1)'(b5) + (W5+1)'(c5)) begin
        failures++;
        $display("FAIL W=5 a=%h b=%h cin=%0b got %h", a5, b5, c5, {co5, s5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
