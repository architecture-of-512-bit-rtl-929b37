// tb_csla16: self-check of the 16-bit latch-based carry-select slice.
// Each clock period applies a, b, cin with en low, raises en for the
// carry-in-1 phase, lowers it, and at the end of the low phase of the same
// period compares {cout, sum} with the integer a + b + cin. Operands mix
// random values with long carry-propagate patterns (a + b = all ones) so
// that carries ripple through every group. Counts, per group 1-4, how often
// the carry from below selected the latched result; each must be seen.
module tb_csla16;
  localparam int unsigned NCYC = 20000;

  logic        en, cin, cout;
  logic [15:0] a, b, sum;
  logic [16:0] expected;
  int checks = 0, failures = 0;
  int n_latched [1:4];
  int n_live    [1:4];
  int n_full_ripple = 0;

  csla16 dut (.en(en), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_latched[g]) begin n_latched[g] = 0; n_live[g] = 0; end
    en = 1'b0; a = '0; b = '0; cin = 1'b0;
    #2;
    for (int n = 0; n < NCYC; n++) begin
      case ($urandom_range(3))
        0: begin a = 16'($urandom); b = ~a; end        // propagate everywhere
        1: begin a = 16'hFFFF; b = 16'($urandom_range(1)); end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      cin = 1'($urandom);
      #1 en = 1'b1;
      #4 en = 1'b0;
      #4;
      expected = 17'(a) + 17'(b) + 17'(cin);
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b: got %h expected %h", a, b, cin, {cout, sum}, expected);
      end
      for (int g = 1; g <= 4; g++) begin
        if (dut.c[g]) n_latched[g]++; else n_live[g]++;
      end
      if ((a ^ b) == 16'hFFFF && cin) n_full_ripple++;
      #1;
    end
    for (int g = 1; g <= 4; g++) begin
      checks++;
      if (n_latched[g] == 0 || n_live[g] == 0) begin
        failures++;
        $display("FAIL coverage: group %0d latched %0d live %0d", g, n_latched[g], n_live[g]);
      end
    end
    checks++;
    if (n_full_ripple == 0) begin
      failures++;
      $display("FAIL coverage: no carry through all 16 bits");
    end
    $display("carry through all 16 bits: %0d times", n_full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
