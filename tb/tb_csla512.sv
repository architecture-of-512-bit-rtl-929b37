// tb_csla512: end-to-end self-check of the 512-bit latch-based carry-select
// adder at its default size (32 slices of 16 bits, no parameter override).
// One addition per clock period: a, b, cin are applied with en low, en is
// raised for the carry-in-1 phase and lowered for the carry-in-0 phase, and
// at the end of that same low phase {cout, sum} is compared with the 513-bit
// integer a + b + cin. Operand patterns: random, a + b = all ones (a carry in
// of 1 then ripples through all 512 bits), all ones plus a small value, and
// operands with long propagate runs at random positions.
// Mechanisms counted, each of which must occur: a latch group selecting its
// latched carry-in-1 result and its live carry-in-0 result (every one of the
// 128 groups, both ways); a carry passed between every pair of adjacent
// slices; a carry propagated through the whole 512-bit adder.
module tb_csla512;
  import csla_pkg::*;

  localparam int unsigned NS    = 32;
  localparam int unsigned WIDTH = NS * SLICE_W;
  localparam int unsigned NCYC  = 4000;

  logic             en, cin, cout;
  logic [WIDTH-1:0] a, b, sum;
  logic [WIDTH:0]   expected;
  int checks = 0, failures = 0;
  int n_latched [NS][1:4];
  int n_live    [NS][1:4];
  int n_slice_carry [1:NS-1];
  int n_full_ripple = 0;

  csla512 dut (.en(en), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  function automatic logic [WIDTH-1:0] rand_word();
    logic [WIDTH-1:0] w;
    for (int i = 0; i < WIDTH / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] run_mask;
    int lo, len;
    for (int k = 0; k < NS; k++)
      for (int g = 1; g <= 4; g++) begin n_latched[k][g] = 0; n_live[k][g] = 0; end
    for (int k = 1; k < NS; k++) n_slice_carry[k] = 0;
    en = 1'b0; a = '0; b = '0; cin = 1'b0;
    #2;
    for (int n = 0; n < NCYC; n++) begin
      case ($urandom_range(4))
        0: begin a = rand_word(); b = ~a; end
        1: begin a = '1; b = WIDTH'($urandom_range(3)); end
        2: begin
          // long propagate run from a random position, generating a carry at its bottom
          lo  = $urandom_range(WIDTH - 1);
          len = $urandom_range(WIDTH - 1);
          run_mask = '0;
          for (int i = lo; i < WIDTH && i < lo + len; i++) run_mask[i] = 1'b1;
          a = rand_word();
          b = (~a & run_mask) | (rand_word() & ~run_mask);
        end
        default: begin a = rand_word(); b = rand_word(); end
      endcase
      cin = 1'($urandom);
      #1 en = 1'b1;
      #4 en = 1'b0;
      #4;
      expected = (WIDTH+1)'(a) + (WIDTH+1)'(b) + (WIDTH+1)'(cin);
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: a=%h b=%h cin=%0b\n  got      %h\n  expected %h",
                   n, a, b, cin, {cout, sum}, expected);
      end
      if (a == ~b && cin) n_full_ripple++;
      #1;
    end
    for (int k = 0; k < NS; k++)
      for (int g = 1; g <= 4; g++) begin
        checks++;
        if (n_latched[k][g] == 0 || n_live[k][g] == 0) begin
          failures++;
          $display("FAIL coverage: slice %0d group %0d latched %0d live %0d",
                   k, g, n_latched[k][g], n_live[k][g]);
        end
      end
    for (int k = 1; k < NS; k++) begin
      checks++;
      if (n_slice_carry[k] == 0) begin
        failures++;
        $display("FAIL coverage: no carry into slice %0d", k);
      end
    end
    checks++;
    if (n_full_ripple == 0) begin
      failures++;
      $display("FAIL coverage: no carry through all %0d bits", WIDTH);
    end
    $display("latched selected in slice 31 group 4: %0d, live: %0d; carry into slice 16: %0d; full ripple: %0d",
             n_latched[31][4], n_live[31][4], n_slice_carry[16], n_full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample the slice carries and group select carries late in each low
  // phase, when the carry chain has settled.
  always @(negedge en) begin
    #3;
    for (int k = 0; k < NS; k++) begin
      if (k > 0 && dut.c[k]) n_slice_carry[k]++;
    end
  end

  for (genvar k = 0; k < NS; k++) begin : g_sel
    for (genvar g = 1; g <= 4; g++) begin : g_grp
      always @(negedge en) begin
        #3;
        if (dut.g_slice[k].u_slice.c[g]) n_latched[k][g]++;
        else                             n_live[k][g]++;
      end
    end
  end
endmodule
