// tb_latch_csla_group: self-check of the latch-based carry-select group at the
// four widths the 16-bit slice uses (2, 3, 4 and 5 bits).
// Each clock period: operands and the select carry are applied while en is
// low, en goes high (the shared ripple adder computes a + b + 1 and the latches
// take it), then en goes low (the ripple adder computes a + b + 0). At the end
// of the high phase the latches must hold a + b + 1; at the end of the low
// phase, in the same period, {cout, sum} must equal a + b + sel. The latches
// are also checked to keep a + b + 1 while the adder shows a + b + 0. Counts
// how often the latched and the live result were selected; each must happen.
module tb_latch_csla_group;
  localparam int unsigned NCYC = 3000;

  logic en;
  int checks = 0, failures = 0;
  int n_sel_latched = 0, n_sel_live = 0;
  event ev_setup, ev_high_end, ev_low_end;

  for (genvar g = 0; g < 4; g++) begin : g_w
    localparam int unsigned W = g + 2;
    logic [W-1:0] a, b, sum;
    logic         sel, cout;
    logic [W:0]   exp1;

    latch_csla_group #(.W(W)) dut (
      .en(en), .a(a), .b(b), .sel(sel), .sum(sum), .cout(cout)
    );

    initial begin a = '0; b = '0; sel = 1'b0; end

    always @(ev_setup) begin
      if ($urandom_range(3) == 0) begin
        a = '1; b = W'($urandom_range(1));
      end else begin
        a = W'($urandom); b = W'($urandom);
      end
      sel = 1'($urandom);
    end

    always @(ev_high_end) begin
      exp1 = (W+1)'(a) + (W+1)'(b) + (W+1)'(1);
      checks++;
      if (dut.held !== exp1) begin
        failures++;
        $display("FAIL W=%0d high phase: latches %h, expected %h", W, dut.held, exp1);
      end
    end

    always @(ev_low_end) begin
      checks++;
      if ({cout, sum} !== (W+1)'(a) + (W+1)'(b) + (W+1)'(sel)) begin
        failures++;
        $display("FAIL W=%0d a=%h b=%h sel=%0b: got %h", W, a, b, sel, {cout, sum});
      end
      checks++;
      if (dut.held !== exp1) begin
        failures++;
        $display("FAIL W=%0d low phase: latches lost %h, now %h", W, exp1, dut.held);
      end
      if (sel) n_sel_latched++; else n_sel_live++;
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    #2;
    for (int n = 0; n < NCYC; n++) begin
      -> ev_setup;   #1;
      en = 1'b1;     #3;
      -> ev_high_end; #1;
      en = 1'b0;     #4;
      -> ev_low_end; #1;
    end
    checks++;
    if (n_sel_latched == 0 || n_sel_live == 0) begin
      failures++;
      $display("FAIL coverage: latched selected %0d times, live %0d times", n_sel_latched, n_sel_live);
    end
    $display("latched result selected %0d times, live result %0d times", n_sel_latched, n_sel_live);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
