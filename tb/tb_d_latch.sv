// tb_d_latch: self-check of the D latch.
// Checks that q follows d while en = 1, that q keeps the value d had just
// before en fell while d toggles with en = 0, and that qn is always ~q.
module tb_d_latch;
  logic en, d, q, qn;
  int checks = 0, failures = 0;

  d_latch dut (.en(en), .d(d), .q(q), .qn(qn));

  task automatic expect_q(input logic want, input string what);
    checks++;
    if (q !== want || qn !== ~want) begin
      failures++;
      $display("FAIL %s: q=%0b qn=%0b expected q=%0b", what, q, qn, want);
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
    logic stored;
    en = 1'b1; d = 1'b0; #1;
    for (int n = 0; n < 200; n++) begin
      // transparent phase
      en = 1'b1;
      repeat (3) begin
        d = 1'($urandom); #1;
        expect_q(d, "transparent");
      end
      stored = d;
      // hold phase: d changes, q must not
      en = 1'b0; #1;
      expect_q(stored, "hold at fall");
      repeat (3) begin
        d = 1'($urandom); #1;
        expect_q(stored, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
