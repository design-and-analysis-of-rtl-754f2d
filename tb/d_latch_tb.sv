// d_latch_tb: checks the level-sensitive D latch. While en is high q must
// follow every change of d; after en falls q must keep the last value
// whatever d does; qn must always be the complement of q. Watchdog included.
module d_latch_tb;
  logic clk = 1'b0;
  logic d, en, q, qn;
  int checks = 0, failures = 0;

  d_latch dut (.d(d), .en(en), .q(q), .qn(qn));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic e, input string what);
    checks++;
    if (q !== e || qn !== ~e) begin
      failures++;
      $display("FAIL %s: q=%0d qn=%0d, expected q=%0d", what, q, qn, e);
    end
  endtask

  initial begin
    logic held;
    en = 1'b1; d = 1'b0; #1;
    expect_q(1'b0, "transparent 0");
    d = 1'b1; #1;
    expect_q(1'b1, "transparent 1");
    for (int i = 0; i < 500; i++) begin
      // transparent phase: a few changes of d, all followed
      en = 1'b1;
      repeat (3) begin
        d = 1'($urandom); #1;
        expect_q(d, "follow");
      end
      held = d;
      en = 1'b0; #1;
      // opaque phase: d toggles, q holds
      repeat (3) begin
        d = 1'($urandom); #1;
        expect_q(held, "hold");
      end
      d = ~held; #1;
      expect_q(held, "hold against opposite d");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
