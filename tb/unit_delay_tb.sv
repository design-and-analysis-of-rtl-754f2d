// unit_delay_tb: checks the 4-bit master-slave sample delay. Random samples
// are applied once per clock; after each rising edge q must equal the sample
// present just before that edge (a latency of exactly one clock), and q must
// not move while d changes in either clock phase. Watchdog included.
module unit_delay_tb;
  logic clk = 1'b0;
  logic [3:0] d, q;
  int checks = 0, failures = 0;

  unit_delay dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic [3:0] e, input int cyc, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL cycle %0d (%s): q=%h expected %h", cyc, what, q, e);
    end
  endtask

  initial begin
    logic [3:0] sampled;
    bit known = 1'b0;
    d = '0;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      #1;                                     // just after the rising edge
      if (known) expect_q(sampled, i, "captured at the edge");
      d = 4'($urandom);                       // clk high: must not reach q
      #3;
      if (known) expect_q(sampled, i, "held while clk high");
      #2 d = 4'($urandom);                    // clk low: master follows d
      #1;
      if (known) expect_q(sampled, i, "held while clk low");
      #1 d = 4'($urandom);
      sampled = d;                            // value present at the next edge
      known = 1'b1;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
