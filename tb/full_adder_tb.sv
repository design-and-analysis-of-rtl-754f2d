// full_adder_tb: exhaustive check of the one-bit full adder. All eight input
// combinations are applied and sum/cout are compared with the arithmetic sum
// a+b+cin. A watchdog ends the run as a failure if it does not finish.
module full_adder_tb;
  logic clk = 1'b0;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      @(posedge clk);
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if (sum !== total[0] || cout !== total[1]) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: sum=%0d cout=%0d, expected %0d %0d",
                 a, b, cin, sum, cout, total[0], total[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
