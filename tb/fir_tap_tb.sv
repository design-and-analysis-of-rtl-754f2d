// fir_tap_tb: checks one FIR tap. Random samples enter x_in once per clock
// with random coefficients and incoming partial sums. After each rising edge
// x_out must be the sample of the previous clock (one clock of delay), and
// sum_out/cout must equal sum_in + x_out*coef as a 9-bit number.
// Watchdog included.
module fir_tap_tb;
  logic clk = 1'b0;
  logic [3:0] x_in, coef, x_out;
  logic [7:0] sum_in, sum_out;
  logic       cout;
  int checks = 0, failures = 0;
  int carries = 0;

  fir_tap dut (.clk(clk), .x_in(x_in), .coef(coef), .sum_in(sum_in),
               .x_out(x_out), .sum_out(sum_out), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] prev;
    x_in = '0; coef = '0; sum_in = '0;
    @(negedge clk);
    prev = x_in;
    for (int i = 0; i < 3000; i++) begin
      logic [8:0] exp9;
      x_in = 4'($urandom);
      #1;
      // before the edge x_out still holds the sample of the previous clock
      if (i > 0) begin
        logic [8:0] pre9;
        checks++;
        if (x_out !== prev) begin
          failures++;
          $display("FAIL cycle %0d: x_out=%h before the edge, expected %h", i, x_out, prev);
        end
        // the product must use the delayed sample, not the new one on x_in
        pre9 = 9'(sum_in) + 9'(prev) * 9'(coef);
        checks++;
        if ({cout, sum_out} !== pre9) begin
          failures++;
          $display("FAIL cycle %0d: before the edge sum=%0d, expected %0d", i, {cout, sum_out}, pre9);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (x_out !== x_in) begin
        failures++;
        $display("FAIL cycle %0d: x_out=%h expected %h", i, x_out, x_in);
      end
      prev = x_in;
      // several coefficient / partial-sum combinations against the same sample
      repeat (3) begin
        coef = 4'($urandom);
        sum_in = 8'($urandom);
        #1;
        exp9 = 9'(sum_in) + 9'(x_out) * 9'(coef);
        checks++;
        if ({cout, sum_out} !== exp9) begin
          failures++;
          $display("FAIL cycle %0d: %0d + %0d*%0d gave %0d, expected %0d",
                   i, sum_in, x_out, coef, {cout, sum_out}, exp9);
        end
        if (cout) carries++;
      end
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL no adder carry-out was ever produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
