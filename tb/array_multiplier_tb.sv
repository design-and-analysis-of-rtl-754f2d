// array_multiplier_tb: exhaustive check of the 4x4 array multiplier (all 256
// operand pairs) against integer multiplication, and of a 5x3 instance (all
// 256 pairs) to exercise unequal operand widths. Watchdog included.
module array_multiplier_tb;
  logic clk = 1'b0;
  logic [3:0] x, y;
  logic [7:0] p;
  logic [4:0] x5;
  logic [2:0] y3;
  logic [7:0] p53;
  int checks = 0, failures = 0;

  array_multiplier dut (.x(x), .y(y), .p(p));
  array_multiplier #(.M(5), .N(3)) dut53 (.x(x5), .y(y3), .p(p53));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      {x5, y3} = 8'(v);
      @(posedge clk);
      checks++;
      if (int'(p) != int'(x) * int'(y)) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", x, y, p);
      end
      checks++;
      if (int'(p53) != int'(x5) * int'(y3)) begin
        failures++;
        $display("FAIL 5x3 %0d * %0d = %0d", x5, y3, p53);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
