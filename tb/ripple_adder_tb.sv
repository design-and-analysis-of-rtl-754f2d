// ripple_adder_tb: checks the 8-bit ripple-carry adder (default width) against
// integer addition: all-ones and carry-propagation corner cases, then random
// operands with both carry-in values. A 3-bit instance is checked
// exhaustively as well. Watchdog included.
module ripple_adder_tb;
  logic clk = 1'b0;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  logic [2:0] a3, b3, s3;
  logic       c3i, c3o;
  int checks = 0, failures = 0;

  ripple_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  ripple_adder #(.W(3)) dut3 (.a(a3), .b(b3), .cin(c3i), .sum(s3), .cout(c3o));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(input logic [7:0] ta, input logic [7:0] tb_, input logic tc);
    logic [8:0] exp9;
    a = ta; b = tb_; cin = tc;
    @(posedge clk);
    exp9 = 9'(ta) + 9'(tb_) + 9'(tc);
    checks++;
    if ({cout, sum} !== exp9) begin
      failures++;
      $display("FAIL %0d + %0d + %0d = %0d (cout %0d), expected %0d", ta, tb_, tc, sum, cout, exp9);
    end
  endtask

  initial begin
    a3 = '0; b3 = '0; c3i = 1'b0;
    check8(8'hFF, 8'h01, 1'b0);
    check8(8'hFF, 8'h00, 1'b1);
    check8(8'hFF, 8'hFF, 1'b1);
    check8(8'h00, 8'h00, 1'b0);
    check8(8'h7F, 8'h01, 1'b0);
    for (int i = 0; i < 3000; i++) check8(8'($urandom), 8'($urandom), 1'($urandom));
    for (int v = 0; v < 128; v++) begin
      logic [3:0] e;
      {c3i, a3, b3} = 7'(v);
      @(posedge clk);
      e = 4'(a3) + 4'(b3) + 4'(c3i);
      checks++;
      if ({c3o, s3} !== e) begin
        failures++;
        $display("FAIL W=3 %0d + %0d + %0d = %0d", a3, b3, c3i, {c3o, s3});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
