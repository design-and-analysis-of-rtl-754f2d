// fir8_top_wide_tb: runs the eight-tap filter with an 11-bit sum chain
// (ACC_W = 11), wide enough for the largest output 8*15*15 = 1800, and checks
// that y_out then equals the exact filter output on every clock and that ovf
// never rises. Coefficients are loaded at random and rewritten now and then;
// samples are random, with a stretch of all-maximum inputs at the end.
// A watchdog ends a hung run.
module fir8_top_wide_tb;
  localparam int TAPS = 8;

  logic        clk = 1'b0;
  logic        coef_we;
  logic [1:0]  coef_addr;
  logic [3:0]  coef_wdata;
  logic [3:0]  x_in;
  logic [10:0] y_out;
  logic        ovf;

  int checks = 0, failures = 0;
  int max_seen = 0;
  int hist [TAPS];
  int hcoef [TAPS/2];

  fir8_top #(.ACC_W(11)) dut (
    .clk(clk), .coef_we(coef_we), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
    .x_in(x_in), .y_out(y_out), .ovf(ovf)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sum();
    int s = 0;
    for (int i = 0; i < TAPS; i++) s += hcoef[(i < TAPS/2) ? i : TAPS - 1 - i] * hist[i];
    return s;
  endfunction

  task automatic cycle(input int xv, input bit do_check,
                       input bit wr = 1'b0, input int wa = 0, input int wd = 0);
    int s;
    x_in = 4'(xv);
    coef_we = wr; coef_addr = 2'(wa); coef_wdata = 4'(wd);
    hist[0] = xv;
    #3;
    if (do_check) begin
      s = ref_sum();
      if (s > max_seen) max_seen = s;
      checks++;
      if (int'(y_out) != s || ovf) begin
        failures++;
        $display("FAIL t=%0t: y=%0d ovf=%0d, expected %0d", $time, y_out, ovf, s);
      end
    end
    @(posedge clk);
    #1;
    if (wr) hcoef[wa] = wd;
    for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
  endtask

  initial begin
    coef_we = 1'b0; coef_addr = '0; coef_wdata = '0; x_in = '0;
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    @(posedge clk);
    #1;
    for (int a = 0; a < TAPS/2; a++) cycle(0, 1'b0, 1'b1, a, int'($urandom_range(15)));
    repeat (TAPS - 1) cycle(0, 1'b0);
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(31) == 0)
        cycle(int'($urandom_range(15)), 1'b1, 1'b1, int'($urandom_range(3)), int'($urandom_range(15)));
      else
        cycle(int'($urandom_range(15)), 1'b1);
    end
    for (int a = 0; a < TAPS/2; a++) cycle(15, 1'b1, 1'b1, a, 15);
    repeat (TAPS) cycle(15, 1'b1);
    checks++;
    if (max_seen != 1800) begin
      failures++;
      $display("FAIL the full-scale output 1800 was not reached (max %0d)", max_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
