// fir8_top_tb: end-to-end test of the eight-tap linear-phase FIR filter at
// its default sizes (8 taps, 4-bit samples and coefficients, 8-bit sum).
//
// A reference model in the testbench keeps the last eight samples and the
// four coefficients and computes y = sum h[i]*x[n-i] with h[i] = h[7-i],
// reduced modulo 256, and whether the true sum reached 256. The test
//   1. writes the four coefficients through the write port,
//   2. clears the delay line by shifting in zeros and checks y = 0,
//   3. sends a unit impulse and checks that y shows h[0], h[1], ..., h[7] on
//      consecutive clocks (the mirrored second half included) and then 0,
//   4. streams random samples, rewriting random coefficients now and then,
//      and checks y and ovf on every clock,
//   5. drives all-maximum inputs to force the 8-bit sum to wrap.
// Each mechanism (coefficient write, mirrored coefficient, delay-line shift,
// sum wrap flagged by ovf, unwrapped sum) is counted, and one that never
// happened counts as a failure. A watchdog ends a hung run.
module fir8_top_tb;
  localparam int TAPS = 8;

  logic       clk = 1'b0;
  logic       coef_we;
  logic [1:0] coef_addr;
  logic [3:0] coef_wdata;
  logic [3:0] x_in;
  logic [7:0] y_out;
  logic       ovf;

  int checks = 0, failures = 0;
  int n_coef_writes = 0, n_mirrored = 0, n_shifts = 0, n_wraps = 0, n_nowrap = 0;

  // reference state
  int hist [TAPS];     // hist[i] = x[n-i] for the sample currently on x_in
  int hcoef [TAPS/2];

  fir8_top dut (
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

  function automatic int h(int i);
    return hcoef[(i < TAPS/2) ? i : TAPS - 1 - i];
  endfunction

  function automatic int ref_sum();
    int s = 0;
    for (int i = 0; i < TAPS; i++) s += h(i) * hist[i];
    return s;
  endfunction

  // Apply one sample (and optionally a coefficient write) for one clock:
  // inputs change just after a rising edge, the output is checked before the
  // next one, and the model shifts its history at that edge.
  task automatic cycle(input int xv, input bit do_check,
                       input bit wr = 1'b0, input int wa = 0, input int wd = 0);
    int s;
    x_in = 4'(xv);
    coef_we = wr; coef_addr = 2'(wa); coef_wdata = 4'(wd);
    hist[0] = xv;
    #3;
    if (do_check) begin
      s = ref_sum();
      checks++;
      if (int'(y_out) != s % 256 || ovf != (s >= 256)) begin
        failures++;
        $display("FAIL t=%0t: y=%0d ovf=%0d, expected %0d ovf=%0d",
                 $time, y_out, ovf, s % 256, s >= 256);
      end
      if (s >= 256) n_wraps++; else n_nowrap++;
    end
    @(posedge clk);
    #1;
    if (wr) begin
      hcoef[wa] = wd;
      n_coef_writes++;
    end
    for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
    n_shifts++;
  endtask

  initial begin
    coef_we = 1'b0; coef_addr = '0; coef_wdata = '0; x_in = '0;
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    for (int i = 0; i < TAPS/2; i++) hcoef[i] = 0;
    @(posedge clk);
    #1;

    // 1. coefficients 3, 7, 11, 15 (words 0..3); the delay line is unknown yet
    cycle(0, 1'b0, 1'b1, 0, 3);
    cycle(0, 1'b0, 1'b1, 1, 7);
    cycle(0, 1'b0, 1'b1, 2, 11);
    cycle(0, 1'b0, 1'b1, 3, 15);

    // 2. clear the delay line: after TAPS-1 zero samples y must be 0
    repeat (TAPS - 1) cycle(0, 1'b0);
    cycle(0, 1'b1);
    checks++;
    if (y_out !== 8'd0) begin
      failures++;
      $display("FAIL delay line not cleared: y=%0d", y_out);
    end

    // 3. unit impulse: y shows h[k] k clocks after the impulse entered
    for (int k = 0; k < TAPS + 2; k++) begin
      int expect_h;
      expect_h = (k < TAPS) ? h(k) : 0;
      x_in = (k == 0) ? 4'd1 : 4'd0;
      hist[0] = int'(x_in);
      #3;
      checks++;
      if (int'(y_out) != expect_h) begin
        failures++;
        $display("FAIL impulse response at lag %0d: y=%0d, expected %0d", k, y_out, expect_h);
      end else if (k >= TAPS/2 && k < TAPS) begin
        n_mirrored++;
      end
      @(posedge clk);
      #1;
      for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      n_shifts++;
    end

    // 4. random stream with occasional coefficient rewrites
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(15) == 0)
        cycle(int'($urandom_range(15)), 1'b1, 1'b1, int'($urandom_range(3)), int'($urandom_range(15)));
      else
        cycle(int'($urandom_range(15)), 1'b1);
    end

    // 5. all-maximum coefficients and samples: 8*15*15 = 1800 wraps the sum
    for (int a = 0; a < TAPS/2; a++) cycle(15, 1'b1, 1'b1, a, 15);
    repeat (TAPS) cycle(15, 1'b1);

    $display("mechanisms: coef_writes=%0d mirrored_taps=%0d shifts=%0d wraps=%0d unwrapped=%0d",
             n_coef_writes, n_mirrored, n_shifts, n_wraps, n_nowrap);
    checks++;
    if (n_coef_writes == 0 || n_mirrored == 0 || n_shifts == 0 || n_wraps == 0 || n_nowrap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
