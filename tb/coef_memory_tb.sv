// coef_memory_tb: checks the linear-phase coefficient store. Random words are
// written to random addresses; after each write all eight tap outputs are
// compared with a reference copy of the four words, tap i showing word i for
// i < 4 and word 7-i otherwise. Writes with we low must change nothing, and a
// write must show one clock edge later. Watchdog included.
module coef_memory_tb;
  logic clk = 1'b0;
  logic       we;
  logic [1:0] waddr;
  logic [3:0] wdata;
  logic [3:0] coef [8];
  logic [3:0] ref_mem [4];
  int checks = 0, failures = 0;

  coef_memory dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .coef(coef));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [1:0] a, input logic [3:0] v, input logic en);
    we = en; waddr = a; wdata = v;
    @(posedge clk);
    #1 we = 1'b0;
    if (en) ref_mem[a] = v;
  endtask

  task automatic check_all(input string what);
    for (int i = 0; i < 8; i++) begin
      int w;
      w = (i < 4) ? i : 7 - i;
      checks++;
      if (coef[i] !== ref_mem[w]) begin
        failures++;
        $display("FAIL %s: tap %0d shows %h, expected word %0d = %h", what, i, coef[i], w, ref_mem[w]);
      end
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0;
    @(negedge clk);
    // fill all four words with distinct values
    for (int a = 0; a < 4; a++) write(2'(a), 4'(a * 3 + 1), 1'b1);
    check_all("initial fill");
    for (int i = 0; i < 1000; i++) begin
      logic [1:0] a;
      logic [3:0] v;
      logic       en;
      a = 2'($urandom); v = 4'($urandom); en = 1'($urandom);
      // before the edge the new word must not be visible yet
      we = en; waddr = a; wdata = v;
      #1;
      check_all("before edge");
      @(posedge clk);
      #1 we = 1'b0;
      if (en) ref_mem[a] = v;
      check_all("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
