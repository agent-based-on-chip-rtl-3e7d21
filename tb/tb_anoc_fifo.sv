// Self-checking testbench of anoc_fifo (input VC buffer).
// Drives random pushes and pops (never pushing when full or popping when
// empty), compares the head, count, full and empty flags with a queue
// model, and checks that exactly DEPTH flits fit.
module tb_anoc_fifo;
  localparam int DEPTH = 6;
  localparam int W     = 34;

  logic clk = 0, rst_n = 0;
  logic push, pop;
  logic [W-1:0] din, dout;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  anoc_fifo #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // fill completely
    for (int i = 0; i < DEPTH; i++) begin
      push = 1; din = W'(i + 100);
      @(negedge clk);
      model.push_back(W'(i + 100));
    end
    push = 0;
    check(full && count == DEPTH, "full after DEPTH pushes");
    check(dout == model[0], "head after fill");
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      push = ($urandom_range(0, 1) == 1) && !full;
      pop  = ($urandom_range(0, 1) == 1) && !empty;
      din  = W'($urandom);
      if (!empty) check(dout == model[0], "head data");
      check(count == model.size(), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      @(negedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
