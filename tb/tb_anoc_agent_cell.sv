// Self-checking testbench of anoc_agent_cell: the registered congestion
// level must equal the number of set congestion-status bits, one cycle
// after they are applied. All 128 patterns are tried, then random ones.
module tb_anoc_agent_cell;
  logic clk = 0, rst_n = 0;
  logic [6:0] cs;
  logic [2:0] cl;
  int checks = 0, failures = 0;

  anoc_agent_cell #(.N_IN(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 128 + 500; i++) begin
      int ones;
      cs = (i < 128) ? 7'(i) : 7'($urandom);
      ones = 0;
      for (int b = 0; b < 7; b++) ones += int'(cs[b]);
      @(negedge clk);
      checks++;
      if (int'(cl) != ones) begin
        failures++;
        $display("FAIL cs=%b cl=%0d expected %0d", cs, cl, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
