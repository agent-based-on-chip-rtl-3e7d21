// Self-checking testbench of anoc_cluster_agent.
// Applies random local congestion levels and random neighbour strings and
// checks, one cycle later, that the outgoing string is the concatenation of
// the local levels (router ly*2+lx at bits 3*(ly*2+lx)) and that the view
// holds that string followed by the north, east, south and west strings.
module tb_anoc_cluster_agent;
  import anoc_pkg::*;
  logic clk = 0, rst_n = 0;
  cl_t [3:0]        cl_local;
  logic [3:0][11:0] nb_in;
  logic [11:0]      str_out;
  logic [4:0][11:0] view;
  int checks = 0, failures = 0;

  anoc_cluster_agent #(.CW(2), .CH(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    cl_local = '0; nb_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      logic [11:0] exp_str;
      logic [3:0][11:0] exp_nb;
      for (int r = 0; r < 4; r++) cl_local[r] = cl_t'($urandom_range(0, 7));
      for (int d = 0; d < 4; d++) nb_in[d] = 12'($urandom);
      exp_str = '0;
      for (int r = 0; r < 4; r++) exp_str[3*r +: 3] = cl_local[r];
      exp_nb = nb_in;
      @(negedge clk);
      check(str_out == exp_str, "own string");
      check(view[0] == exp_str, "view own");
      check(view[1] == exp_nb[0], "view north");
      check(view[2] == exp_nb[1], "view east");
      check(view[3] == exp_nb[2], "view south");
      check(view[4] == exp_nb[3], "view west");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
