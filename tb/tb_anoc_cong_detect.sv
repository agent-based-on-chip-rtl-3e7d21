// Self-checking testbench of anoc_cong_detect.
// Feeds random flit events and occupancies; a reference model keeps its own
// 4-entry history of (occupancy after the event >= 4) and the testbench
// checks cs after every cycle. A directed part checks that cs rises only
// on the fourth consecutive congested event and drops on the first
// uncongested one.
module tb_anoc_cong_detect;
  localparam int DEPTH = 6;
  logic clk = 0, rst_n = 0;
  logic flit_rx, flit_tx;
  logic [2:0] count;
  logic cs;
  int checks = 0, failures = 0;
  logic [3:0] mhist;

  anoc_cong_detect #(.DEPTH(DEPTH), .THRESH(4), .HIST_LEN(4)) dut (.*);

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

  task automatic step(input logic rx, input logic tx, input int cnt);
    int nxt;
    flit_rx = rx; flit_tx = tx; count = 3'(cnt);
    nxt = cnt + (rx && !tx ? 1 : 0) - (tx && !rx ? 1 : 0);
    @(negedge clk);
    if (rx || tx) mhist = {mhist[2:0], nxt >= 4};
    check(cs == &mhist, "cs vs model");
  endtask

  initial begin
    flit_rx = 0; flit_tx = 0; count = 0; mhist = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: occupancy 3 -> 4 on entry is congested
    step(1, 0, 3); check(cs == 0, "1 event");
    step(1, 1, 4); check(cs == 0, "2 events");
    step(0, 0, 5); check(cs == 0, "idle keeps history");
    step(1, 0, 4); check(cs == 0, "3 events");
    step(0, 1, 5); check(cs == 1, "4 events -> congested");
    step(0, 0, 4); check(cs == 1, "no event holds cs");
    step(0, 1, 4); check(cs == 0, "drop below threshold clears cs");
    // random
    for (int t = 0; t < 4000; t++) begin
      int c;
      c = $urandom_range(0, DEPTH);
      step((c < DEPTH) && ($urandom_range(0, 1) == 1), (c > 0) && ($urandom_range(0, 1) == 1), c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
