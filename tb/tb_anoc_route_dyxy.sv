// Self-checking testbench of anoc_route_dyxy.
// Walks every (current, destination) pair of a 16x16 coordinate space and
// checks the productive directions, the arrival flag and the subnetwork bit
// against the definition of minimal DyXY routing.
module tb_anoc_route_dyxy;
  import anoc_pkg::*;
  coord_t cur_x, cur_y, dst_x, dst_y;
  logic   at_dest, cand_x, cand_y, subnet_of;
  port_e  port_x, port_y;
  int checks = 0, failures = 0;
  logic clk = 0;

  anoc_route_dyxy dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s cur=(%0d,%0d) dst=(%0d,%0d)", what, cur_x, cur_y, dst_x, dst_y);
    end
  endtask

  initial begin
    for (int cy = 0; cy < 16; cy++)
      for (int cx = 0; cx < 16; cx++)
        for (int dy = 0; dy < 16; dy++)
          for (int dx = 0; dx < 16; dx++) begin
            cur_x = coord_t'(cx); cur_y = coord_t'(cy);
            dst_x = coord_t'(dx); dst_y = coord_t'(dy);
            #1;
            check(at_dest == (cx == dx && cy == dy), "at_dest");
            check(cand_x == (cx != dx), "cand_x");
            check(cand_y == (cy != dy), "cand_y");
            if (dx > cx) check(port_x == P_EAST, "east");
            if (dx < cx) check(port_x == P_WEST, "west");
            if (dy > cy) check(port_y == P_SOUTH, "south");
            if (dy < cy) check(port_y == P_NORTH, "north");
            check(subnet_of == (dx < cx), "subnet");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
