// Self-checking testbench of anoc_cas_select on a 6x6 mesh with 2x2
// clusters (nodes numbered y*6+x, clusters C1..C9 row by row).
//
// A congestion map of all 36 routers is drawn at random; the view of the
// current router's cluster is cut out of it, and a reference model scores
// the two directions from the map:
//   different agent-row and agent-column: 3*CL(neighbour) + 2*mean(CL of
//     the adjacent cluster), kept x4 as 12*CL + 2*sum;
//   same agent-column (row): 3/2/1-weighted CLs of the nodes ahead in the
//     source's column (row) against the nodes of the destination's column
//     (row) beside them, as many as lie on the minimal path within the
//     known clusters.
// Directed cases are the two worked examples of the method: node 31 -> 6
// (same agent-column; compares column {25,19,13} with {30,24,18}) and node
// 23 -> 1 (compares node 22 + cluster C5 with node 17 + cluster C3).
module tb_anoc_cas_select;
  import anoc_pkg::*;
  coord_t cur_x, cur_y, dst_x, dst_y;
  logic   at_dest, cand_x, cand_y;
  port_e  port_x, port_y, sel;
  logic [4:0][11:0] view;
  logic [1:0] mode;
  logic [7:0] cong_x, cong_y;
  int checks = 0, failures = 0;
  int map [36];
  int cnt_a = 0, cnt_b = 0, cnt_y = 0;
  logic clk = 0;

  anoc_route_dyxy u_route (.cur_x, .cur_y, .dst_x, .dst_y, .at_dest, .cand_x, .cand_y,
                           .port_x, .port_y, .subnet_of());
  anoc_cas_select #(.CW(2), .CH(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s cur=(%0d,%0d) dst=(%0d,%0d) cx=%0d cy=%0d sel=%s", what,
               cur_x, cur_y, dst_x, dst_y, cong_x, cong_y, sel.name());
    end
  endtask

  function automatic int absd(int a, int b); return a > b ? a - b : b - a; endfunction

  // Cluster (i,j) known from router (x,y)?
  function automatic bit known(int x, int y, int nx, int ny);
    return absd(nx / 2, x / 2) + absd(ny / 2, y / 2) <= 1;
  endfunction

  function automatic int csum(int i, int j);
    return map[(2*j)*6 + 2*i] + map[(2*j)*6 + 2*i + 1] + map[(2*j+1)*6 + 2*i] + map[(2*j+1)*6 + 2*i + 1];
  endfunction

  task automatic make_view(int x, int y);
    int ci, cj;
    int oi[5], oj[5];
    ci = x / 2; cj = y / 2;
    oi = '{0, 0, 1, 0, -1};
    oj = '{0, -1, 0, 1, 0};
    view = '0;
    for (int k = 0; k < 5; k++) begin
      int i, j;
      i = ci + oi[k]; j = cj + oj[k];
      if (i >= 0 && i < 3 && j >= 0 && j < 3)
        for (int r = 0; r < 4; r++)
          view[k][3*r +: 3] = 3'(map[(2*j + r/2)*6 + 2*i + r%2]);
    end
  endtask

  // Expected choice: 0 = X, 1 = Y, 2 = only candidate / local
  task automatic reference(int x, int y, int dx, int dy, output int ex, output int ey, output int emode);
    int sx, sy;
    ex = 0; ey = 0; emode = 0;
    if (x == dx || y == dy) return;
    sx = dx > x ? 1 : -1;
    sy = dy > y ? 1 : -1;
    if (dx / 2 == x / 2) begin          // same agent-column: Y is "along"
      int yy;
      emode = 2;
      for (int k = 1; k <= 3; k++) begin
        yy = y + k * sy;
        if (absd(yy, y) > absd(dy, y) || !known(x, y, x, yy)) break;
        ey += (4 - k) * map[yy * 6 + x];
        ex += (4 - k) * map[(yy - sy) * 6 + dx];
      end
    end else if (dy / 2 == y / 2) begin // same agent-row: X is "along"
      int xx;
      emode = 2;
      for (int k = 1; k <= 3; k++) begin
        xx = x + k * sx;
        if (absd(xx, x) > absd(dx, x) || !known(x, y, xx, y)) break;
        ex += (4 - k) * map[y * 6 + xx];
        ey += (4 - k) * map[dy * 6 + xx - sx];
      end
    end else begin
      emode = 1;
      ex = 12 * map[y * 6 + x + sx] + 2 * csum(x / 2 + sx, y / 2);
      ey = 12 * map[(y + sy) * 6 + x] + 2 * csum(x / 2, y / 2 + sy);
    end
  endtask

  task automatic run_case(int x, int y, int dx, int dy);
    int ex, ey, emode;
    cur_x = coord_t'(x); cur_y = coord_t'(y); dst_x = coord_t'(dx); dst_y = coord_t'(dy);
    make_view(x, y);
    #1;
    reference(x, y, dx, dy, ex, ey, emode);
    check(int'(mode) == emode, "mode");
    if (x == dx && y == dy)      check(sel == P_LOCAL, "local");
    else if (x == dx)            check(sel == (dy > y ? P_SOUTH : P_NORTH), "only Y");
    else if (y == dy)            check(sel == (dx > x ? P_EAST : P_WEST), "only X");
    else begin
      check(int'(cong_x) == ex && int'(cong_y) == ey, "scores");
      if (ey < ex) check(sel == (dy > y ? P_SOUTH : P_NORTH), "choose Y");
      else         check(sel == (dx > x ? P_EAST : P_WEST), "choose X");
      if (emode == 1) cnt_a++;
      if (emode == 2) cnt_b++;
      if (ey < ex) cnt_y++;
    end
  endtask

  initial begin
    // Example 1: node 31 (1,5) -> node 6 (0,1). Congest column 1 (25,19,13).
    foreach (map[i]) map[i] = 0;
    map[25] = 2; map[19] = 2; map[13] = 2; map[12] = 7;  // 12 known but not used
    map[30] = 1; map[24] = 1; map[18] = 3;
    run_case(1, 5, 0, 1);
    check(cong_y == 8'(3*2 + 2*2 + 1*2) && cong_x == 8'(3*1 + 2*1 + 1*3), "example 31->6 scores");
    check(sel == P_WEST, "example 31->6 goes to node 30");
    map[18] = 7; map[24] = 3;  // now the west column is worse
    run_case(1, 5, 0, 1);
    check(sel == P_NORTH, "example 31->6 goes to node 25");
    // Example 2: node 23 (5,3) -> node 1 (1,0): node 22 + C5 vs node 17 + C3.
    foreach (map[i]) map[i] = 0;
    map[22] = 1; map[14] = 3; map[15] = 3;     // C5 congested
    map[17] = 1;                                // C3 idle
    run_case(5, 3, 1, 0);
    check(cong_x == 8'(12*1 + 2*6) && cong_y == 8'(12*1), "example 23->1 scores");
    check(sel == P_NORTH, "example 23->1 goes to node 17");
    // Random maps, every source/destination pair.
    for (int rep = 0; rep < 40; rep++) begin
      foreach (map[i]) map[i] = $urandom_range(0, 7);
      for (int s = 0; s < 36; s++)
        for (int d = 0; d < 36; d++) run_case(s % 6, s / 6, d % 6, d / 6);
    end
    check(cnt_a > 0 && cnt_b > 0 && cnt_y > 0, "both parts and both outcomes exercised");
    $display("part A %0d, part B %0d, Y chosen %0d", cnt_a, cnt_b, cnt_y);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
