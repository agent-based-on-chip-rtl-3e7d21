// Self-checking testbench of anoc_router, placed at (2,2) of a 6x6 mesh
// with 2x2 clusters.
//
//  1. Latency: a header written into an idle router leaves on the next
//     cycle (one cycle per hop).
//  2. Selection: with the east cluster congested in the view a packet for
//     (4,4) leaves South, with the south cluster congested it leaves East;
//     in the same agent-column, node congestion in the view steers it.
//  3. Congestion level: with the East output stalled, packets from West
//     and Local fill their buffers; cs of both VCs and cl = 2 must appear,
//     and go back to 0 after the traffic drains.
//  4. Random traffic on all seven input VCs (destinations consistent with
//     the direction of arrival and the subnetwork), random backpressure on
//     every output: each packet must leave complete, in order, unmixed on
//     its output VC, through a productive port, on the VC of its subnetwork.
module tb_anoc_router;
  import anoc_pkg::*;
  localparam int X = 2, Y = 2;

  logic clk = 0, rst_n = 0;
  link_t     [4:0] in_link, out_link;
  link_rdy_t [4:0] in_rdy, out_rdy;
  logic [4:0][11:0] view;
  cl_t cl;
  logic [6:0] cs;
  int checks = 0, failures = 0;

  coord_t my_x = X, my_y = Y;
  anoc_router #(.CW(2), .CH(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------- packet sources: one flit queue per input VC ----------
  flit_t src_q [7][$];
  int    n_sent = 0, n_recv = 0;
  logic  random_rdy = 0;
  logic [4:0] rdy_force_low = '0;
  logic [14:0] next_tag = 1;
  int exp_words [int][$];   // tag -> data words
  hdr_t exp_hdr [int];

  function automatic logic [31:0] word(input int tag, input int k);
    return {tag[15:0], 16'(k * 7919 + tag)};
  endfunction

  task automatic send_pkt(input int ivc, input int dx, input int dy, input logic subnet);
    hdr_t h;
    flit_t f;
    h = '0;
    h.dst_x = coord_t'(dx); h.dst_y = coord_t'(dy);
    h.src_x = '0; h.src_y = '0; h.subnet = subnet; h.tag = next_tag;
    exp_hdr[int'(next_tag)] = h;
    f.ftype = FT_HEAD; f.data = h;
    src_q[ivc].push_back(f);
    for (int k = 1; k < PKT_FLITS; k++) begin
      f.ftype = (k == PKT_FLITS - 1) ? FT_TAIL : FT_BODY;
      f.data  = word(int'(next_tag), k);
      exp_words[int'(next_tag)].push_back(f.data);
      src_q[ivc].push_back(f);
    end
    next_tag++;
    n_sent++;
  endtask

  // drive at negedge
  always @(negedge clk) begin
    link_t [4:0] nxt;
    link_rdy_t [4:0] nrdy;
    nxt = '0;
    for (int p = 0; p < 5; p++) begin
      int cands[$];
      cands.delete();
      for (int v = 0; v < 7; v++)
        if (int'(vc_port(v)) == p && src_q[v].size() > 0 && in_rdy[p][vc_sub(v)]) cands.push_back(v);
      if (cands.size() > 0) begin
        int v;
        v = cands[$urandom_range(0, cands.size() - 1)];
        nxt[p].valid = 1'b1;
        nxt[p].vc    = vc_sub(v);
        if (is_head(src_q[v][0].ftype)) begin
          hdr_t hh;
          hh = hdr_t'(src_q[v][0].data);
          drv_cyc[int'(hh.tag)] = cyc;
        end
        nxt[p].flit  = src_q[v].pop_front();
      end
    end
    for (int p = 0; p < 5; p++) begin
      logic [1:0] r;
      r = random_rdy ? 2'($urandom) | 2'($urandom) : 2'b11;
      if (rdy_force_low[p]) r = 2'b00;
      nrdy[p] = r;
    end
    in_link <= nxt;
    out_rdy <= nrdy;
  end

  // ---------- output monitor ----------
  int open_tag [5][2];
  int open_idx [5][2];
  int last_port, last_lat;
  int drv_cyc [int];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 5; p++) if (out_link[p].valid) begin
      int vc;
      flit_t f;
      vc = int'(out_link[p].vc);
      f  = out_link[p].flit;
      checks++;
      if (!out_rdy[p][vc]) begin failures++; $display("FAIL sent without space port %0d", p); end
      if (is_head(f.ftype)) begin
        hdr_t h;
        logic ok;
        h = hdr_t'(f.data);
        last_port = p;
        last_lat  = cyc - drv_cyc[int'(h.tag)];
        if (open_tag[p][vc] != 0) begin failures++; $display("FAIL header interleaved on port %0d vc %0d", p, vc); end
        open_tag[p][vc] = int'(h.tag);
        open_idx[p][vc] = 0;
        case (port_e'(p))
          P_LOCAL: ok = (int'(h.dst_x) == X && int'(h.dst_y) == Y);
          P_EAST:  ok = int'(h.dst_x) > X;
          P_WEST:  ok = int'(h.dst_x) < X;
          P_NORTH: ok = int'(h.dst_y) < Y;
          default: ok = int'(h.dst_y) > Y;
        endcase
        checks++;
        if (!ok) begin failures++; $display("FAIL non-productive port %0d for dst (%0d,%0d)", p, h.dst_x, h.dst_y); end
        checks++;
        if (vc != ((p == P_NORTH || p == P_SOUTH) ? int'(h.subnet) : 0)) begin
          failures++; $display("FAIL wrong output VC");
        end
        if (is_tail(f.ftype)) begin
          open_tag[p][vc] = 0;
          n_recv++;
        end
      end else begin
        int t;
        t = open_tag[p][vc];
        checks++;
        if (t == 0 || !exp_words.exists(t) || exp_words[t].size() == 0 || exp_words[t][0] != f.data) begin
          failures++; $display("FAIL body data port %0d vc %0d tag %0d", p, vc, t);
        end else void'(exp_words[t].pop_front());
        if (is_tail(f.ftype)) begin
          checks++;
          if (t != 0 && exp_words.exists(t) && exp_words[t].size() != 0) begin failures++; $display("FAIL short packet"); end
          open_tag[p][vc] = 0;
          n_recv++;
        end
      end
    end
  end

  task automatic wait_drain(input int limit);
    int t0;
    t0 = cyc;
    while ((n_recv < n_sent) && (cyc - t0 < limit)) @(posedge clk);
    check(n_recv == n_sent, "all packets delivered");
  endtask

  function automatic logic [11:0] all_cl(input int v);
    return {4{3'(v)}};
  endfunction

  initial begin
    in_link = '0; out_rdy = '1; view = '0;
    foreach (open_tag[p, v]) open_tag[p][v] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // 1. latency: header leaves one cycle after it is written
    begin
      hdr_t h;
      flit_t f;
      h = '0; h.dst_x = 3; h.dst_y = 2; h.tag = 15'h7fff;
      f.ftype = FT_SINGLE; f.data = h;
      src_q[0].push_back(f);
      n_sent++;
      wait_drain(50);
      check(last_lat == 1, "one-cycle hop through an idle router");
    end
    // 2. selection from the view
    view = '0; view[2] = all_cl(7);            // east cluster congested
    send_pkt(0, 4, 4, 0);
    wait_drain(100);
    check(last_port == P_SOUTH, "part A avoids congested east cluster");
    view = '0; view[3] = all_cl(7);            // south cluster congested
    send_pkt(0, 4, 4, 0);
    wait_drain(100);
    check(last_port == P_EAST, "part A avoids congested south cluster");
    // same agent-column (cluster column x=2..3): dst (3,5); Y along x=2, X scored on x=3
    view = '0; view[0][3*2 +: 3] = 3'd5;        // node (2,3) congested
    send_pkt(0, 3, 5, 0);
    wait_drain(100);
    check(last_port == P_EAST, "part B avoids congested column");
    view = '0; view[0][3*3 +: 3] = 3'd5;        // node (3,3) congested
    send_pkt(0, 3, 5, 0);
    wait_drain(100);
    check(last_port == P_SOUTH, "part B avoids congested other column");
    view = '0;

    // 3. congestion level with the East and South outputs stalled
    rdy_force_low[P_EAST] = 1; rdy_force_low[P_SOUTH] = 1;
    for (int i = 0; i < 3; i++) begin
      send_pkt(2, 5, 2, 0);   // from West input, heading east
      send_pkt(0, 2, 5, 0);   // from Local, heading south
    end
    repeat (20) @(negedge clk);
    check(cs[2] == 0 && cs[0] == 0, "full but not yet congested (history needs a 4th event)");
    check(cl == 0, "CL still zero");
    rdy_force_low[P_EAST] = 0; rdy_force_low[P_SOUTH] = 0;
    @(negedge clk);
    rdy_force_low[P_EAST] = 1; rdy_force_low[P_SOUTH] = 1;
    repeat (4) @(negedge clk);
    check(cs[2] == 1 && cs[0] == 1, "both stalled buffers congested");
    check(cl == 3'd2, "CL counts two congested buffers");
    rdy_force_low[P_EAST] = 0; rdy_force_low[P_SOUTH] = 0;
    wait_drain(300);
    repeat (3) @(negedge clk);
    check(cl == 0, "CL back to zero after drain");

    // 4. random traffic
    random_rdy = 1;
    for (int i = 0; i < 600; i++) begin
      int v, dx, dy;
      logic sn;
      v = $urandom_range(0, 6);
      dx = $urandom_range(0, 5); dy = $urandom_range(0, 5);
      case (v)
        0: begin if (dx == X && dy == Y) dx = 5; sn = (dx < X); end   // local
        1: begin dx = $urandom_range(0, X); sn = 1; end               // from East, going west
        2: begin dx = $urandom_range(X, 5); sn = 0; end               // from West, going east
        3: begin dy = $urandom_range(Y, 5); dx = $urandom_range(X, 5); sn = 0; end // from North vc1
        4: begin dy = $urandom_range(Y, 5); dx = $urandom_range(0, X); sn = 1; end // from North vc2
        5: begin dy = $urandom_range(0, Y); dx = $urandom_range(X, 5); sn = 0; end // from South vc1
        default: begin dy = $urandom_range(0, Y); dx = $urandom_range(0, X); sn = 1; end
      endcase
      for (int k = 0; k < 5; k++) view[k] = 12'($urandom);
      send_pkt(v, dx, dy, sn);
      if (i % 7 == 0) @(negedge clk);
    end
    wait_drain(20000);
    $display("sent %0d received %0d", n_sent, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
