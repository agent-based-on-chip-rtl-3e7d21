// End-to-end testbench of anoc_top at its default size (6x6 mesh, nine 2x2
// clusters).
//
// Every node has a processing-element model that injects 4-word messages
// and takes delivered ones. Phase 1 runs light uniform random traffic,
// phase 2 heavier traffic with a single hotspot node (3,3) that gets an
// extra H = 10% share of the messages, as in the hotspot profile. A
// scoreboard checks that every message arrives exactly once, at its
// destination, with its source, tag and data intact. Average latency (first
// injection attempt to delivery) and the request rate are printed per
// phase, and the zero-load latency of a single packet is checked against
// the one-cycle-per-hop pipeline.
//
// The mechanisms of the design are counted through hierarchical probes and
// each must occur at least once: buffer congestion status, non-zero
// congestion levels, CL strings arriving from neighbouring agents, CAS
// part A and part B decisions, a decision against the X direction, use of
// both Y virtual channels (both subnetworks), output stalls from full
// downstream buffers and refused injection attempts.
module tb_anoc_top;
  import anoc_pkg::*;
  localparam int MW = 6, MH = 6, N = MW * MH;
  localparam int HOT = 3 * MW + 3;

  logic clk = 0, rst_n = 0;
  logic   [N-1:0]             msg_valid, msg_ready, rx_valid, rx_ready;
  coord_t [N-1:0]             msg_dst_x, msg_dst_y, rx_src_x, rx_src_y;
  logic   [N-1:0][14:0]       msg_tag, rx_tag;
  logic   [N-1:0][3:0][31:0]  msg_data, rx_data;
  cl_t    [N-1:0]             cl;
  int checks = 0, failures = 0;

  anoc_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- traffic ----------------
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int  rate_pm = 0;        // injection probability per node per cycle, per mille
  int  hot_pct = 0;        // extra share of messages sent to the hotspot
  bit  pending [N];
  int  seq [N];
  int  t_first [N];
  int  sb_dst [int];       // key src*32768+tag -> destination
  int  sb_t0  [int];
  int  n_inj = 0, n_del = 0, attempts = 0, refusals = 0;
  longint lat_sum = 0;
  int  lat_n = 0;

  function automatic logic [31:0] dword(int src, int tag, int k);
    return 32'(src * 1000003 + tag * 7919 + k * 104729);
  endfunction

  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (pending[n] && msg_valid[n] && msg_ready[n]) ;  // accepted at the last edge, handled below
      if (!pending[n] && $urandom_range(0, 999) < rate_pm) begin
        int d;
        if ($urandom_range(0, 99) < hot_pct && n != HOT) d = HOT;
        else begin
          d = $urandom_range(0, N - 2);
          if (d >= n) d++;
        end
        pending[n]    = 1;
        t_first[n]    = cyc;
        msg_dst_x[n]  = coord_t'(d % MW);
        msg_dst_y[n]  = coord_t'(d / MW);
        msg_tag[n]    = 15'(seq[n]);
        for (int k = 0; k < 4; k++) msg_data[n][k] = dword(n, seq[n], k);
      end
      msg_valid[n] = pending[n];
      rx_ready[n]  = ($urandom_range(0, 9) != 0);
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (msg_valid[n]) begin
        attempts++;
        if (!msg_ready[n]) refusals++;
      end
      if (msg_valid[n] && msg_ready[n]) begin
        int key;
        key = n * 32768 + seq[n];
        sb_dst[key] = int'(msg_dst_y[n]) * MW + int'(msg_dst_x[n]);
        sb_t0[key]  = t_first[n];
        seq[n]      = seq[n] + 1;
        pending[n]  = 0;
        n_inj++;
      end
      if (rx_valid[n] && rx_ready[n]) begin
        int src, key;
        logic ok;
        src = int'(rx_src_y[n]) * MW + int'(rx_src_x[n]);
        key = src * 32768 + int'(rx_tag[n]);
        ok = sb_dst.exists(key) && sb_dst[key] == n;
        for (int k = 0; k < 4; k++) ok = ok && (rx_data[n][k] == dword(src, int'(rx_tag[n]), k));
        checks++;
        if (!ok) begin failures++; $display("FAIL delivery at node %0d from %0d tag %0d", n, src, rx_tag[n]); end
        else begin
          lat_sum += longint'(cyc - sb_t0[key]);
          lat_n++;
          sb_dst.delete(key);
        end
        n_del++;
      end
    end
  end

  // ---------------- mechanism probes ----------------
  int ev_cs = 0, ev_cl = 0, ev_remote = 0, ev_part_a = 0, ev_part_b = 0, ev_took_y = 0;
  int ev_vc1 = 0, ev_vc2 = 0, ev_stall = 0;

  for (genvar y = 0; y < MH; y++) begin : g_py
    for (genvar x = 0; x < MW; x++) begin : g_px
      always @(posedge clk) if (rst_n) begin
        if (|dut.g_y[y].g_x[x].u_rt.cs) ev_cs++;
        if (dut.g_y[y].g_x[x].u_rt.cl != 0) ev_cl++;
        if (|dut.g_y[y].g_x[x].u_rt.view[4:1]) ev_remote++;
        for (int v = 0; v < NUM_VCS; v++) begin
          if (dut.g_y[y].g_x[x].u_rt.pop[v] && !dut.g_y[y].g_x[x].u_rt.held[v]
              && is_head(dut.g_y[y].g_x[x].u_rt.head[v].ftype)) begin
            if (dut.g_y[y].g_x[x].u_rt.mode[v] == 2'd1) ev_part_a++;
            if (dut.g_y[y].g_x[x].u_rt.mode[v] == 2'd2) ev_part_b++;
            if (dut.g_y[y].g_x[x].u_rt.mode[v] != 2'd0
                && (dut.g_y[y].g_x[x].u_rt.sel[v] == P_NORTH || dut.g_y[y].g_x[x].u_rt.sel[v] == P_SOUTH))
              ev_took_y++;
          end
          if (!dut.g_y[y].g_x[x].u_rt.empty[v] && !dut.g_y[y].g_x[x].u_rt.can_go[v]) ev_stall++;
        end
        for (int p = 1; p <= 3; p += 2) if (dut.g_y[y].g_x[x].u_rt.out_link[p].valid) begin
          if (dut.g_y[y].g_x[x].u_rt.out_link[p].vc) ev_vc2++; else ev_vc1++;
        end
      end
    end
  end

  task automatic run_phase(input string name, input int rate, input int hot, input int cycles);
    int a0, r0, i0;
    longint l0;
    int ln0;
    a0 = attempts; r0 = refusals; i0 = n_inj; l0 = lat_sum; ln0 = lat_n;
    rate_pm = rate; hot_pct = hot;
    repeat (cycles) @(negedge clk);
    rate_pm = 0;
    for (int t = 0; t < 20000 && (n_del < n_inj || pending.sum() with (int'(item)) != 0); t++) @(negedge clk);
    $display("%s: injected %0d, request rate %0.3f, average latency %0.1f cycles", name, n_inj - i0,
             real'((attempts - a0) - (refusals - r0)) / real'(attempts - a0 + 1),
             real'(lat_sum - l0) / real'(lat_n - ln0 + 1));
    check(n_del == n_inj, {name, ": every injected message delivered"});
  endtask

  initial begin
    msg_valid = '0; msg_dst_x = '0; msg_dst_y = '0; msg_tag = '0; msg_data = '0; rx_ready = '1;
    foreach (pending[n]) begin pending[n] = 0; seq[n] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // zero-load latency: node 0 -> node 35, 10 hops + local in/out
    begin
      int t0;
      pending[0] = 1; t_first[0] = cyc; msg_dst_x[0] = 5; msg_dst_y[0] = 5; msg_tag[0] = 15'(seq[0]);
      for (int k = 0; k < 4; k++) msg_data[0][k] = dword(0, seq[0], k);
      t0 = cyc;
      while (n_del == 0 && cyc - t0 < 200) @(negedge clk);
      // 1 cycle into the NI, 1 per router (11 routers), 4 more flits, 1 to register the tail
      $display("zero-load latency node 0 -> 35: %0d cycles", int'(lat_sum));
      check(lat_sum >= 16 && lat_sum <= 19, "zero-load latency matches one cycle per hop");
    end

    run_phase("uniform", 20, 0, 3000);
    run_phase("hotspot H=10%", 90, 10, 3000);

    check(ev_cs > 0,     "buffer congestion status seen");
    check(ev_cl > 0,     "non-zero congestion level seen");
    check(ev_remote > 0, "CL strings from neighbouring agents reach routers");
    check(ev_part_a > 0, "CAS part A decisions");
    check(ev_part_b > 0, "CAS part B decisions");
    check(ev_took_y > 0, "CAS chose the Y direction");
    check(ev_vc1 > 0 && ev_vc2 > 0, "both Y virtual channels used");
    check(ev_stall > 0,  "flits stalled by backpressure");
    check(refusals > 0,  "refused injection attempts");
    $display("events: cs %0d cl %0d remote %0d partA %0d partB %0d tookY %0d vc1 %0d vc2 %0d stall %0d refused %0d",
             ev_cs, ev_cl, ev_remote, ev_part_a, ev_part_b, ev_took_y, ev_vc1, ev_vc2, ev_stall, refusals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
