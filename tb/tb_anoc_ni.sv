// Self-checking testbench of anoc_ni at node (3,1).
// Injection: random messages are offered with random router backpressure;
// every accepted message must come out as a 5-flit packet (head, three
// bodies, tail) whose header carries destination, source (3,1), tag and the
// subnetwork bit (1 exactly when the destination lies west), followed by
// the data words in order; one flit per cycle when the router has space.
// Ejection: random packets are fed in whenever the NI has space, the PE
// side takes them with a random rx_ready, and each message must match.
module tb_anoc_ni;
  import anoc_pkg::*;
  localparam int X = 3, Y = 1;
  logic clk = 0, rst_n = 0;
  logic msg_valid, msg_ready, rx_valid, rx_ready;
  coord_t msg_dst_x, msg_dst_y, rx_src_x, rx_src_y;
  logic [14:0] msg_tag, rx_tag;
  logic [3:0][31:0] msg_data, rx_data;
  link_t to_rt, from_rt;
  link_rdy_t to_rt_rdy, from_rt_rdy;
  int checks = 0, failures = 0;

  coord_t my_x = X, my_y = Y;
  anoc_ni dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  flit_t exp_tx[$];
  int n_acc = 0, n_tx_pkts = 0, n_rx_exp = 0, n_rx = 0, tx_flits = 0, tx_cycles = 0;
  typedef struct { int sx, sy, tag; logic [3:0][31:0] d; } rxm_t;
  rxm_t rx_exp[$];
  flit_t rx_src[$];
  logic tx_stall_en = 1;

  // injection side monitor and router model
  always @(posedge clk) if (rst_n) begin
    if (msg_valid && msg_ready) begin
      hdr_t h;
      flit_t f;
      h = '0; h.dst_x = msg_dst_x; h.dst_y = msg_dst_y; h.src_x = X; h.src_y = Y;
      h.subnet = (int'(msg_dst_x) < X); h.tag = msg_tag;
      f.ftype = FT_HEAD; f.data = h; exp_tx.push_back(f);
      for (int k = 0; k < 4; k++) begin
        f.ftype = (k == 3) ? FT_TAIL : FT_BODY; f.data = msg_data[k]; exp_tx.push_back(f);
      end
      n_acc++;
    end
    if (to_rt.valid && to_rt_rdy[0]) begin
      checks++;
      if (exp_tx.size() == 0 || to_rt.flit != exp_tx[0] || to_rt.vc != 0) begin
        failures++; $display("FAIL injected flit %h", to_rt.flit);
      end else void'(exp_tx.pop_front());
      if (is_tail(to_rt.flit.ftype)) n_tx_pkts++;
      tx_flits++;
    end
    if (to_rt.valid) tx_cycles++;
    if (to_rt.valid || to_rt_rdy[0]) begin
      checks++;
      if (to_rt.valid && !to_rt_rdy[0]) begin failures++; $display("FAIL flit sent without space"); end
    end
    if (rx_valid && rx_ready) begin
      checks++;
      if (rx_exp.size() == 0 || int'(rx_src_x) != rx_exp[0].sx || int'(rx_src_y) != rx_exp[0].sy
          || int'(rx_tag) != rx_exp[0].tag || rx_data != rx_exp[0].d) begin
        failures++; $display("FAIL received message");
      end else void'(rx_exp.pop_front());
      n_rx++;
    end
  end

  always @(negedge clk) begin
    to_rt_rdy <= tx_stall_en ? {1'b0, 1'($urandom_range(0, 3) != 0)} : 2'b01;
    rx_ready  <= ($urandom_range(0, 2) != 0);
    if (from_rt_rdy[0] && rx_src.size() > 0) begin
      from_rt.valid <= 1; from_rt.vc <= 0; from_rt.flit <= rx_src.pop_front();
    end else from_rt <= '0;
  end

  initial begin
    msg_valid = 0; msg_dst_x = 0; msg_dst_y = 0; msg_tag = 0; msg_data = '0;
    from_rt = '0; to_rt_rdy = '0; rx_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ejection stimulus
    for (int i = 0; i < 300; i++) begin
      rxm_t m;
      hdr_t h;
      flit_t f;
      m.sx = $urandom_range(0, 5); m.sy = $urandom_range(0, 5); m.tag = $urandom_range(0, 32767);
      for (int k = 0; k < 4; k++) m.d[k] = $urandom;
      rx_exp.push_back(m);
      h = '0; h.dst_x = X; h.dst_y = Y; h.src_x = coord_t'(m.sx); h.src_y = coord_t'(m.sy); h.tag = 15'(m.tag);
      f.ftype = FT_HEAD; f.data = h; rx_src.push_back(f);
      for (int k = 0; k < 4; k++) begin
        f.ftype = (k == 3) ? FT_TAIL : FT_BODY; f.data = m.d[k]; rx_src.push_back(f);
      end
    end
    // injection stimulus
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      msg_valid = ($urandom_range(0, 3) != 0);
      msg_dst_x = coord_t'($urandom_range(0, 5)); msg_dst_y = coord_t'($urandom_range(0, 5));
      msg_tag = 15'($urandom);
      for (int k = 0; k < 4; k++) msg_data[k] = $urandom;
    end
    msg_valid = 0;
    // rate: with no backpressure one packet = 5 consecutive flits
    tx_stall_en = 0;
    repeat (200) @(negedge clk);
    begin
      int f0, c0;
      f0 = tx_flits;
      @(negedge clk);
      msg_valid = 1; msg_dst_x = 0; msg_dst_y = 0; msg_tag = 1; msg_data = '0;
      @(negedge clk);
      msg_valid = 0;
      repeat (5) @(negedge clk);
      check(tx_flits - f0 == 5, "5 flits in 5 cycles without backpressure");
    end
    for (int t = 0; t < 20000 && n_rx < 300; t++) @(negedge clk);
    check(exp_tx.size() == 0 && n_tx_pkts == n_acc, "every accepted message injected");
    check(rx_exp.size() == 0 && n_rx == 300, "every packet delivered to the PE");
    $display("accepted %0d injected %0d received %0d", n_acc, n_tx_pkts, n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
