// Wormhole router of the ANoC data network with DyXY routing and
// congestion-aware selection (CAS).
//
// Five physical ports (Local, North, East, South, West; see anoc_pkg). Each
// of the seven input virtual channels (Local, East, West, North vc1/vc2,
// South vc1/vc2) has a BUF_DEPTH-flit buffer with a congestion detector; the
// agent cell unit adds up the seven congestion bits into the router's
// congestion level cl, which goes to the cluster agent. In return the agent
// supplies the view: CL strings of the own and the four adjacent clusters.
//
// When a header flit reaches the head of an input buffer, the DyXY routing
// function lists the productive directions and CAS picks one using the view;
// Y outputs use the VC named by the header's subnetwork bit. The header
// competes for the chosen output VC only while that VC is free, and it
// re-evaluates the choice every cycle until it wins, so selection follows
// the congestion seen at the time of departure. Winning locks the output VC
// to the input VC until the tail flit leaves (wormhole switching). Each
// output port passes one flit per cycle, chosen round-robin among the input
// VCs that have a flit, own (or may claim) an output VC on that port and see
// space downstream.
//
// Timing: a flit written into an input buffer at one clock edge can leave
// at the next one, straight into the downstream buffer, so a free path
// costs one cycle per hop. Flow control is on/off per VC: in_rdy[p][vc] is
// the buffer's not-full bit, a register output; the Local, East and West
// ports have one VC, so their in_rdy[p][1] is constant 0. The crossbar has
// one input per input VC (7 x 5). Per-VC crossbar inputs, on/off flow
// control and the same-cycle departure are this design's choices, as is
// taking the router's position from the strapped inputs my_x/my_y, so that
// all routers are one identical circuit; buffer size, the seven buffers,
// congestion detection and selection follow the published design.
module anoc_router
  import anoc_pkg::*;
#(
  parameter int unsigned CW = 2,
  parameter int unsigned CH = 2,
  localparam int unsigned STR_W = CW * CH * CL_W,
  localparam int unsigned CNT_W = $clog2(BUF_DEPTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  coord_t                my_x,      // position of this router (strapped)
  input  coord_t                my_y,
  input  link_t     [4:0]       in_link,   // indexed by port_e
  output link_rdy_t [4:0]       in_rdy,
  output link_t     [4:0]       out_link,
  input  link_rdy_t [4:0]       out_rdy,
  input  logic [4:0][STR_W-1:0] view,      // own, N, E, S, W cluster CL strings
  output cl_t                   cl,        // congestion level, to the cluster agent
  output logic [NUM_VCS-1:0]    cs         // congestion status per input VC
);
  // ---------------- input virtual channels ----------------
  logic [NUM_VCS-1:0]            push, pop, empty, full;
  flit_t [NUM_VCS-1:0]           head;
  logic [NUM_VCS-1:0][CNT_W-1:0] count;

  for (genvar v = 0; v < NUM_VCS; v++) begin : g_ivc
    localparam port_e P   = vc_port(v);
    localparam logic  SUB = vc_sub(v);

    assign push[v] = in_link[P].valid && (in_link[P].vc == SUB);

    anoc_fifo #(.DEPTH(BUF_DEPTH), .WIDTH($bits(flit_t))) u_buf (
      .clk, .rst_n,
      .push (push[v]), .din (in_link[P].flit),
      .pop  (pop[v]),  .dout(head[v]),
      .empty(empty[v]), .full(full[v]), .count(count[v])
    );

    anoc_cong_detect #(.DEPTH(BUF_DEPTH), .THRESH(CONG_THRESH), .HIST_LEN(HIST_LEN)) u_cd (
      .clk, .rst_n,
      .flit_rx(push[v]), .flit_tx(pop[v]), .count(count[v]), .cs(cs[v])
    );
  end

  always_comb begin
    in_rdy = '0;
    for (int v = 0; v < NUM_VCS; v++) in_rdy[vc_port(v)][vc_sub(v)] = !full[v];
  end

  anoc_agent_cell #(.N_IN(NUM_VCS)) u_acu (.clk, .rst_n, .cs, .cl);

  // ---------------- routing and selection per input VC ----------------
  port_e [NUM_VCS-1:0]      sel;
  logic  [NUM_VCS-1:0][1:0] mode;
  hdr_t  [NUM_VCS-1:0]      hdr;

  for (genvar v = 0; v < NUM_VCS; v++) begin : g_rc
    logic  at_dest, cand_x, cand_y, subnet_unused;
    port_e port_x, port_y;
    logic [7:0] cong_x, cong_y;

    assign hdr[v] = hdr_t'(head[v].data);

    anoc_route_dyxy u_route (
      .cur_x(my_x), .cur_y(my_y),
      .dst_x(hdr[v].dst_x), .dst_y(hdr[v].dst_y),
      .at_dest, .cand_x, .cand_y, .port_x, .port_y, .subnet_of(subnet_unused)
    );

    anoc_cas_select #(.CW(CW), .CH(CH)) u_cas (
      .cur_x(my_x), .cur_y(my_y),
      .dst_x(hdr[v].dst_x), .dst_y(hdr[v].dst_y),
      .at_dest, .cand_x, .cand_y, .port_x, .port_y, .view,
      .sel(sel[v]), .mode(mode[v]), .cong_x, .cong_y
    );
  end

  // ---------------- output VC ownership and switch allocation ----------------
  logic [NUM_VCS-1:0]      held;      // input VC owns an output VC
  logic [NUM_VCS-1:0][2:0] own_ovc;   // the output VC it owns
  logic [NUM_VCS-1:0]      ovc_busy;  // output VC is owned by some input VC
  logic [NUM_VCS-1:0][2:0] req_ovc;
  logic [NUM_VCS-1:0]      can_go;
  logic [4:0][NUM_VCS-1:0] sw_req, sw_gnt;

  always_comb begin
    for (int v = 0; v < NUM_VCS; v++) begin
      req_ovc[v] = held[v] ? own_ovc[v] : vc_index(sel[v], hdr[v].subnet);
      can_go[v]  = !empty[v]
                && (held[v] || (is_head(head[v].ftype) && !ovc_busy[req_ovc[v]]))
                && out_rdy[vc_port(int'(req_ovc[v]))][vc_sub(int'(req_ovc[v]))];
    end
    for (int q = 0; q < 5; q++)
      for (int v = 0; v < NUM_VCS; v++)
        sw_req[q][v] = can_go[v] && (vc_port(int'(req_ovc[v])) == port_e'(q));
  end

  for (genvar q = 0; q < 5; q++) begin : g_sa
    anoc_rr_arb #(.N(NUM_VCS)) u_arb (.clk, .rst_n, .req(sw_req[q]), .grant(sw_gnt[q]));
  end

  always_comb begin
    pop      = '0;
    out_link = '0;
    for (int q = 0; q < 5; q++)
      for (int v = 0; v < NUM_VCS; v++)
        if (sw_gnt[q][v]) begin
          pop[v]              = 1'b1;
          out_link[q].valid   = 1'b1;
          out_link[q].vc      = vc_sub(int'(req_ovc[v]));
          out_link[q].flit    = head[v];
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held     <= '0;
      own_ovc  <= '0;
      ovc_busy <= '0;
    end else begin
      for (int v = 0; v < NUM_VCS; v++) begin
        if (pop[v]) begin
          if (is_head(head[v].ftype) && !is_tail(head[v].ftype)) begin
            held[v]              <= 1'b1;
            own_ovc[v]           <= req_ovc[v];
            ovc_busy[req_ovc[v]] <= 1'b1;
          end else if (is_tail(head[v].ftype)) begin
            held[v]              <= 1'b0;
            ovc_busy[req_ovc[v]] <= 1'b0;
          end
        end
      end
    end
  end

  // A flit at the head of a VC that owns no output VC must be a header.
  a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
                                 (!empty[0] && !held[0]) |-> is_head(head[0].ftype));
  for (genvar v = 1; v < NUM_VCS; v++) begin : g_chk
    a_head_first_v: assert property (@(posedge clk) disable iff (!rst_n)
                                     (!empty[v] && !held[v]) |-> is_head(head[v].ftype));
  end
endmodule
