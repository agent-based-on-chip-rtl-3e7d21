// Agent-based network-on-chip (ANoC): top level.
//
// Two meshes side by side. The data network is a MESH_W x MESH_H mesh of
// wormhole routers (anoc_router), each with a network interface (anoc_ni)
// to its processing element; node n = y*MESH_W + x, row 0 is the north
// edge. The agent network splits the data mesh into clusters of CW x CH
// routers; each cluster has one agent (anoc_cluster_agent), and the agents
// are linked in their own mesh. Routers report their congestion level to
// their agent, agents exchange the per-cluster CL strings and hand every
// router the CL of its own and its four adjacent clusters, and each router
// uses that view to choose between the two minimal directions of a packet.
//
// The processing elements are outside: each node's message ports are
// brought out (injection msg_*, ejection rx_*), together with every
// router's congestion level (cl). Defaults are the 36-node, 6x6 mesh with
// nine 2x2 clusters of the published design. Edge links and missing
// neighbour agents are tied off. MESH_W and MESH_H must be multiples of the
// cluster size and at most 16.
module anoc_top
  import anoc_pkg::*;
#(
  parameter int unsigned MESH_W = 6,
  parameter int unsigned MESH_H = 6,
  parameter int unsigned CW     = 2,
  parameter int unsigned CH     = 2,
  localparam int unsigned N     = MESH_W * MESH_H,
  localparam int unsigned NW    = PKT_FLITS - 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic   [N-1:0]                    msg_valid,
  output logic   [N-1:0]                    msg_ready,
  input  coord_t [N-1:0]                    msg_dst_x,
  input  coord_t [N-1:0]                    msg_dst_y,
  input  logic   [N-1:0][14:0]              msg_tag,
  input  logic   [N-1:0][NW-1:0][FLIT_W-1:0] msg_data,
  output logic   [N-1:0]                    rx_valid,
  input  logic   [N-1:0]                    rx_ready,
  output coord_t [N-1:0]                    rx_src_x,
  output coord_t [N-1:0]                    rx_src_y,
  output logic   [N-1:0][14:0]              rx_tag,
  output logic   [N-1:0][NW-1:0][FLIT_W-1:0] rx_data,
  output cl_t    [N-1:0]                    cl
);
  localparam int unsigned NCX   = MESH_W / CW;
  localparam int unsigned NCY   = MESH_H / CH;
  localparam int unsigned STR_W = CW * CH * CL_W;

  initial begin
    assert (MESH_W % CW == 0 && MESH_H % CH == 0 && MESH_W <= 16 && MESH_H <= 16)
      else $error("anoc_top: mesh must be a multiple of the cluster size and at most 16x16");
  end

  link_t     [N-1:0][4:0] r_in, r_out;
  link_rdy_t [N-1:0][4:0] r_in_rdy, r_out_rdy;
  logic [NCX*NCY-1:0][STR_W-1:0]      ag_str;
  logic [NCX*NCY-1:0][4:0][STR_W-1:0] ag_view;

  // ---------------- data network ----------------
  for (genvar y = 0; y < MESH_H; y++) begin : g_y
    for (genvar x = 0; x < MESH_W; x++) begin : g_x
      localparam int unsigned ID = y * MESH_W + x;

      // North neighbour (y-1) talks to our North port through its South port.
      if (y > 0) begin : g_n
        assign r_in[ID][P_NORTH]     = r_out[ID - MESH_W][P_SOUTH];
        assign r_out_rdy[ID][P_NORTH] = r_in_rdy[ID - MESH_W][P_SOUTH];
      end else begin : g_n0
        assign r_in[ID][P_NORTH]     = '0;
        assign r_out_rdy[ID][P_NORTH] = '0;
      end
      if (y < MESH_H - 1) begin : g_s
        assign r_in[ID][P_SOUTH]     = r_out[ID + MESH_W][P_NORTH];
        assign r_out_rdy[ID][P_SOUTH] = r_in_rdy[ID + MESH_W][P_NORTH];
      end else begin : g_s0
        assign r_in[ID][P_SOUTH]     = '0;
        assign r_out_rdy[ID][P_SOUTH] = '0;
      end
      if (x < MESH_W - 1) begin : g_e
        assign r_in[ID][P_EAST]      = r_out[ID + 1][P_WEST];
        assign r_out_rdy[ID][P_EAST] = r_in_rdy[ID + 1][P_WEST];
      end else begin : g_e0
        assign r_in[ID][P_EAST]      = '0;
        assign r_out_rdy[ID][P_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in[ID][P_WEST]      = r_out[ID - 1][P_EAST];
        assign r_out_rdy[ID][P_WEST] = r_in_rdy[ID - 1][P_EAST];
      end else begin : g_w0
        assign r_in[ID][P_WEST]      = '0;
        assign r_out_rdy[ID][P_WEST] = '0;
      end

      anoc_router #(.CW(CW), .CH(CH)) u_rt (
        .clk, .rst_n,
        .my_x    (coord_t'(x)), .my_y(coord_t'(y)),
        .in_link (r_in[ID]),  .in_rdy (r_in_rdy[ID]),
        .out_link(r_out[ID]), .out_rdy(r_out_rdy[ID]),
        .view    (ag_view[(y / CH) * NCX + (x / CW)]),
        .cl      (cl[ID]),
        .cs      ()
      );

      anoc_ni u_ni (
        .clk, .rst_n,
        .my_x     (coord_t'(x)),  .my_y     (coord_t'(y)),
        .msg_valid(msg_valid[ID]), .msg_ready(msg_ready[ID]),
        .msg_dst_x(msg_dst_x[ID]), .msg_dst_y(msg_dst_y[ID]),
        .msg_tag  (msg_tag[ID]),   .msg_data (msg_data[ID]),
        .rx_valid (rx_valid[ID]),  .rx_ready (rx_ready[ID]),
        .rx_src_x (rx_src_x[ID]),  .rx_src_y (rx_src_y[ID]),
        .rx_tag   (rx_tag[ID]),    .rx_data  (rx_data[ID]),
        .to_rt    (r_in[ID][P_LOCAL]),  .to_rt_rdy  (r_in_rdy[ID][P_LOCAL]),
        .from_rt  (r_out[ID][P_LOCAL]), .from_rt_rdy(r_out_rdy[ID][P_LOCAL])
      );
    end
  end

  // ---------------- agent network ----------------
  for (genvar j = 0; j < NCY; j++) begin : g_cy
    for (genvar i = 0; i < NCX; i++) begin : g_cx
      localparam int unsigned CID = j * NCX + i;
      cl_t [CW*CH-1:0]       cl_loc;
      logic [3:0][STR_W-1:0] nb;

      for (genvar ly = 0; ly < CH; ly++) begin : g_ly
        for (genvar lx = 0; lx < CW; lx++) begin : g_lx
          assign cl_loc[ly * CW + lx] = cl[(j * CH + ly) * MESH_W + i * CW + lx];
        end
      end

      assign nb[0] = (j > 0)       ? ag_str[(j > 0 ? CID - NCX : CID)]       : '0;  // north
      assign nb[1] = (i < NCX - 1) ? ag_str[(i < NCX - 1 ? CID + 1 : CID)]   : '0;  // east
      assign nb[2] = (j < NCY - 1) ? ag_str[(j < NCY - 1 ? CID + NCX : CID)] : '0;  // south
      assign nb[3] = (i > 0)       ? ag_str[(i > 0 ? CID - 1 : CID)]         : '0;  // west

      anoc_cluster_agent #(.CW(CW), .CH(CH)) u_agent (
        .clk, .rst_n,
        .cl_local(cl_loc), .nb_in(nb),
        .str_out (ag_str[CID]), .view(ag_view[CID])
      );
    end
  end
endmodule
