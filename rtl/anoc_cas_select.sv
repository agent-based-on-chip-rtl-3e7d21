// Congestion-Aware Selection (CAS): chooses between the two productive
// output directions that the DyXY routing function offers.
//
// Inputs are the router's position, the packet's destination, the routing
// candidates and the congestion view from the cluster agent (CL strings of
// the own cluster and of the N, E, S, W clusters). The decision depends on
// where the destination's cluster lies relative to the own cluster:
//
//  Part B - same agent-column (or agent-row): the direction along that
//   column (row) is scored by the CLs of the 1-, 2- and 3-hop nodes ahead in
//   the source's network-column (row); the other direction by the nodes of
//   the destination's network-column (row), starting beside the source and
//   running in the same sense. Weights are 3, 2, 1. Only nodes on the
//   minimal path and inside the known clusters are used, and both sides use
//   the same number of nodes.
//  Part A - otherwise: each direction is scored by 3 x CL of the 1-hop
//   neighbour plus 2 x the congestion of the adjacent cluster in that
//   direction.
//
// The lower score wins; a tie goes to the X direction. With a single
// candidate that candidate is taken, at the destination the Local port.
// The cluster congestion in Part A is taken as the mean CL of its routers;
// to keep it exact both Part A scores are multiplied by four
// (12 x CL + 2 x sum of the cluster). Tie rule, that mean, the node-count
// rule and the choice of column when source and destination share the
// cluster are this design's readings of the published method.
// Purely combinational.
module anoc_cas_select
  import anoc_pkg::*;
#(
  parameter int unsigned CW = 2,
  parameter int unsigned CH = 2,
  localparam int unsigned NLOC  = CW * CH,
  localparam int unsigned STR_W = NLOC * CL_W
) (
  input  coord_t                cur_x,
  input  coord_t                cur_y,
  input  coord_t                dst_x,
  input  coord_t                dst_y,
  input  logic                  at_dest,
  input  logic                  cand_x,
  input  logic                  cand_y,
  input  port_e                 port_x,
  input  port_e                 port_y,
  input  logic [4:0][STR_W-1:0] view,     // own, N, E, S, W cluster strings
  output port_e                 sel,      // chosen output port
  output logic [1:0]            mode,     // 0: no choice, 1: part A, 2: part B
  output logic [7:0]            cong_x,   // score of the X direction
  output logic [7:0]            cong_y    // score of the Y direction
);
  // The view seen as a window of 3CW x 3CH routers centred on the own
  // cluster: window (wx, wy) holds the router at mesh position
  // (cluster_x*CW - CW + wx, cluster_y*CH - CH + wy). The corner clusters
  // of the window are not part of the view and read as unknown.
  localparam int unsigned WW = 3 * CW;
  localparam int unsigned WH = 3 * CH;

  typedef logic signed [COORD_W+2:0] sc_t;
  typedef struct packed { logic ok; cl_t cl; } look_t;

  cl_t  [WH-1:0][WW-1:0] win;
  logic [WH-1:0][WW-1:0] win_ok;

  always_comb begin
    for (int wy = 0; wy < int'(WH); wy++)
      for (int wx = 0; wx < int'(WW); wx++) begin
        int s;
        s = -1;
        if (wx / CW == 1 && wy / CH == 1) s = 0;   // own
        if (wx / CW == 1 && wy / CH == 0) s = 1;   // north
        if (wx / CW == 2 && wy / CH == 1) s = 2;   // east
        if (wx / CW == 1 && wy / CH == 2) s = 3;   // south
        if (wx / CW == 0 && wy / CH == 1) s = 4;   // west
        win_ok[wy][wx] = (s >= 0);
        win[wy][wx]    = (s >= 0) ? view[(s >= 0) ? s : 0][((wy % CH) * CW + (wx % CW)) * CL_W +: CL_W] : '0;
      end
  end

  function automatic look_t look(input sc_t wx, input sc_t wy);
    look_t r;
    r = '0;
    if (wx >= 0 && wx < sc_t'(WW) && wy >= 0 && wy < sc_t'(WH)) begin
      r.ok = win_ok[wy[COORD_W+1:0]][wx[COORD_W+1:0]];
      r.cl = win[wy[COORD_W+1:0]][wx[COORD_W+1:0]];
    end
    return r;
  endfunction

  function automatic logic [7:0] cluster_sum(input logic [2:0] vi);
    logic [7:0] s;
    s = '0;
    for (int i = 0; i < int'(NLOC); i++) s = s + 8'(view[vi][i*CL_W +: CL_W]);
    return s;
  endfunction

  // ---- geometry ----
  sc_t  ox, oy;        // window position of this router
  sc_t  dxo, dyo;      // destination offset
  sc_t  sx, sy;        // step towards the destination
  sc_t  dist_along;    // hops in the along direction (part B)
  logic along_y;       // part B runs along the agent-column
  logic part_b;

  always_comb begin
    ox  = sc_t'(cur_x % coord_t'(CW)) + sc_t'(CW);
    oy  = sc_t'(cur_y % coord_t'(CH)) + sc_t'(CH);
    dxo = sc_t'(dst_x) - sc_t'(cur_x);
    dyo = sc_t'(dst_y) - sc_t'(cur_y);
    sx  = (dxo > 0) ? sc_t'(1) : sc_t'(-1);
    sy  = (dyo > 0) ? sc_t'(1) : sc_t'(-1);
    along_y    = (dst_x / coord_t'(CW) == cur_x / coord_t'(CW));
    part_b     = along_y || (dst_y / coord_t'(CH) == cur_y / coord_t'(CH));
    dist_along = along_y ? ((dyo > 0) ? dyo : -dyo) : ((dxo > 0) ? dxo : -dxo);
  end

  // ---- the nodes each rule reads ----
  look_t [3:1] l_al, l_cr;   // part B: along-direction and cross-direction nodes
  look_t       l_nx, l_ny;   // part A: the two 1-hop neighbours

  always_comb begin
    for (int k = 1; k <= 3; k++) begin
      if (along_y) begin
        l_al[k] = look(ox,       oy + sc_t'(k) * sy);
        l_cr[k] = look(ox + dxo, oy + sc_t'(k - 1) * sy);
      end else begin
        l_al[k] = look(ox + sc_t'(k) * sx,     oy);
        l_cr[k] = look(ox + sc_t'(k - 1) * sx, oy + dyo);
      end
    end
    l_nx = look(ox + sx, oy);
    l_ny = look(ox, oy + sy);
  end

  // ---- scores and decision ----
  logic [3:1] use_k;   // hop k is used on both sides

  always_comb begin
    logic [7:0] s_al, s_cr;
    use_k[1] = l_al[1].ok && dist_along >= 1;
    use_k[2] = use_k[1] && l_al[2].ok && dist_along >= 2;
    use_k[3] = use_k[2] && l_al[3].ok && dist_along >= 3;
    s_al = '0;
    s_cr = '0;
    for (int k = 1; k <= 3; k++)
      if (use_k[k]) begin
        s_al = s_al + 8'(4 - k) * 8'(l_al[k].cl);
        s_cr = s_cr + 8'(4 - k) * 8'(l_cr[k].cl);
      end

    cong_x = '0;
    cong_y = '0;
    mode   = 2'd0;
    if (cand_x && cand_y) begin
      if (part_b) begin
        mode   = 2'd2;
        cong_x = along_y ? s_cr : s_al;
        cong_y = along_y ? s_al : s_cr;
      end else begin
        // Part A: neighbour (weight 3) and adjacent cluster (weight 2, as a mean).
        mode   = 2'd1;
        cong_x = 8'd12 * 8'(l_nx.cl) + 8'd2 * cluster_sum((sx > 0) ? 3'd2 : 3'd4);
        cong_y = 8'd12 * 8'(l_ny.cl) + 8'd2 * cluster_sum((sy > 0) ? 3'd3 : 3'd1);
      end
    end

    if (at_dest)                      sel = P_LOCAL;
    else if (cand_x && !cand_y)       sel = port_x;
    else if (cand_y && !cand_x)       sel = port_y;
    else if (cong_y < cong_x)         sel = port_y;
    else                              sel = port_x;
  end
endmodule
