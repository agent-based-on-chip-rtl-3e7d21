// Cluster agent of the lightweight agent network.
//
// The data mesh is split into clusters of CW x CH routers, each with one
// agent; the agents form their own mesh with one link per direction, as
// wide as a cluster's CL string. Every cycle the agent
//   1. collects the congestion levels of its local routers and concatenates
//      them into the cluster's CL string (router (lx,ly) of the cluster at
//      bit offset (ly*CW+lx)*CL_W), registered and sent to all four
//      neighbouring agents and back to the local routers, and
//   2. registers the CL strings received from the four neighbouring agents
//      and forwards them to the local routers.
// So each router sees the CL of every router in its own cluster and in the
// four adjacent clusters (the view, index 0 own, 1 north, 2 east, 3 south,
// 4 west), which is what the congestion-aware selection needs. A string
// crosses an agent link in one cycle, as in the published design. Missing
// neighbours at the mesh edge are tied to zero by the top level. Registering
// both paths, and the view ordering, are this design's choices.
module anoc_cluster_agent
  import anoc_pkg::*;
#(
  parameter int unsigned CW = 2,
  parameter int unsigned CH = 2,
  localparam int unsigned NLOC  = CW * CH,
  localparam int unsigned STR_W = NLOC * CL_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  cl_t [NLOC-1:0]        cl_local,  // CL of local router ly*CW+lx
  input  logic [3:0][STR_W-1:0] nb_in,     // strings from N, E, S, W agents
  output logic [STR_W-1:0]      str_out,   // own string, to the neighbouring agents
  output logic [4:0][STR_W-1:0] view       // to the local routers: own, N, E, S, W
);
  logic [3:0][STR_W-1:0] nb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      str_out <= '0;
      nb_q    <= '0;
    end else begin
      str_out <= cl_local;
      nb_q    <= nb_in;
    end
  end

  assign view = {nb_q, str_out};
endmodule
