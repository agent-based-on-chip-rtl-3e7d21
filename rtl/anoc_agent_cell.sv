// Agent cell unit of a router: computes the router's congestion level (CL).
//
// CL is the number of the router's seven input buffers (Local, East, West,
// North vc1, North vc2, South vc1, South vc2) whose congestion status is
// set, as in the published design; e.g. two congested buffers give CL = 2.
// The sum is registered so that the value handed to the cluster agent is a
// clean flip-flop output (one cycle of latency, this design's choice).
module anoc_agent_cell
  import anoc_pkg::*;
#(
  parameter int unsigned N_IN = NUM_VCS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_IN-1:0] cs,   // congestion status per input buffer
  output cl_t             cl
);
  cl_t sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < int'(N_IN); i++) sum = sum + cl_t'(cs[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cl <= '0;
    else        cl <= sum;
  end
endmodule
