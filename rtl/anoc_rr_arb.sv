// Round-robin arbiter used by the router's switch allocation.
//
// Grants one of the N requesters, searching from the one after the last
// winner, so every persistent requester is served within N grants. grant is
// one-hot (or zero) and combinational from req; the priority pointer moves
// on the clock edge after a grant.
module anoc_rr_arb #(
  parameter int unsigned N = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;

  always_comb begin
    int idx;
    logic found;
    grant = '0;
    found = 1'b0;
    for (int i = 1; i <= int'(N); i++) begin
      idx = (int'(last) + i) % int'(N);
      if (!found && req[idx]) begin
        grant[idx] = 1'b1;
        found      = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= IW'(N - 1);
    else begin
      for (int i = 0; i < int'(N); i++)
        if (grant[i]) last <= IW'(i);
    end
  end
endmodule
