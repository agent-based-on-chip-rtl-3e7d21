// Congestion detector of one input buffer (history-based congestion status).
//
// On every flit event of the buffer (a flit enters or leaves it) the
// threshold signal is sampled into a HIST_LEN-bit shift register. The
// threshold signal is 1 when the buffer holds at least THRESH flits after
// the event. The congestion status cs is 1 when every bit of the history
// is 1, i.e. the buffer stayed at or above the threshold over the last
// HIST_LEN events. This follows the published circuit (4-bit history,
// threshold 4 of 6 slots); sampling the occupancy after the event, and
// counting a simultaneous enter and leave as one event, are this design's
// choices. cs is a register output, valid one cycle after the event.
module anoc_cong_detect #(
  parameter int unsigned DEPTH    = anoc_pkg::BUF_DEPTH,
  parameter int unsigned THRESH   = anoc_pkg::CONG_THRESH,
  parameter int unsigned HIST_LEN = anoc_pkg::HIST_LEN
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flit_rx,   // a flit is written this cycle
  input  logic                       flit_tx,   // a flit is read this cycle
  input  logic [$clog2(DEPTH+1)-1:0] count,     // occupancy before this cycle's events
  output logic                       cs
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [HIST_LEN-1:0] hist;
  logic [CW-1:0]       count_next;
  logic                thr;

  always_comb begin
    count_next = count;
    if (flit_rx && !flit_tx) count_next = count + 1'b1;
    if (flit_tx && !flit_rx) count_next = count - 1'b1;
    thr = (count_next >= CW'(THRESH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                hist <= '0;
    else if (flit_rx || flit_tx) hist <= {hist[HIST_LEN-2:0], thr};
  end

  assign cs = &hist;
endmodule
