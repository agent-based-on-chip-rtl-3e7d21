// Network interface (NI) between a processing element and its router's
// Local port.
//
// Injection: the PE hands over one message (destination, a 15-bit tag and
// PKT_FLITS-1 data words) with a valid/ready handshake. The NI turns it into
// a PKT_FLITS-flit wormhole packet: a header flit carrying destination,
// source, DyXY subnetwork bit and tag, then the data words as body flits,
// the last one typed as tail. One flit leaves per cycle while the router's
// Local input VC has space. The NI holds one message; msg_ready is high when
// it is empty, so a refused msg_valid is a failed injection attempt.
//
// Ejection: flits from the router's Local output are collected until the
// tail arrives; the message (source, tag, data) is then offered to the PE
// with rx_valid until rx_ready. While a message waits the NI tells the
// router it has no space, so packets back up into the network.
// The 5-flit packet and 32-bit flit follow the published design; the
// message interface, the header layout and the single message of buffering
// are this design's choices. The Local port has a single VC, so the VC field
// of to_rt and the second ready bit of from_rt_rdy are constant 0.
module anoc_ni
  import anoc_pkg::*;
#(
  localparam int unsigned NW = PKT_FLITS - 1   // data words per packet
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  coord_t                    my_x,      // position of this node (strapped)
  input  coord_t                    my_y,
  // PE side, injection
  input  logic                      msg_valid,
  output logic                      msg_ready,
  input  coord_t                    msg_dst_x,
  input  coord_t                    msg_dst_y,
  input  logic [14:0]               msg_tag,
  input  logic [NW-1:0][FLIT_W-1:0] msg_data,
  // PE side, ejection
  output logic                      rx_valid,
  input  logic                      rx_ready,
  output coord_t                    rx_src_x,
  output coord_t                    rx_src_y,
  output logic [14:0]               rx_tag,
  output logic [NW-1:0][FLIT_W-1:0] rx_data,
  // router side
  output link_t                     to_rt,
  input  link_rdy_t                 to_rt_rdy,
  input  link_t                     from_rt,
  output link_rdy_t                 from_rt_rdy
);
  localparam int unsigned IW = $clog2(PKT_FLITS);

  // ---------------- injection ----------------
  logic                      tx_busy;
  logic [IW-1:0]             tx_idx;
  hdr_t                      tx_hdr;
  logic [NW-1:0][FLIT_W-1:0] tx_data;
  logic                      tx_fire;

  assign msg_ready = !tx_busy;
  assign tx_fire   = tx_busy && to_rt_rdy[0];

  always_comb begin
    to_rt       = '0;
    to_rt.valid = tx_fire;   // a link flit is a transfer: only sent into free space
    to_rt.vc    = 1'b0;
    if (tx_idx == '0) begin
      to_rt.flit.ftype = FT_HEAD;
      to_rt.flit.data  = tx_hdr;
    end else begin
      to_rt.flit.ftype = (tx_idx == IW'(PKT_FLITS - 1)) ? FT_TAIL : FT_BODY;
      to_rt.flit.data  = tx_data[tx_idx - 1'b1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy <= 1'b0;
      tx_idx  <= '0;
      tx_hdr  <= '0;
      tx_data <= '0;
    end else if (!tx_busy) begin
      if (msg_valid) begin
        tx_busy       <= 1'b1;
        tx_idx        <= '0;
        tx_hdr.dst_x  <= msg_dst_x;
        tx_hdr.dst_y  <= msg_dst_y;
        tx_hdr.src_x  <= my_x;
        tx_hdr.src_y  <= my_y;
        tx_hdr.subnet <= (msg_dst_x < my_x);  // west-bound: decreasing subnetwork
        tx_hdr.tag    <= msg_tag;
        tx_data       <= msg_data;
      end
    end else if (tx_fire) begin
      if (tx_idx == IW'(PKT_FLITS - 1)) begin
        tx_busy <= 1'b0;
        tx_idx  <= '0;
      end else begin
        tx_idx <= tx_idx + 1'b1;
      end
    end
  end

  // ---------------- ejection ----------------
  logic [IW-1:0] rx_idx;
  hdr_t          rx_hdr;

  assign from_rt_rdy = {1'b0, !rx_valid};
  assign rx_src_x    = rx_hdr.src_x;
  assign rx_src_y    = rx_hdr.src_y;
  assign rx_tag      = rx_hdr.tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_valid <= 1'b0;
      rx_idx   <= '0;
      rx_hdr   <= '0;
      rx_data  <= '0;
    end else begin
      if (rx_valid && rx_ready) rx_valid <= 1'b0;
      if (from_rt.valid && !rx_valid) begin
        if (is_head(from_rt.flit.ftype)) begin
          rx_hdr <= hdr_t'(from_rt.flit.data);
          rx_idx <= IW'(1);
        end else begin
          rx_data[rx_idx - 1'b1] <= from_rt.flit.data;
          rx_idx                 <= rx_idx + 1'b1;
        end
        if (is_tail(from_rt.flit.ftype)) rx_valid <= 1'b1;
      end
    end
  end

  a_rx_flow: assert property (@(posedge clk) disable iff (!rst_n) from_rt.valid |-> !rx_valid);
endmodule
