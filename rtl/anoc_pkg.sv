// Shared types and constants of the agent-based network-on-chip (ANoC).
//
// The data network is a 2D mesh of wormhole routers. Each router has five
// physical ports (Local, North, East, South, West). The Y-direction links
// carry two virtual channels (vc1 = increasing subnetwork, vc2 = decreasing
// subnetwork of Dynamic-XY routing), the others one, so a router has seven
// input virtual channels and seven output virtual channels. A flit is a
// 32-bit word plus a 2-bit type. The header flit's word holds the routing
// fields defined by hdr_t. The congestion level (CL) of a router is the
// number of its congested input buffers (0..7, 3 bits).
//
// Numbers from the published design: 32-bit flits, 6-flit buffers,
// threshold 4, 4-bit history, 5-flit packets, seven input buffers.
// Own choices: header layout, 4-bit coordinates (meshes up to 16x16),
// port and VC numbering.
package anoc_pkg;

  localparam int unsigned FLIT_W      = 32;  // data width of a flit
  localparam int unsigned COORD_W     = 4;   // width of a mesh coordinate
  localparam int unsigned CL_W        = 3;   // congestion level 0..7
  localparam int unsigned NUM_PORTS   = 5;   // L, N, E, S, W
  localparam int unsigned NUM_VCS     = 7;   // input (and output) VCs per router
  localparam int unsigned PKT_FLITS   = 5;   // flits per packet
  localparam int unsigned BUF_DEPTH   = 6;   // flits per input VC buffer
  localparam int unsigned CONG_THRESH = 4;   // occupancy that counts as congested
  localparam int unsigned HIST_LEN    = 4;   // history shift register length

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [CL_W-1:0]    cl_t;

  // Physical port numbering.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,  // towards row y-1
    P_EAST  = 3'd2,  // towards column x+1
    P_SOUTH = 3'd3,  // towards row y+1
    P_WEST  = 3'd4   // towards column x-1
  } port_e;

  typedef enum logic [1:0] {
    FT_BODY   = 2'd0,
    FT_HEAD   = 2'd1,
    FT_TAIL   = 2'd2,
    FT_SINGLE = 2'd3   // head and tail in one flit
  } ftype_e;

  typedef struct packed {
    ftype_e              ftype;
    logic [FLIT_W-1:0]   data;
  } flit_t;

  // Layout of the header flit's data word.
  typedef struct packed {
    coord_t      dst_x;
    coord_t      dst_y;
    coord_t      src_x;
    coord_t      src_y;
    logic        subnet;  // 0: increasing subnetwork (vc1), 1: decreasing (vc2)
    logic [14:0] tag;     // free for the sender (sequence number, time stamp)
  } hdr_t;

  // Forward half of a link: one flit per cycle, tagged with its VC.
  typedef struct packed {
    logic   valid;
    logic   vc;     // 0 = vc1, 1 = vc2; always 0 on X links and local links
    flit_t  flit;
  } link_t;

  // Backward half of a link: per-VC space in the receiving buffer.
  typedef logic [1:0] link_rdy_t;

  // Input / output virtual channel numbering inside a router.
  //   0: Local  1: East  2: West  3: North vc1  4: North vc2  5: South vc1  6: South vc2
  function automatic port_e vc_port(input int unsigned v);
    case (v)
      0:       return P_LOCAL;
      1:       return P_EAST;
      2:       return P_WEST;
      3, 4:    return P_NORTH;
      default: return P_SOUTH;
    endcase
  endfunction

  function automatic logic vc_sub(input int unsigned v);
    return (v == 4 || v == 6);
  endfunction

  function automatic logic [2:0] vc_index(input port_e p, input logic sub);
    case (p)
      P_LOCAL: return 3'd0;
      P_EAST:  return 3'd1;
      P_WEST:  return 3'd2;
      P_NORTH: return sub ? 3'd4 : 3'd3;
      default: return sub ? 3'd6 : 3'd5;
    endcase
  endfunction

  function automatic logic is_head(input ftype_e t);
    return (t == FT_HEAD || t == FT_SINGLE);
  endfunction

  function automatic logic is_tail(input ftype_e t);
    return (t == FT_TAIL || t == FT_SINGLE);
  endfunction

endpackage
