// noc_pkg: sizes, types and constants shared by the congestion-aware mesh NoC.
//
// The network is a 2D mesh of five-port wormhole routers. Each input port holds
// NUM_VCS virtual-channel buffers, and flits move between routers with
// credit-based flow control. The sizes follow the published simulation set-up:
// 3 VCs per port, 5-flit buffers, 5-flit packets and a 7x7 mesh. The 32-bit flit
// payload matches the flit size shown on the set-up screen of the reference
// simulator. The port numbering, the header layout and the fixed-point format of
// the congestion metric are this design's own choices.
//
// The congestion metric is an unsigned fixed-point number with CM_FRAC
// fractional bits, so CM_ONE (1 << CM_FRAC) stands for 1.0.
package noc_pkg;

  // Mesh and router sizes
  parameter int unsigned MESH_X    = 7;   // columns
  parameter int unsigned MESH_Y    = 7;   // rows
  parameter int unsigned NUM_PORTS = 5;   // local + 4 neighbours
  parameter int unsigned NUM_VCS   = 3;   // virtual channels per input port
  parameter int unsigned BUF_DEPTH = 5;   // flits per VC buffer
  parameter int unsigned PKT_LEN   = 5;   // flits per packet (head, bodies, tail)

  // Flit format
  parameter int unsigned DATA_W  = 32;
  parameter int unsigned COORD_W = 3;                  // enough for up to 8x8
  parameter int unsigned TAG_W   = DATA_W - 4*COORD_W; // packet tag in the header

  // Congestion metric fixed point
  parameter int unsigned CM_FRAC = 8;
  parameter int unsigned CM_W    = CM_FRAC + 1;

  parameter int unsigned VC_W = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1;

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // towards row y-1
    P_EAST  = 3'd2,   // towards column x+1
    P_SOUTH = 3'd3,   // towards row y+1
    P_WEST  = 3'd4    // towards column x-1
  } port_e;

  typedef enum logic [1:0] {
    FT_HEAD = 2'd0,
    FT_BODY = 2'd1,
    FT_TAIL = 2'd2
  } flit_type_e;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [VC_W-1:0]    vc_id_t;
  typedef logic [CM_W-1:0]    cm_t;
  typedef logic [TAG_W-1:0]   tag_t;

  localparam cm_t CM_ONE = cm_t'(1 << CM_FRAC);

  // Payload of every flit of a packet: the routing fields and a tag.
  typedef struct packed {
    coord_t dst_x;
    coord_t dst_y;
    coord_t src_x;
    coord_t src_y;
    tag_t   tag;
  } head_payload_t;

  typedef struct packed {
    flit_type_e        ftype;
    logic [DATA_W-1:0] data;
  } flit_t;

  // One direction of a physical channel: a flit and the VC it travels on.
  typedef struct packed {
    logic   valid;
    vc_id_t vc;
    flit_t  flit;
  } link_t;

  // Credit returned upstream: one buffer slot of VC vc has been freed.
  typedef struct packed {
    logic   valid;
    vc_id_t vc;
  } credit_t;

  // Per-cycle event flags of a router, for observing its mechanisms.
  typedef struct packed {
    logic adaptive;     // a header with two productive directions won an output VC
    logic chose_y;      // ... and it took the Y direction because that neighbour was less congested
    logic cm_tie;       // ... and both neighbours had the same metric (X taken)
    logic va_stall;     // a header requested an output VC and got none
    logic sa_conflict;  // a flit ready to leave lost switch allocation
    logic credit_stall; // a flit holding an output VC waited for a credit
    logic cm_idle;      // no candidate VC: metric forced to 1.0
  } router_events_t;

endpackage
