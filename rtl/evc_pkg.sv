// evc_pkg: types and constants shared by the EVC power-gated mesh NoC.
//
// A flit is one 128-bit link transfer plus a small header sideband. The
// header carries the virtual network (VN), the express marking used on
// virtual bypass paths (express bit and the count of routers still to be
// bypassed), the latch marking used when a flit is sent into a router whose
// VC buffers are powered off, and source/destination coordinates.
// Three VNs with one normal VC (N-VC) and one express VC (E-VC) each, the
// 128-bit link and the 3-hop bypass length follow the design; the header
// field encoding is this implementation's own.
package evc_pkg;

  localparam int NUM_DIR   = 4;            // E(X+), W(X-), N(Y+), S(Y-)
  localparam int NUM_PORTS = NUM_DIR + 1;  // plus the local port
  localparam int P_LOCAL   = 4;
  localparam int D_EAST    = 0;
  localparam int D_WEST    = 1;
  localparam int D_NORTH   = 2;
  localparam int D_SOUTH   = 3;

  localparam int NUM_VN    = 3;            // VN0 control, VN1/VN2 data
  localparam int NUM_VC    = 2 * NUM_VN;   // VC index = kind*NUM_VN + vn, kind 1 = express
  localparam int COORD_W   = 3;            // up to an 8x8 mesh
  localparam int DATA_W    = 128;          // link width in bits
  localparam int EVC_HOPS  = 3;            // length of a virtual bypass path in hops

  typedef enum logic [1:0] {
    FT_HEAD     = 2'd0,
    FT_BODY     = 2'd1,
    FT_TAIL     = 2'd2,
    FT_HEADTAIL = 2'd3
  } ftype_e;

  typedef struct packed {
    ftype_e               ftype;
    logic [1:0]           vn;
    logic                 express;   // travelling on a virtual bypass path
    logic [1:0]           ehops;     // intermediate routers still to be bypassed
    logic                 to_latch;  // sent into the EVC latch of a powered-off router
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
    logic [COORD_W-1:0]   src_x;
    logic [COORD_W-1:0]   src_y;
    logic [DATA_W-1:0]    data;
  } flit_t;

  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  // Power states of the router's power control unit.
  typedef enum logic [1:0] {
    PS_ACTIVE = 2'd0,   // VCs powered, PG/PG_EVC de-asserted
    PS_IDLE   = 2'd1,   // idle detected, PG/PG_EVC asserted, VCs still powered
    PS_SLEEP  = 2'd2,   // VC supply cut off
    PS_WAKEUP = 2'd3    // VCs charging
  } pstate_e;

  // One-cycle event pulses of a router, for observation and counting.
  typedef struct packed {
    logic e_launch;    // a router launched an express flit on a bypass path
    logic latch_pass;  // an express flit bypassed the router through the EVC latch
    logic direct;      // an express flit bypassed the router through the direct link
    logic n_latch;     // a normal flit was held in the EVC latch of a powered-off router
    logic e_sink;      // an express flit ended its bypass path here (stored in an E-VC)
    logic starve;      // starvation detected on an output port
    logic sleep;       // VC supply cut off
    logic wakeup;      // charging started
  } router_ev_t;

  function automatic int opposite(input int d);
    return d ^ 1;
  endfunction

  function automatic logic is_head(input flit_t f);
    return (f.ftype == FT_HEAD) || (f.ftype == FT_HEADTAIL);
  endfunction

  function automatic logic is_tail(input flit_t f);
    return (f.ftype == FT_TAIL) || (f.ftype == FT_HEADTAIL);
  endfunction

endpackage
