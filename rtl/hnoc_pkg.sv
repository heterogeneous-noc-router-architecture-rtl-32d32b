// hnoc_pkg: types and constants shared by the heterogeneous shared-buffer router.
//
// The router has five ports (local plus the four mesh directions).  Every port
// carries up to MAX_PFC flits per clock ("parallel flits per cycle", PFC) and
// has up to MAX_VC virtual channels; the actual PFC and VC count of each
// unidirectional port are parameters of the router, so a port bundle is sized
// for the maximum and the unused lanes stay idle.
//
// A link lane carries one 32-bit flit plus a valid bit, the VC id and the flit
// type.  A credit lane returns one buffer slot of one VC to the upstream side.
// Head flits hold the destination coordinates in their low byte
// (x in [3:0], y in [7:4]); the rest of every flit is payload.  The flit size
// of 32 bits follows the evaluated configuration; the head-flit layout, the
// separate flit-type and VC wires and the port numbering are this design's own
// choices.
package hnoc_pkg;

  localparam int NP       = 5;    // router ports
  localparam int FLIT_W   = 32;   // flit size in bits
  localparam int MAX_PFC  = 2;    // widest link, flits per clock
  localparam int MAX_VC   = 4;    // most VCs on one unidirectional port
  localparam int VC_W     = 2;    // VC id width, clog2(MAX_VC)
  localparam int PORT_W   = 3;    // port id width
  localparam int COORD_W  = 4;    // mesh coordinate width (16x16 mesh)

  // Default port configuration of the router (local, north, east, south,
  // west).  The local port injects and the east link carries two flits per
  // clock; the others one.  The per-port VC counts differ as well.
  localparam int DEF_IP_PFC [NP] = '{2, 1, 1, 1, 1};
  localparam int DEF_OP_PFC [NP] = '{1, 1, 2, 1, 1};
  localparam int DEF_IP_VC  [NP] = '{2, 2, 3, 2, 2};
  localparam int DEF_OP_VC  [NP] = '{2, 3, 2, 2, 2};

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // towards larger y
    P_EAST  = 3'd2,   // towards larger x
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FT_BODY   = 2'd0,
    FT_HEAD   = 2'd1,
    FT_TAIL   = 2'd2,
    FT_SINGLE = 2'd3     // head and tail at once
  } ftype_e;

  typedef struct packed {
    ftype_e              ftype;
    logic [FLIT_W-1:0]   data;
  } flit_t;

  typedef struct packed {
    logic                valid;
    logic [VC_W-1:0]     vc;
    flit_t               flit;
  } lane_t;

  typedef struct packed {
    logic                valid;
    logic [VC_W-1:0]     vc;
  } credit_t;

  // Tag part of one shared-buffer cell (what the schedulers look at).
  typedef struct packed {
    logic                valid;
    logic [PORT_W-1:0]   oport;   // destination output port
    logic [VC_W-1:0]     ovc;     // VC on that output
    logic [PORT_W-1:0]   src;     // input port that wrote it
  } cell_tag_t;

  typedef struct packed {
    cell_tag_t           tag;
    flit_t               flit;
  } cell_t;

  // One-cycle event pulses, so a test or a performance counter can see which
  // scheduling mechanisms acted.
  typedef struct packed {
    logic dep_conflict;   // a flit skipped a time slot whose output was full
    logic arr_conflict;   // a time-stamped flit found no shared buffer
    logic spread;         // one input's flits of one cycle got different slots
    logic multi_write;    // a shared buffer took more than one flit in a cycle
    logic rsv_block;      // the slot reservation of other inputs stopped a flit
    logic credit_stall;   // a ready VC had no credit downstream
    logic vca_wait;       // a head flit waited for a free output VC
    logic merge;          // one output sent flits of several inputs in a cycle
  } events_t;

  function automatic logic is_head(ftype_e t);
    return (t == FT_HEAD) || (t == FT_SINGLE);
  endfunction

  function automatic logic is_tail(ftype_e t);
    return (t == FT_TAIL) || (t == FT_SINGLE);
  endfunction

endpackage
