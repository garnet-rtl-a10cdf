// Shared types and default sizes of the mesh network-on-chip.
//
// A packet is a head flit, optional body flits and a tail flit; a one-flit
// packet is HEAD_TAIL. Every flit carries the virtual channel (VC) it
// occupies on the link it is crossing, plus its source and destination node.
// Credits flow the opposite way: one credit per flit read out of a
// downstream VC buffer, with `free` set when that flit was the tail, which
// hands the VC back to the upstream router.
//
// Port numbering (this design's choice): 0 local, 1 east (+X), 2 west (-X),
// 3 north (+Y), 4 south (-Y). The five-port router and the flit types follow
// the described router; all widths and counts here are this design's
// defaults, since none are fixed by the description.
package garnet_pkg;

  localparam int NUM_PORTS    = 5;
  localparam int NUM_VNETS    = 2;
  localparam int VCS_PER_VNET = 4;
  localparam int NUM_VCS      = NUM_VNETS * VCS_PER_VNET;
  localparam int BUF_DEPTH    = 4;
  localparam int FLIT_DATA_W  = 128;   // 16 bytes per cycle per link
  localparam int NODE_W       = 6;     // up to 64 nodes
  localparam int VC_W         = $clog2(NUM_VCS);
  localparam int PORT_W       = $clog2(NUM_PORTS);
  localparam int TS_W         = 16;    // arrival stamp width

  localparam int PORT_LOCAL = 0;
  localparam int PORT_EAST  = 1;
  localparam int PORT_WEST  = 2;
  localparam int PORT_NORTH = 3;
  localparam int PORT_SOUTH = 4;

  typedef enum logic [1:0] {
    FLIT_HEAD      = 2'd0,
    FLIT_BODY      = 2'd1,
    FLIT_TAIL      = 2'd2,
    FLIT_HEAD_TAIL = 2'd3
  } flit_type_e;

  typedef struct packed {
    logic                   valid;
    flit_type_e             ftype;
    logic [VC_W-1:0]        vc;
    logic [NODE_W-1:0]      src;
    logic [NODE_W-1:0]      dest;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
    logic            free;   // the flit read was a tail: the VC is free again
  } credit_t;

  // State of one input VC.
  typedef enum logic [1:0] {
    VC_IDLE   = 2'd0,   // holds no packet
    VC_VA     = 2'd1,   // head routed, waiting for an output VC
    VC_ACTIVE = 2'd2    // output VC held, flits go through SA
  } vc_state_e;

  function automatic logic is_head(flit_type_e t);
    return (t == FLIT_HEAD) || (t == FLIT_HEAD_TAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FLIT_TAIL) || (t == FLIT_HEAD_TAIL);
  endfunction

endpackage
