// noc_pkg: types and constants shared by the EDVCA mesh network.
//
// A flit carries a head/tail marker, the flow it belongs to and a data
// word. A flow is a (source node, destination node) pair, so the flow ID
// also gives the destination used by XY route computation. Links carry one
// flit per cycle together with the next-hop VC it is written into. Credit
// updates carry a flow ID rather than a VC ID: the receiver of a credit
// looks the VC up in its per-flow table (the EDVCA credit scheme).
//
// Coordinate fields are sized for meshes of up to 8 x 8 nodes and VC
// fields for up to 8 VCs per port (the largest VC count evaluated). The
// 32-bit data word and the field layout are this design's own choices.
package noc_pkg;

  localparam int COORD_W = 3;   // up to 8 columns / rows
  localparam int VC_W    = 3;   // up to 8 VCs per port
  localparam int DATA_W  = 32;
  localparam int NPORTS  = 5;

  typedef logic [VC_W-1:0] vc_id_t;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } coord_t;

  // A flow is identified by its source and destination nodes.
  typedef struct packed {
    coord_t src;
    coord_t dst;
  } flow_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    flow_t             flow;
    logic [DATA_W-1:0] data;
  } flit_t;

  // One link direction: a flit and the downstream VC it is written into.
  typedef struct packed {
    logic   valid;
    vc_id_t vc;
    flit_t  flit;
  } link_t;

  // Credit update travelling upstream: one flit of this flow left a VC.
  typedef struct packed {
    logic  valid;
    flow_t flow;
  } credit_t;

  // Router ports. NORTH is towards smaller y, SOUTH towards larger y.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  // Per-cycle VC allocation events of one output port, for statistics.
  typedef struct packed {
    logic grant_hit;      // flow already in a next-hop VC: granted that VC
    logic grant_miss;     // flow unknown: granted any available VC
    logic stall_hit;      // flow's VC busy or full: packet waits (static-like)
    logic stall_novc;     // flow unknown and no VC available
    logic stall_full;     // flow unknown and flow table full
    logic entry_freed;    // last flit of a flow left the next-hop VCs
  } va_evt_t;

endpackage
