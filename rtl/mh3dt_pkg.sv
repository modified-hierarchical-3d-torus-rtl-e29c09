// mh3dt_pkg: types and constants shared by the MH3DT network blocks.
//
// A packet is a wormhole of flits. Every flit carries a two-bit type and a
// FLIT_W-bit data field. The first header flit (FT_HEAD) holds the
// destination node address in its low bits, the second header flit
// (FT_HEAD2) holds the source address, body flits (FT_BODY) carry payload and
// the last flit of the packet is FT_TAIL. Two header flits per packet and two
// virtual channels per physical channel follow the document; the flit width
// and the flit-type encoding are this design's own choice.
//
// Router ports are numbered as in port_e: the six intra-module torus links
// (z+, z-, y+, y-, x+, x-), the two free "gate" links that a gate node uses
// for the higher-level torus (g+, g-), and the local processing-element port.
package mh3dt_pkg;

  // Number of virtual channels per physical channel (document: 2).
  localparam int unsigned NUM_VC = 2;
  localparam int unsigned VC_W   = $clog2(NUM_VC);
  // Width of the flit data field (assumed; must hold a node address).
  localparam int unsigned FLIT_W = 16;
  // Ports of a router: 8 network links (node degree 8) plus the local port.
  localparam int unsigned NUM_PORTS = 9;
  localparam int unsigned PORT_W    = $clog2(NUM_PORTS);

  typedef enum logic [1:0] {
    FT_HEAD  = 2'd0,
    FT_HEAD2 = 2'd1,
    FT_BODY  = 2'd2,
    FT_TAIL  = 2'd3
  } flit_type_e;

  typedef struct packed {
    flit_type_e        ftype;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // One direction of a physical channel: a flit tagged with its VC.
  typedef struct packed {
    logic             valid;
    logic [VC_W-1:0]  vc;
    flit_t            flit;
  } link_t;

  // Per-VC "buffer has room" signal returned against a link.
  typedef logic [NUM_VC-1:0] credit_t;

  typedef enum logic [PORT_W-1:0] {
    P_ZP  = 4'd0,
    P_ZM  = 4'd1,
    P_YP  = 4'd2,
    P_YM  = 4'd3,
    P_XP  = 4'd4,
    P_XM  = 4'd5,
    P_GP  = 4'd6,
    P_GM  = 4'd7,
    P_LOC = 4'd8
  } port_e;


  // Event pulses a router reports each cycle (for performance counters).
  typedef struct packed {
    logic vc_wait;       // a header waits for an output VC held by another packet
    logic vc1_alloc;     // a header was given VC1 on a network link (dateline)
    logic gate_hop;      // a header was given a higher-level (gate) link
    logic link_block;    // a flit waits on a link: the next buffer is full
    logic vc_contend;    // both VCs of one physical link compete in a cycle
    logic xbar_block;    // an input VC waits: its output VC buffer is full
  } router_ev_t;

endpackage
