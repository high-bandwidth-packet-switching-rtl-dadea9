// rr_pkg: types and constants shared by the blocks of the 4x4 Rotating
// Crossbar router.
//
// The router has four ports; every port owns an ingress stage, a lookup
// stage, one tile of the Rotating Crossbar and an egress stage.  Data moves
// as 32-bit words.  A packet crosses the crossbar in fragments of at most one
// quantum; each fragment is announced by a small local header (frag_hdr_t)
// that carries the output port chosen by the lookup, the fragment length and
// whether it ends the packet.  The four port count and the 32-bit word follow
// the router described; the field widths are this design's own choice.
package rr_pkg;

  localparam int unsigned N_PORTS = 4;
  localparam int unsigned PORT_W  = $clog2(N_PORTS);
  localparam int unsigned WORD_W  = 32;
  localparam int unsigned LEN_W   = 16;   // fragment / packet length in words

  typedef logic [PORT_W-1:0] port_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LEN_W-1:0]  len_t;

  // Local header of the fragment at the head of an ingress queue.
  typedef struct packed {
    logic  valid;   // a fragment is waiting
    port_t dest;    // output port chosen by the route lookup
    len_t  len;     // words in this fragment (1 .. quantum)
    logic  last;    // this fragment ends the packet
  } frag_hdr_t;

  // One word on a crossbar link (ring hop or tile-to-egress connection).
  typedef struct packed {
    logic  valid;
    logic  last;    // last word of the packet
    word_t data;
  } link_t;

  // Clients of a crossbar tile's servers (its three outgoing connections):
  // nothing, the local ingress, the clockwise or the counterclockwise
  // upstream neighbour.
  typedef enum logic [1:0] {
    CL_NONE    = 2'd0,
    CL_IN      = 2'd1,
    CL_CWPREV  = 2'd2,
    CL_CCWPREV = 2'd3
  } client_e;

  // Configuration of one crossbar tile for one routing quantum.
  typedef struct packed {
    client_e out;       // client of the connection to the egress
    client_e cwnext;    // client of the clockwise outgoing ring link
    client_e ccwnext;   // client of the counterclockwise outgoing ring link
    port_t   out_src;   // input port whose data the egress connection carries
    logic    blocked;   // the local ingress has a fragment but may not send
    logic    grant;     // the local ingress sends this quantum
  } tile_cfg_t;

  localparam tile_cfg_t CFG_IDLE = '{out: CL_NONE, cwnext: CL_NONE, ccwnext: CL_NONE,
                                     out_src: '0, blocked: 1'b0, grant: 1'b0};

endpackage
