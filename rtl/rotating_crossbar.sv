// rotating_crossbar: the switch fabric of the router.
//
// Four crossbar tiles (xbar_tile) sit on a ring.  Neighbouring tiles are
// joined by one full-duplex link: a clockwise link from tile i to tile i+1
// and a counterclockwise link from tile i+1 to tile i, each one 32-bit word
// wide with a register per hop.  Every tile also has one connection from its
// ingress stage and one to its egress stage.  In each routing quantum the
// token holder (master) is served first and the others fill the remaining
// egress connections and ring links in downstream order, so up to four
// fragments cross at once, in both directions around the ring.  The header
// exchange is a set of wires carrying each tile's latched header to all
// tiles.
//
// Interface per port p: in_hdr/in_word/in_pop towards ingress p,
// dest_ready[p][d] (egress d has room for a fragment from p), and
// eg_out/eg_src towards egress p.  Per-tile status outputs report the token,
// grants, blocks and the start of each quantum.  Latency of a word is one
// cycle per ring hop plus one cycle into the egress connection.
module rotating_crossbar
  import rr_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  frag_hdr_t in_hdr     [N_PORTS],
  input  link_t     in_word    [N_PORTS],
  output logic      in_pop     [N_PORTS],
  input  logic      dest_ready [N_PORTS][N_PORTS],
  output link_t     eg_out     [N_PORTS],
  output port_t     eg_src     [N_PORTS],
  output logic      quantum_start [N_PORTS],
  output logic      has_token  [N_PORTS],
  output logic      granted    [N_PORTS],
  output logic      blocked    [N_PORTS]
);
  frag_hdr_t hdr_x  [N_PORTS];
  link_t     cw     [N_PORTS];   // cw[i]  : tile i  -> tile i+1
  link_t     ccw    [N_PORTS];   // ccw[i] : tile i  -> tile i-1

  for (genvar i = 0; i < N_PORTS; i++) begin : g_tile
    localparam int unsigned PREV = (i + N_PORTS - 1) % N_PORTS;
    localparam int unsigned NEXT = (i + 1) % N_PORTS;
    xbar_tile #(.ID(i)) u_tile (
      .clk, .rst_n,
      .in_hdr       (in_hdr[i]),
      .in_word      (in_word[i]),
      .in_pop       (in_pop[i]),
      .dest_ready   (dest_ready[i]),
      .hdr_out      (hdr_x[i]),
      .hdr_all      (hdr_x),
      .cw_in        (cw[PREV]),
      .ccw_in       (ccw[NEXT]),
      .cw_out       (cw[i]),
      .ccw_out      (ccw[i]),
      .eg_out       (eg_out[i]),
      .eg_src       (eg_src[i]),
      .quantum_start(quantum_start[i]),
      .has_token    (has_token[i]),
      .granted      (granted[i]),
      .blocked      (blocked[i])
    );
  end
endmodule
