// raw_router: a four-port single-chip IP router built around a Rotating
// Crossbar.
//
// Each port p has four stages, mirroring the four tiles a port occupies:
//   ingress_proc  takes packets from input line card p, decrements TTL,
//                 updates the header checksum, buffers the packet and cuts it
//                 into fragments of at most QUANTUM words;
//   lookup_proc   turns the destination address into an output port;
//   xbar_tile     (inside rotating_crossbar) moves fragments around the ring
//                 under the token rule;
//   egress_proc   reassembles packets and streams them, first in first out,
//                 to output line card p.
// Dropping and deep queueing are left to the line cards.
//
// Ports: per port an input stream (lc_in_*) and an output stream (lc_out_*),
// each a 32-bit word with valid/ready and a last-word flag; a routing table
// write port shared by the four lookup stages (every lookup stage keeps its
// own copy of the table); and per-port status of the crossbar (token holder,
// grant, block, start of a quantum).
module raw_router
  import rr_pkg::*;
#(
  parameter int unsigned QUANTUM       = 64,
  parameter int unsigned IN_BUF_WORDS  = 8192,
  parameter int unsigned SRC_BUF_WORDS = 2048,
  parameter int unsigned LK_ENTRIES    = 16,
  localparam int unsigned LIW          = (LK_ENTRIES > 1) ? $clog2(LK_ENTRIES) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // input line cards
  input  logic           lc_in_valid  [N_PORTS],
  input  word_t          lc_in_data   [N_PORTS],
  input  logic           lc_in_last   [N_PORTS],
  output logic           lc_in_ready  [N_PORTS],
  // output line cards
  output logic           lc_out_valid [N_PORTS],
  output word_t          lc_out_data  [N_PORTS],
  output logic           lc_out_last  [N_PORTS],
  input  logic           lc_out_ready [N_PORTS],
  // routing table write port
  input  logic           tbl_we,
  input  logic [LIW-1:0] tbl_idx,
  input  logic           tbl_valid,
  input  logic [31:0]    tbl_prefix,
  input  logic [5:0]     tbl_plen,
  input  port_t          tbl_port,
  // crossbar status
  output logic           quantum_start [N_PORTS],
  output logic           has_token     [N_PORTS],
  output logic           granted       [N_PORTS],
  output logic           blocked       [N_PORTS]
);
  logic        lk_req_valid  [N_PORTS];
  logic [31:0] lk_req_addr   [N_PORTS];
  logic        lk_resp_valid [N_PORTS];
  port_t       lk_resp_port  [N_PORTS];
  logic        lk_resp_hit   [N_PORTS];

  frag_hdr_t   xb_hdr  [N_PORTS];
  link_t       xb_word [N_PORTS];
  logic        xb_pop  [N_PORTS];
  link_t       eg_in   [N_PORTS];
  port_t       eg_src  [N_PORTS];
  logic        room    [N_PORTS][N_PORTS];   // room[d][s]: egress d, source s
  logic        dest_ready [N_PORTS][N_PORTS]; // dest_ready[s][d]

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    ingress_proc #(.QUANTUM(QUANTUM), .BUF_WORDS(IN_BUF_WORDS)) u_ingress (
      .clk, .rst_n,
      .lc_valid     (lc_in_valid[p]),
      .lc_data      (lc_in_data[p]),
      .lc_last      (lc_in_last[p]),
      .lc_ready     (lc_in_ready[p]),
      .lk_req_valid (lk_req_valid[p]),
      .lk_req_addr  (lk_req_addr[p]),
      .lk_resp_valid(lk_resp_valid[p]),
      .lk_resp_port (lk_resp_port[p]),
      .xb_hdr       (xb_hdr[p]),
      .xb_word      (xb_word[p]),
      .xb_pop       (xb_pop[p])
    );

    lookup_proc #(.ENTRIES(LK_ENTRIES)) u_lookup (
      .clk, .rst_n,
      .tbl_we, .tbl_idx, .tbl_valid, .tbl_prefix, .tbl_plen, .tbl_port,
      .req_valid (lk_req_valid[p]),
      .req_addr  (lk_req_addr[p]),
      .resp_valid(lk_resp_valid[p]),
      .resp_port (lk_resp_port[p]),
      .resp_hit  (lk_resp_hit[p])
    );

    egress_proc #(.QUANTUM(QUANTUM), .SRC_BUF_WORDS(SRC_BUF_WORDS)) u_egress (
      .clk, .rst_n,
      .xb_in   (eg_in[p]),
      .xb_src  (eg_src[p]),
      .room    (room[p]),
      .lc_valid(lc_out_valid[p]),
      .lc_data (lc_out_data[p]),
      .lc_last (lc_out_last[p]),
      .lc_ready(lc_out_ready[p])
    );

    for (genvar d = 0; d < N_PORTS; d++) begin : g_rdy
      assign dest_ready[p][d] = room[d][p];
    end
  end

  rotating_crossbar u_xbar (
    .clk, .rst_n,
    .in_hdr       (xb_hdr),
    .in_word      (xb_word),
    .in_pop       (xb_pop),
    .dest_ready   (dest_ready),
    .eg_out       (eg_in),
    .eg_src       (eg_src),
    .quantum_start(quantum_start),
    .has_token    (has_token),
    .granted      (granted),
    .blocked      (blocked)
  );
endmodule
