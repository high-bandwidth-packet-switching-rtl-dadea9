// lookup_proc: route lookup for one port.
//
// Holds a routing table of ENTRIES prefixes, each with a prefix length and
// an output port, and answers one request per cycle with the port of the
// longest matching prefix.  A request presented in cycle t is answered in
// cycle t+1 (resp_valid, resp_port, resp_hit).  When no entry matches the
// answer is DEFAULT_PORT with resp_hit low.  Among equally long matches the
// lowest index wins.  The table is loaded through the write port
// (tbl_we/tbl_idx/...), one entry per cycle; reset empties it.
//
// The router reserves one lookup stage per port that receives the IP header
// from the ingress stage and returns the output port; the lookup method is
// left open there, and the parallel longest-prefix match, the table size and
// the default port are this design's own choices.  The table stands in for
// the routing table that would live in off-chip memory.
module lookup_proc
  import rr_pkg::*;
#(
  parameter int unsigned ENTRIES      = 16,
  parameter int unsigned DEFAULT_PORT = 0,
  localparam int unsigned IW          = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // table write port
  input  logic          tbl_we,
  input  logic [IW-1:0] tbl_idx,
  input  logic          tbl_valid,
  input  logic [31:0]   tbl_prefix,
  input  logic [5:0]    tbl_plen,
  input  port_t         tbl_port,
  // lookup request / response
  input  logic          req_valid,
  input  logic [31:0]   req_addr,
  output logic          resp_valid,
  output port_t         resp_port,
  output logic          resp_hit
);
  logic        ent_valid  [ENTRIES];
  logic [31:0] ent_prefix [ENTRIES];
  logic [5:0]  ent_plen   [ENTRIES];
  port_t       ent_port   [ENTRIES];

  port_t match_port;
  logic  match_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        ent_valid[e]  <= 1'b0;
        ent_prefix[e] <= '0;
        ent_plen[e]   <= '0;
        ent_port[e]   <= '0;
      end
    end else if (tbl_we) begin
      ent_valid[tbl_idx]  <= tbl_valid;
      ent_prefix[tbl_idx] <= tbl_prefix;
      ent_plen[tbl_idx]   <= (tbl_plen > 6'd32) ? 6'd32 : tbl_plen;
      ent_port[tbl_idx]   <= tbl_port;
    end
  end

  // Longest-prefix match over all entries in parallel.
  always_comb begin
    logic [31:0] mask;
    logic [6:0]  best;      // best length + 1, 0 = no match yet
    match_port = port_t'(DEFAULT_PORT);
    match_hit  = 1'b0;
    best       = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      mask = (ent_plen[e] == 6'd0) ? 32'h0 : ~(32'hFFFF_FFFF >> ent_plen[e]);
      if (ent_valid[e] && ((req_addr & mask) == (ent_prefix[e] & mask))
          && ({1'b0, ent_plen[e]} + 7'd1 > best)) begin
        best       = {1'b0, ent_plen[e]} + 7'd1;
        match_port = ent_port[e];
        match_hit  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
      resp_port  <= '0;
      resp_hit   <= 1'b0;
    end else begin
      resp_valid <= req_valid;
      if (req_valid) begin
        resp_port <= match_port;
        resp_hit  <= match_hit;
      end
    end
  end
endmodule
