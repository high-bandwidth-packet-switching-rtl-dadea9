// xbar_tile: one Crossbar processor of the Rotating Crossbar.
//
// Every tile runs the same two-phase sequence in lockstep with the others,
// driven by local counters that all leave reset together, so no token is
// ever passed on a wire: the token is a counter kept in every tile.
//
//   STREAM  (stream_len cycles) the tile's three servers carry the quantum
//           chosen by the routing rule.  If the local ingress was granted, it
//           is read one word per cycle (in_pop) for the length of its own
//           fragment.
//   DRAIN   (N_PORTS-1 cycles) the servers keep their setting while the last
//           words cross up to N_PORTS-1 ring hops.  Meanwhile the next
//           quantum is prepared: in the first drain cycle each tile latches
//           the header of its ingress fragment (only if the destination
//           egress has room, dest_ready) and shows it to the other tiles
//           (hdr_out -> hdr_all, the header exchange); in the second one its
//           own copy of the routing rule (xbar_rule) turns the token and the
//           four headers into the next configuration.  At the end of the
//           drain the token moves one tile downstream.
//
// Each server is a registered multiplexer choosing between nothing, the
// local ingress word and the words arriving from the clockwise and
// counterclockwise neighbours; every hop costs one cycle.  eg_out/eg_src feed
// the egress of this port.  Status outputs tell whether this tile holds the
// token, was granted or was blocked in the current quantum.
//
// The token counter, the header exchange, the per-tile copy of the rule and
// the client/server view follow the design described.  The explicit drain
// (instead of software-pipelined switch code), the per-fragment variable
// quantum length and the egress room check are this design's own choices.
module xbar_tile
  import rr_pkg::*;
#(
  parameter int unsigned ID = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  // local ingress
  input  frag_hdr_t in_hdr,
  input  link_t     in_word,
  output logic      in_pop,
  // room at each egress for a fragment from this port
  input  logic      dest_ready [N_PORTS],
  // header exchange
  output frag_hdr_t hdr_out,
  input  frag_hdr_t hdr_all    [N_PORTS],
  // ring links
  input  link_t     cw_in,      // from tile ID-1
  input  link_t     ccw_in,     // from tile ID+1
  output link_t     cw_out,     // to tile ID+1
  output link_t     ccw_out,    // to tile ID-1
  // egress connection
  output link_t     eg_out,
  output port_t     eg_src,
  // status
  output logic      quantum_start,
  output logic      has_token,
  output logic      granted,
  output logic      blocked
);
  localparam int unsigned DRAIN = N_PORTS - 1;

  typedef enum logic {ST_DRAIN, ST_STREAM} state_e;

  state_e    state;
  len_t      cnt;
  len_t      slen, slen_nxt;
  port_t     token_q, token_cur, token_nxt;
  tile_cfg_t cfg_q, cfg_nxt;
  tile_cfg_t rule_cfg [N_PORTS];
  len_t      rule_len;
  link_t     src_in;

  xbar_rule u_rule (
    .token     (token_q),
    .hdr       (hdr_all),
    .cfg       (rule_cfg),
    .stream_len(rule_len)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_DRAIN;
      cnt           <= '0;
      slen          <= '0;
      slen_nxt      <= '0;
      token_q       <= '0;
      token_cur     <= '0;
      token_nxt     <= '0;
      cfg_q         <= CFG_IDLE;
      cfg_nxt       <= CFG_IDLE;
      hdr_out       <= '0;
      quantum_start <= 1'b0;
    end else begin
      quantum_start <= 1'b0;
      if (state == ST_STREAM) begin
        if (cnt == slen - 1'b1) begin
          state <= ST_DRAIN;
          cnt   <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else begin
        if (cnt == len_t'(0)) begin
          hdr_out <= in_hdr;
          hdr_out.valid <= in_hdr.valid && dest_ready[in_hdr.dest];
        end
        if (cnt == len_t'(1)) begin
          cfg_nxt   <= rule_cfg[ID];
          slen_nxt  <= rule_len;
          token_nxt <= token_q;
        end
        if (cnt == len_t'(DRAIN - 1)) begin
          cnt       <= '0;
          cfg_q     <= cfg_nxt;
          slen      <= slen_nxt;
          token_cur <= token_nxt;
          token_q   <= (token_q == port_t'(N_PORTS - 1)) ? '0 : token_q + 1'b1;
          if (slen_nxt != len_t'(0)) begin
            state         <= ST_STREAM;
            quantum_start <= 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assign in_pop = (state == ST_STREAM) && cfg_q.grant && (cnt < hdr_out.len);

  always_comb begin
    src_in       = in_word;
    src_in.valid = in_pop;
  end

  function automatic link_t pick(input client_e c, input link_t from_in,
                                 input link_t from_cw, input link_t from_ccw);
    case (c)
      CL_IN:      return from_in;
      CL_CWPREV:  return from_cw;
      CL_CCWPREV: return from_ccw;
      default:    return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cw_out  <= '0;
      ccw_out <= '0;
      eg_out  <= '0;
      eg_src  <= '0;
    end else begin
      cw_out  <= pick(cfg_q.cwnext,  src_in, cw_in, ccw_in);
      ccw_out <= pick(cfg_q.ccwnext, src_in, cw_in, ccw_in);
      eg_out  <= pick(cfg_q.out,     src_in, cw_in, ccw_in);
      eg_src  <= cfg_q.out_src;
    end
  end

  assign has_token = (token_cur == port_t'(ID));
  assign granted   = (state == ST_STREAM) && cfg_q.grant;
  assign blocked   = (state == ST_STREAM) && cfg_q.blocked;

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                in_pop |-> (in_hdr.valid && in_word.valid));
endmodule
