// xbar_rule: the global routing rule of the Rotating Crossbar.
//
// Given the token position (the master tile) and the fragment headers of all
// crossbar tiles, it computes a conflict-free configuration for one routing
// quantum.  It walks from the master tile downstream (increasing port
// number, wrapping around) and, for each tile with a waiting fragment,
// reserves the egress connection of the destination port and a path of ring
// links.  A tile whose destination is itself needs only its egress
// connection.  Otherwise the shorter direction around the ring is tried
// first (clockwise on a tie), then the other one.  A tile that finds its
// egress taken, or both paths occupied, is blocked for this quantum.  Since
// the token moves every quantum, every input is the master at least once
// every N_PORTS quanta and cannot starve.
//
// Clockwise means from port i to port i+1.  The result is given as the
// client of each tile's three servers (egress, clockwise next, counter-
// clockwise next), which is how each tile drives its multiplexers.
// stream_len is the longest granted fragment: the number of cycles the
// quantum streams.
//
// Purely combinational.  Each crossbar tile holds its own copy and feeds it
// the same inputs, so all copies agree without a central scheduler.  The
// walk, the token and the server/client view follow the design described;
// the shortest-path-first order and the variable quantum length are this
// design's own choices.
module xbar_rule
  import rr_pkg::*;
(
  input  port_t     token,
  input  frag_hdr_t hdr        [N_PORTS],
  output tile_cfg_t cfg        [N_PORTS],
  output len_t      stream_len
);
  always_comb begin
    logic [N_PORTS-1:0] out_busy, cw_busy, ccw_busy;
    logic               cw_ok, ccw_ok, use_cw, done;
    int                 s, d, dcw, dccw, j;

    s = 0; d = 0; dcw = 0; dccw = 0; j = 0;
    cw_ok = 1'b0; ccw_ok = 1'b0; use_cw = 1'b0; done = 1'b0;
    out_busy   = '0;
    cw_busy    = '0;
    ccw_busy   = '0;
    stream_len = '0;
    for (int t = 0; t < N_PORTS; t++) cfg[t] = CFG_IDLE;

    for (int k = 0; k < N_PORTS; k++) begin
      s = (int'(token) + k) % N_PORTS;
      if (hdr[s].valid) begin
        d    = int'(hdr[s].dest);
        dcw  = (d - s + N_PORTS) % N_PORTS;
        dccw = (N_PORTS - dcw) % N_PORTS;
        done = 1'b0;
        if (!out_busy[d]) begin
          if (dcw == 0) begin
            out_busy[d]    = 1'b1;
            cfg[d].out     = CL_IN;
            cfg[d].out_src = port_t'(s);
            done           = 1'b1;
          end else begin
            cw_ok  = 1'b1;
            ccw_ok = 1'b1;
            for (int h = 0; h < N_PORTS - 1; h++) begin
              if (h < dcw  && cw_busy [(s + h) % N_PORTS])           cw_ok  = 1'b0;
              if (h < dccw && ccw_busy[(s - h + N_PORTS) % N_PORTS]) ccw_ok = 1'b0;
            end
            use_cw = (dcw <= dccw) ? cw_ok : !ccw_ok && cw_ok;
            if (cw_ok || ccw_ok) begin
              done        = 1'b1;
              out_busy[d] = 1'b1;
              cfg[d].out_src = port_t'(s);
              if (use_cw) begin
                cfg[d].out = CL_CWPREV;
                for (int h = 0; h < N_PORTS - 1; h++) begin
                  if (h < dcw) begin
                    j = (s + h) % N_PORTS;
                    cw_busy[j]    = 1'b1;
                    cfg[j].cwnext = (h == 0) ? CL_IN : CL_CWPREV;
                  end
                end
              end else begin
                cfg[d].out = CL_CCWPREV;
                for (int h = 0; h < N_PORTS - 1; h++) begin
                  if (h < dccw) begin
                    j = (s - h + N_PORTS) % N_PORTS;
                    ccw_busy[j]    = 1'b1;
                    cfg[j].ccwnext = (h == 0) ? CL_IN : CL_CCWPREV;
                  end
                end
              end
            end
          end
        end
        cfg[s].grant   = done;
        cfg[s].blocked = !done;
        if (done && hdr[s].len > stream_len) stream_len = hdr[s].len;
      end
    end
  end
endmodule
