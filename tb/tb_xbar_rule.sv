// tb_xbar_rule: exhaustive check of the Rotating Crossbar routing rule.
//
// Walks the whole configuration space: 4 token positions times 5^4 header
// combinations (each input idle or bound for one of 4 outputs), 2,500 cases.
// For each case it
//   * recomputes the expected grants with an independent reference (paths
//     kept as bit masks of ring links, shorter direction first, clockwise on
//     a tie, token holder served first);
//   * follows every granted fragment hop by hop through the clients the
//     rule chose and checks it reaches the egress connection of its
//     destination with the right source tag, and that no idle server carries
//     anything;
//   * checks the quantum length is the longest granted fragment.
// It also checks the example in which inputs 0..3 send to outputs 2,3,0,1
// with the token at 0 (inputs 1 and 3 must go counterclockwise), that a
// permutation (no output contention) is always fully granted, and counts the
// distinct per-tile configurations that occur.
module tb_xbar_rule;
  import rr_pkg::*;

  port_t     token;
  frag_hdr_t hdr [N_PORTS];
  tile_cfg_t cfg [N_PORTS];
  len_t      stream_len;

  int checks = 0, failures = 0;
  int perms = 0, perms_full = 0;
  int distinct = 0;
  bit seen [bit [$bits(tile_cfg_t)-1:0]];

  xbar_rule dut (.token, .hdr, .cfg, .stream_len);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (token=%0d)", what, token);
    end
  endtask

  // Reference: expected grant and direction (+1 cw, -1 ccw, 0 local).
  task automatic reference(output bit g [N_PORTS], output int dir [N_PORTS]);
    bit [N_PORTS-1:0] outs, cwl, ccwl;
    outs = 0; cwl = 0; ccwl = 0;
    for (int i = 0; i < N_PORTS; i++) begin g[i] = 0; dir[i] = 0; end
    for (int k = 0; k < N_PORTS; k++) begin
      int s, d, n_cw, n_ccw;
      bit [N_PORTS-1:0] mcw, mccw;
      s = (token + k) % N_PORTS;
      if (!hdr[s].valid) continue;
      d = hdr[s].dest;
      if (outs[d]) continue;
      n_cw = (d - s + N_PORTS) % N_PORTS;
      n_ccw = (s - d + N_PORTS) % N_PORTS;
      mcw = 0; mccw = 0;
      for (int h = 0; h < n_cw; h++)  mcw[(s + h) % N_PORTS] = 1;
      for (int h = 0; h < n_ccw; h++) mccw[(s - h + N_PORTS) % N_PORTS] = 1;
      if (n_cw == 0) begin g[s] = 1; dir[s] = 0; end
      else if (n_cw <= n_ccw && (mcw & cwl) == 0) begin g[s] = 1; dir[s] = 1; cwl |= mcw; end
      else if ((mccw & ccwl) == 0) begin g[s] = 1; dir[s] = -1; ccwl |= mccw; end
      else if ((mcw & cwl) == 0) begin g[s] = 1; dir[s] = 1; cwl |= mcw; end
      if (g[s]) outs[d] = 1;
    end
  endtask

  // Follow input s through the configured clients; return the egress it
  // reaches or -1.
  function automatic int trace(int s, output int hops);
    int at;
    hops = 0;
    if (cfg[s].out == CL_IN) return s;
    if (cfg[s].cwnext == CL_IN) begin
      at = (s + 1) % N_PORTS;
      for (int h = 0; h < N_PORTS; h++) begin
        hops++;
        if (cfg[at].out == CL_CWPREV) return at;
        if (cfg[at].cwnext != CL_CWPREV) return -1;
        at = (at + 1) % N_PORTS;
      end
    end else if (cfg[s].ccwnext == CL_IN) begin
      at = (s + N_PORTS - 1) % N_PORTS;
      for (int h = 0; h < N_PORTS; h++) begin
        hops++;
        if (cfg[at].out == CL_CCWPREV) return at;
        if (cfg[at].ccwnext != CL_CCWPREV) return -1;
        at = (at + N_PORTS - 1) % N_PORTS;
      end
    end
    return -1;
  endfunction

  initial begin
    bit g [N_PORTS];
    int dir [N_PORTS];
    int code, reached, hops, used_out, maxlen, nvalid;
    bit is_perm;
    bit [N_PORTS-1:0] dmask;

    // example: 0->2, 1->3, 2->0, 3->1, token at port 0
    token = 0;
    for (int i = 0; i < N_PORTS; i++)
      hdr[i] = '{valid: 1'b1, dest: port_t'((i + 2) % N_PORTS), len: len_t'(10 + i), last: 1'b1};
    #1;
    for (int i = 0; i < N_PORTS; i++) check(cfg[i].grant && !cfg[i].blocked, "example: all four send");
    check(cfg[0].cwnext  == CL_IN, "example: port 0 clockwise");
    check(cfg[1].ccwnext == CL_IN, "example: port 1 counterclockwise");
    check(cfg[2].cwnext  == CL_IN, "example: port 2 clockwise");
    check(cfg[3].ccwnext == CL_IN, "example: port 3 counterclockwise");
    check(cfg[1].cwnext  == CL_CWPREV && cfg[2].out == CL_CWPREV, "example: 0 passes through 1");
    check(stream_len == len_t'(13), "example: quantum length");

    for (int t = 0; t < N_PORTS; t++) begin
      for (code = 0; code < 625; code++) begin
        int c;
        c = code;
        token = port_t'(t);
        nvalid = 0; dmask = 0; is_perm = 1;
        for (int i = 0; i < N_PORTS; i++) begin
          int v;
          v = c % 5; c = c / 5;
          hdr[i].valid = (v != 0);
          hdr[i].dest  = port_t'((v == 0) ? 0 : v - 1);
          hdr[i].len   = len_t'($urandom_range(1, 64));
          hdr[i].last  = 1'($urandom_range(0, 1));
          if (v != 0) begin
            nvalid++;
            if (dmask[v-1]) is_perm = 0;
            dmask[v-1] = 1;
          end
        end
        #1;
        reference(g, dir);
        maxlen = 0;
        used_out = 0;
        for (int i = 0; i < N_PORTS; i++) begin
          check(cfg[i].grant == g[i], $sformatf("grant of %0d", i));
          check(cfg[i].blocked == (hdr[i].valid && !g[i]), $sformatf("blocked of %0d", i));
          if (g[i]) begin
            reached = trace(i, hops);
            check(reached == int'(hdr[i].dest), $sformatf("path of %0d", i));
            check(reached < 0 || cfg[reached].out_src == port_t'(i), "egress source tag");
            check(dir[i] == 0 ? hops == 0 :
                  (dir[i] == 1 ? hops == (int'(hdr[i].dest) - i + N_PORTS) % N_PORTS
                               : hops == (i - int'(hdr[i].dest) + N_PORTS) % N_PORTS),
                  "direction");
            check(dir[i] == 1 ? cfg[i].cwnext == CL_IN :
                  dir[i] == -1 ? cfg[i].ccwnext == CL_IN : cfg[i].out == CL_IN, "server used by the input");
            if (int'(hdr[i].len) > maxlen) maxlen = hdr[i].len;
          end
          if (cfg[i].out != CL_NONE) used_out++;
        end
        // every used egress connection belongs to exactly one granted input
        begin
          int ng;
          ng = 0;
          for (int i = 0; i < N_PORTS; i++) ng += g[i];
          check(used_out == ng, "no stray egress connections");
        end
        check(int'(stream_len) == maxlen, "quantum length");
        check(nvalid == 0 || g[t] || !hdr[t].valid, "token holder always sends");
        if (is_perm && nvalid == N_PORTS) begin
          int ng;
          perms++;
          ng = 0;
          for (int i = 0; i < N_PORTS; i++) ng += g[i];
          if (ng == N_PORTS) perms_full++;
        end
        for (int i = 0; i < N_PORTS; i++) begin
          if (!seen.exists(cfg[i])) begin seen[cfg[i]] = 1; distinct++; end
        end
      end
    end
    check(perms == 96, "all 24 permutations x 4 tokens visited");
    check(perms_full == perms, "single ring suffices for any permutation");
    $display("permutations fully granted: %0d of %0d; distinct tile configurations: %0d",
             perms_full, perms, distinct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
