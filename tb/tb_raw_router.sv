// tb_raw_router: end-to-end test of the four-port router at its default
// sizes (quantum 64 words, 8192-word ingress buffers, 2048-word reassembly
// queues, 16-entry routing tables).
//
// Line-card models send IPv4 packets of 5 to 300 words on all four inputs;
// a scoreboard expects each packet, with TTL one lower and a recomputed
// header checksum, at the output the routing table names, in order per
// input/output pair.  The table has nested prefixes and a miss that falls
// to the default port.
//
// Phase 1 is random traffic.  In phase 2 output 0 stops accepting while all
// inputs send long packets to it, until its reassembly queues refuse more
// fragments and every input line card is held off; then it is released and
// everything drains.  The test counts each mechanism of the design and
// fails if one never happened: fragmentation into several quanta, clockwise,
// counterclockwise and local paths, blocked inputs, the token at every tile,
// interleaved reassembly at an egress, an egress without room, ingress
// back-pressure, a lookup miss, and an ingress waiting for its lookup.
module tb_raw_router;
  import rr_pkg::*;
  `include "rr_tb_util.svh"

  localparam int Q = 64;

  logic clk = 0, rst_n = 0;
  logic  lc_in_valid [N_PORTS], lc_in_last [N_PORTS], lc_in_ready [N_PORTS];
  word_t lc_in_data [N_PORTS];
  logic  lc_out_valid [N_PORTS], lc_out_last [N_PORTS], lc_out_ready [N_PORTS];
  word_t lc_out_data [N_PORTS];
  logic tbl_we = 0, tbl_valid = 0;
  logic [3:0] tbl_idx = 0;
  logic [31:0] tbl_prefix = 0;
  logic [5:0] tbl_plen = 0;
  port_t tbl_port = 0;
  logic quantum_start [N_PORTS], has_token [N_PORTS], granted [N_PORTS], blocked [N_PORTS];

  raw_router dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  // ------------------------------------------------------------ traffic
  pkt_t txq [N_PORTS][$];
  int   widx [N_PORTS];
  bit   in_gate [N_PORTS];
  pkt_t expq [N_PORTS][N_PORTS][$];
  int   seq [N_PORTS];
  int   sent = 0, delivered = 0;

  // destination plan: 10.0.d.0/24 -> d, 10.0.0.0/16 -> 2,
  // 10.0.1.128/25 -> 3, everything else -> default port 0
  function automatic void pick_dest(output logic [31:0] ip, output int port, input int kind);
    int d;
    d = $urandom_range(0, 3);
    case (kind)
      0: begin ip = {8'd10, 8'd0, 8'(d), 1'b0, 7'($urandom)}; port = d; end
      1: begin ip = {8'd10, 8'd0, 8'd9, 8'($urandom)}; port = 2; end
      2: begin ip = {8'd10, 8'd0, 8'd1, 1'b1, 7'($urandom)}; port = 3; end
      default: begin ip = {8'd11, 24'($urandom)}; port = 0; end
    endcase
  endfunction

  task automatic queue_packet(input int src, input int len, input logic [31:0] ip, input int port);
    pkt_t p;
    p = make_packet(len, src, seq[src], ip, 8'($urandom_range(2, 255)));
    seq[src] = (seq[src] + 1) % 4096;
    txq[src].push_back(p);
    expq[src][port].push_back(routed_packet(p));
    sent++;
  endtask

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      lc_in_valid[p] = rst_n && in_gate[p] && txq[p].size() > 0;
      lc_in_data[p]  = (txq[p].size() > 0) ? txq[p][0][widx[p]] : '0;
      lc_in_last[p]  = (txq[p].size() > 0) && (widx[p] == txq[p][0].size() - 1);
    end
  end

  int backpressure [N_PORTS];
  always @(posedge clk) begin
    for (int p = 0; p < N_PORTS; p++) begin
      if (lc_in_valid[p] && !lc_in_ready[p]) backpressure[p]++;
      if (lc_in_valid[p] && lc_in_ready[p]) begin
        if (lc_in_last[p]) begin void'(txq[p].pop_front()); widx[p] <= 0; end
        else widx[p] <= widx[p] + 1;
      end
    end
  end

  // ------------------------------------------------------------ outputs
  logic out_gate [N_PORTS];
  pkt_t cur [N_PORTS];
  assign lc_out_ready = out_gate;

  always @(posedge clk) begin
    for (int d = 0; d < N_PORTS; d++) begin
      if (lc_out_valid[d] && lc_out_ready[d]) begin
        cur[d].push_back(lc_out_data[d]);
        if (lc_out_last[d]) begin
          int s;
          s = (cur[d].size() > 1) ? int'(cur[d][1][31:28]) : 0;
          delivered++;
          check(s < N_PORTS && expq[s][d].size() > 0, $sformatf("unexpected packet at output %0d", d));
          if (s < N_PORTS && expq[s][d].size() > 0) begin
            pkt_t e;
            e = expq[s][d].pop_front();
            check(e == cur[d], $sformatf("packet from %0d at output %0d (%0d words)", s, d, e.size()));
          end
          cur[d] = {};
        end
      end
    end
  end

  // ------------------------------------------------------------ counters
  int n_frag = 0, n_cw = 0, n_ccw = 0, n_local = 0, n_block = 0, n_interleave = 0;
  int n_noroom = 0, n_miss = 0, n_lkwait = 0;
  int tok [N_PORTS];
  client_e cw_cl [N_PORTS], ccw_cl [N_PORTS];
  logic    hdr_last [N_PORTS], lk_wait [N_PORTS], lk_resp [N_PORTS], lk_hit [N_PORTS];
  link_t   eg_word [N_PORTS];
  port_t   eg_from [N_PORTS];
  logic    room_pk [N_PORTS][N_PORTS];
  for (genvar g = 0; g < N_PORTS; g++) begin : g_peek
    assign cw_cl[g]    = dut.u_xbar.g_tile[g].u_tile.cfg_q.cwnext;
    assign ccw_cl[g]   = dut.u_xbar.g_tile[g].u_tile.cfg_q.ccwnext;
    assign hdr_last[g] = dut.u_xbar.g_tile[g].u_tile.hdr_out.last;
    assign lk_wait[g]  = dut.g_port[g].u_ingress.wait_lk;
    assign lk_resp[g]  = dut.lk_resp_valid[g];
    assign lk_hit[g]   = dut.lk_resp_hit[g];
    assign eg_word[g]  = dut.eg_in[g];
    assign eg_from[g]  = dut.eg_src[g];
    for (genvar h = 0; h < N_PORTS; h++) begin : g_room
      assign room_pk[g][h] = dut.g_port[g].u_egress.room[h];
    end
  end
  bit partial [N_PORTS][N_PORTS];

  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < N_PORTS; p++) begin
        if (quantum_start[p]) begin
          if (has_token[p]) tok[p]++;
          if (granted[p]) begin
            if (!hdr_last[p]) n_frag++;
            if (cw_cl[p] == CL_IN) n_cw++;
            else if (ccw_cl[p] == CL_IN) n_ccw++;
            else n_local++;
          end
          if (blocked[p]) n_block++;
        end
        if (lk_wait[p]) n_lkwait++;
        if (lk_resp[p] && !lk_hit[p]) n_miss++;
        for (int s = 0; s < N_PORTS; s++) if (!room_pk[p][s]) n_noroom++;
        if (eg_word[p].valid) begin
          for (int s = 0; s < N_PORTS; s++)
            if (s != int'(eg_from[p]) && partial[p][s]) n_interleave++;
          partial[p][eg_from[p]] = !eg_word[p].last;
        end
      end
    end
  end

  task automatic write_route(input int idx, input logic [31:0] pfx, input int len, input int port);
    @(negedge clk);
    tbl_we = 1; tbl_idx = 4'(idx); tbl_valid = 1; tbl_prefix = pfx; tbl_plen = 6'(len); tbl_port = port_t'(port);
    @(negedge clk);
    tbl_we = 0;
  endtask

  int lens [9] = '{5, 12, 16, 40, 64, 65, 100, 256, 300};

  initial begin
    for (int p = 0; p < N_PORTS; p++) begin
      widx[p] = 0; in_gate[p] = 0; out_gate[p] = 1; seq[p] = 0; tok[p] = 0; backpressure[p] = 0;
      cur[p] = {};
      for (int s = 0; s < N_PORTS; s++) partial[p][s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < N_PORTS; d++) write_route(d, {8'd10, 8'd0, 8'(d), 8'd0}, 24, d);
    write_route(4, 32'h0A00_0000, 16, 2);
    write_route(5, 32'h0A00_0180, 25, 3);

    // phase 1: random traffic
    for (int n = 0; n < 60; n++)
      for (int s = 0; s < N_PORTS; s++) begin
        logic [31:0] ip; int port;
        pick_dest(ip, port, (n % 7 == 3) ? 3 : (n % 5 == 1) ? 1 : (n % 9 == 2) ? 2 : 0);
        queue_packet(s, lens[$urandom_range(0, 8)], ip, port);
      end
    for (int p = 0; p < N_PORTS; p++) in_gate[p] = 1;
    while (delivered < sent) @(negedge clk);
    $display("phase 1: %0d packets delivered at %0t", delivered, $time);

    // phase 2: congest output 0; count back-pressure afresh (phase 1 only
    // saw the short stalls of inputs waiting for a lookup)
    out_gate[0] = 0;
    for (int p = 0; p < N_PORTS; p++) backpressure[p] = 0;
    for (int n = 0; n < 44; n++)
      for (int s = 0; s < N_PORTS; s++) queue_packet(s, 256, {8'd10, 8'd0, 8'd0, 8'd7}, 0);
    begin
      int waited;
      waited = 0;
      while (waited < 200000 && !(backpressure[0] > 0 && backpressure[1] > 0 &&
                                  backpressure[2] > 0 && backpressure[3] > 0)) begin
        @(negedge clk);
        waited++;
      end
    end
    out_gate[0] = 1;
    while (delivered < sent) @(negedge clk);
    $display("phase 2: %0d packets delivered at %0t", delivered, $time);

    for (int s = 0; s < N_PORTS; s++)
      for (int d = 0; d < N_PORTS; d++) check(expq[s][d].size() == 0, "nothing missing");
    check(n_frag > 0, "fragmentation");
    check(n_cw > 0, "clockwise path");
    check(n_ccw > 0, "counterclockwise path");
    check(n_local > 0, "local path");
    check(n_block > 0, "blocked input");
    for (int p = 0; p < N_PORTS; p++) check(tok[p] > 0, "token at every tile");
    check(n_interleave > 0, "interleaved reassembly");
    check(n_noroom > 0, "egress without room");
    for (int p = 0; p < N_PORTS; p++) check(backpressure[p] > 0, "ingress back-pressure");
    check(n_miss > 0, "lookup miss to default port");
    check(n_lkwait > 0, "ingress waiting for lookup");
    $display("fragments-not-last %0d cw %0d ccw %0d local %0d blocked %0d interleave %0d noroom %0d miss %0d lkwait %0d",
             n_frag, n_cw, n_ccw, n_local, n_block, n_interleave, n_noroom, n_miss, n_lkwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
