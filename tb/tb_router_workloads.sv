// tb_router_workloads: throughput of the router at its default sizes.
//
// Four workloads: 64-byte (16-word) and 1,024-byte (256-word) packets, each
// with every input sending to a fixed distinct output (inputs 0..3 to
// outputs 2,3,0,1: no output contention, the peak case) and with every
// packet going to a random output (contention, the average case).  The line
// cards keep every input busy and every output ready.  After a warm-up the
// testbench counts the words and packets leaving the router over a fixed
// window and reports them as Gbit/s and Mpackets/s at a 250 MHz clock.
// Every delivered packet is also checked against a scoreboard.
//
// Checks: for 1,024-byte packets the peak rate reaches at least the
// 26.9 Gbit/s and 3.3 Mpackets/s reported for the software router the design
// follows; random destinations deliver less than the peak but more than half
// of it (about 69 % was reported); every packet arrives intact.
module tb_router_workloads;
  import rr_pkg::*;
  `include "rr_tb_util.svh"

  localparam int WARM = 3000;
  localparam int WINDOW = 20000;

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

  pkt_t txq [N_PORTS][$];
  int   widx [N_PORTS];
  pkt_t expq [N_PORTS][N_PORTS][$];
  int   seq [N_PORTS];
  pkt_t cur [N_PORTS];
  int   pkt_len = 16;
  bit   random_dest = 0;
  bit   feeding = 0;
  longint words_out = 0, pkts_out = 0;

  assign lc_out_ready = '{default: 1'b1};

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      lc_in_valid[p] = rst_n && txq[p].size() > 0;
      lc_in_data[p]  = (txq[p].size() > 0) ? txq[p][0][widx[p]] : '0;
      lc_in_last[p]  = (txq[p].size() > 0) && (widx[p] == txq[p][0].size() - 1);
    end
  end

  always @(posedge clk) begin
    for (int p = 0; p < N_PORTS; p++) begin
      if (lc_in_valid[p] && lc_in_ready[p]) begin
        if (lc_in_last[p]) begin void'(txq[p].pop_front()); widx[p] <= 0; end
        else widx[p] <= widx[p] + 1;
      end
      // keep every input line card busy
      if (feeding && txq[p].size() < 3) begin
        int d;
        pkt_t pk;
        d = random_dest ? $urandom_range(0, 3) : (p + 2) % N_PORTS;
        pk = make_packet(pkt_len, p, seq[p], {8'd10, 8'd0, 8'(d), 8'd5}, 8'd64);
        seq[p] = (seq[p] + 1) % 4096;
        txq[p].push_back(pk);
        expq[p][d].push_back(routed_packet(pk));
      end
    end
  end

  always @(posedge clk) begin
    for (int d = 0; d < N_PORTS; d++) begin
      if (lc_out_valid[d] && lc_out_ready[d]) begin
        cur[d].push_back(lc_out_data[d]);
        words_out++;
        if (lc_out_last[d]) begin
          int s;
          pkts_out++;
          s = int'(cur[d][1][31:28]);
          if (s < N_PORTS && expq[s][d].size() > 0) begin
            pkt_t e;
            e = expq[s][d].pop_front();
            check(e == cur[d], "packet intact");
          end else check(0, "unexpected packet");
          cur[d] = {};
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

  function automatic bit all_delivered();
    for (int s = 0; s < N_PORTS; s++)
      for (int d = 0; d < N_PORTS; d++) if (expq[s][d].size() != 0) return 0;
    return 1;
  endfunction

  // run one workload; returns delivered words and packets in the window
  task automatic workload(input int len, input bit rnd, output real gbps, output real mpps);
    longint w0, p0;
    pkt_len = len; random_dest = rnd; feeding = 1;
    repeat (WARM) @(negedge clk);
    w0 = words_out; p0 = pkts_out;
    repeat (WINDOW) @(negedge clk);
    gbps = real'(words_out - w0) * 32.0 * 0.25 / real'(WINDOW);   // 250 MHz
    mpps = real'(pkts_out - p0) * 250.0 / real'(WINDOW);
    feeding = 0;
    // drain before the next workload
    while (!all_delivered()) @(negedge clk);
    $display("%0d-byte packets, %s destinations: %5.2f Gbit/s, %5.2f Mpackets/s",
             len * 4, rnd ? "random" : "distinct", gbps, mpps);
  endtask

  initial begin
    real g64p, m64p, g64r, m64r, g1kp, m1kp, g1kr, m1kr;
    for (int p = 0; p < N_PORTS; p++) begin widx[p] = 0; seq[p] = 0; cur[p] = {}; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < N_PORTS; d++) write_route(d, {8'd10, 8'd0, 8'(d), 8'd0}, 24, d);
    workload(16, 0, g64p, m64p);
    workload(16, 1, g64r, m64r);
    workload(256, 0, g1kp, m1kp);
    workload(256, 1, g1kr, m1kr);
    check(g1kp >= 26.9, "1,024-byte peak reaches 26.9 Gbit/s");
    check(m1kp >= 3.3, "1,024-byte peak reaches 3.3 Mpackets/s");
    check(g1kr < g1kp && g1kr > 0.5 * g1kp, "1,024-byte random below peak, above half");
    check(g64r < g64p && g64r > 0.5 * g64p, "64-byte random below peak, above half");
    check(g64p < g1kp, "small packets pay more overhead");
    for (int s = 0; s < N_PORTS; s++)
      for (int d = 0; d < N_PORTS; d++) check(expq[s][d].size() == 0, "every packet delivered");
    $display("average/peak: 64 B %4.2f, 1024 B %4.2f", g64r / g64p, g1kr / g1kp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
