// tb_rotating_crossbar: checks the ring of four crossbar tiles.
//
// Ingress models hold queues of fragments (output port, length, words); an
// egress model collects what arrives at each output, sorted by the source
// tag.  Checks:
//   * the example of four inputs sending to outputs 2,3,0,1: all four cross
//     in the first quantum, inputs 1 and 3 counterclockwise, and the quantum
//     lasts exactly fragment length + 3 drain cycles;
//   * with random traffic, every word reaches the right output, in order,
//     with its packet-end flag, and nothing else arrives;
//   * the token visits every tile in turn, one tile per quantum;
//   * an input whose output is busy is blocked, and an output without room
//     (dest_ready low) is not sent to;
//   * an input is never kept waiting for more than N_PORTS quanta while its
//     output has room (no starvation).
module tb_rotating_crossbar;
  import rr_pkg::*;

  logic clk = 0, rst_n = 0;
  frag_hdr_t in_hdr [N_PORTS];
  link_t in_word [N_PORTS];
  logic in_pop [N_PORTS];
  logic dest_ready [N_PORTS][N_PORTS];
  link_t eg_out [N_PORTS];
  port_t eg_src [N_PORTS];
  logic quantum_start [N_PORTS], has_token [N_PORTS], granted [N_PORTS], blocked [N_PORTS];

  int checks = 0, failures = 0;
  int n_quanta = 0, n_grants = 0, n_blocks = 0, n_ccw = 0, n_cw = 0, n_local = 0, n_norooms = 0;
  int max_wait = 0;

  rotating_crossbar dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  // ingress models
  typedef struct { int dest; int len; bit last; word_t w [$]; } frag_s;
  frag_s iq [N_PORTS][$];
  int    ipos [N_PORTS];
  // expected words per (src, dst)
  word_t expq [N_PORTS][N_PORTS][$];
  bit    expl [N_PORTS][N_PORTS][$];
  int    received = 0, expected_total = 0;

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      in_hdr[p] = '0;
      in_word[p] = '0;
      if (iq[p].size() > 0) begin
        in_hdr[p].valid = 1;
        in_hdr[p].dest = port_t'(iq[p][0].dest);
        in_hdr[p].len = len_t'(iq[p][0].len - ipos[p]);
        in_hdr[p].last = iq[p][0].last;
        in_word[p].valid = 1;
        in_word[p].data = iq[p][0].w[ipos[p]];
        in_word[p].last = iq[p][0].last && (ipos[p] == iq[p][0].len - 1);
      end
    end
  end

  always @(posedge clk) begin
    for (int p = 0; p < N_PORTS; p++) begin
      if (in_pop[p]) begin
        check(iq[p].size() > 0, "pop from an empty ingress");
        if (iq[p].size() > 0) begin
          if (ipos[p] == iq[p][0].len - 1) begin void'(iq[p].pop_front()); ipos[p] <= 0; end
          else ipos[p] <= ipos[p] + 1;
        end
      end
    end
  end

  // egress model
  always @(posedge clk) begin
    for (int d = 0; d < N_PORTS; d++) begin
      if (eg_out[d].valid) begin
        int s;
        s = eg_src[d];
        received++;
        check(expq[s][d].size() > 0, $sformatf("unexpected word at output %0d from %0d", d, s));
        if (expq[s][d].size() > 0) begin
          word_t w; bit l;
          w = expq[s][d].pop_front(); l = expl[s][d].pop_front();
          check(eg_out[d].data == w && eg_out[d].last == l,
                $sformatf("word at output %0d from %0d", d, s));
        end
      end
    end
  end

  // the current setting of each tile's ring servers
  client_e cw_cl [N_PORTS], ccw_cl [N_PORTS];
  for (genvar g = 0; g < N_PORTS; g++) begin : g_peek
    assign cw_cl[g]  = dut.g_tile[g].u_tile.cfg_q.cwnext;
    assign ccw_cl[g] = dut.g_tile[g].u_tile.cfg_q.ccwnext;
  end

  // per-quantum bookkeeping (tile 0's view of the quantum start)
  int tok_expect = 0;
  int waitq [N_PORTS];
  always @(posedge clk) begin
    if (rst_n && quantum_start[0]) begin
      int ntok;
      n_quanta++;
      ntok = 0;
      for (int p = 0; p < N_PORTS; p++) begin
        check(quantum_start[p], "tiles in lockstep");
        ntok += has_token[p];
      end
      check(ntok == 1, "exactly one token holder");
      for (int p = 0; p < N_PORTS; p++) begin
        if (granted[p]) begin
          n_grants++;
          if (ccw_cl[p] == CL_IN) n_ccw++;
          else if (cw_cl[p] == CL_IN) n_cw++;
          else n_local++;
        end
        if (blocked[p]) n_blocks++;
      end
    end
  end

  // token rotation: between quanta that follow each other without an idle
  // gap the token moves exactly one tile downstream; every tile gets it
  int last_tok = -1, last_t = 0, last_len = 0;
  int tok_count [N_PORTS] = '{default: 0};
  len_t slen0;
  assign slen0 = dut.g_tile[0].u_tile.slen;
  always @(posedge clk) begin
    if (rst_n && quantum_start[0]) begin
      int t;
      t = -1;
      for (int p = 0; p < N_PORTS; p++) if (has_token[p]) t = p;
      if (t >= 0) tok_count[t]++;
      if (last_tok >= 0 && ($time - last_t) / 10 == last_len + N_PORTS - 1)
        check(t == (last_tok + 1) % N_PORTS, "token moves downstream");
      last_tok = t;
      last_t = $time;
      #1 last_len = slen0;
    end
  end

  task automatic add_frag(int s, int d, int len, bit last);
    frag_s f;
    f.dest = d; f.len = len; f.last = last; f.w = {};
    for (int i = 0; i < len; i++) begin
      word_t w;
      w = $urandom;
      f.w.push_back(w);
      expq[s][d].push_back(w);
      expl[s][d].push_back(last && i == len - 1);
    end
    expected_total += len;
    iq[s].push_back(f);
  endtask

  initial begin
    int t0, t1;
    for (int p = 0; p < N_PORTS; p++) begin
      ipos[p] = 0;
      for (int d = 0; d < N_PORTS; d++) dest_ready[p][d] = 1;
    end
    // example: 0->2, 1->3, 2->0, 3->1 with the token at 0
    for (int p = 0; p < N_PORTS; p++) add_frag(p, (p + 2) % N_PORTS, 16, 1);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(posedge quantum_start[0]); #1;
    t0 = $time;
    check(has_token[0], "token starts at tile 0");
    for (int p = 0; p < N_PORTS; p++) check(granted[p], "example: all inputs send");
    check(cw_cl[0] == CL_IN && ccw_cl[1] == CL_IN && cw_cl[2] == CL_IN && ccw_cl[3] == CL_IN,
          "example: directions");
    while (received != 64) @(negedge clk);
    @(negedge clk);
    t1 = $time;
    // 16 stream cycles, 2 ring hops, the egress register, one cycle to sample
    check((t1 - t0) / 10 <= 16 + 4, $sformatf("example delivered in %0d cycles", (t1 - t0) / 10));
    check(received == 64, "example: all words delivered");

    // quantum period: back-to-back full quanta of length L
    for (int p = 0; p < N_PORTS; p++) add_frag(p, (p + 1) % N_PORTS, 20, 0);
    for (int p = 0; p < N_PORTS; p++) add_frag(p, (p + 1) % N_PORTS, 20, 1);
    @(posedge quantum_start[0]); t0 = $time;
    @(posedge quantum_start[0]); t1 = $time;
    check((t1 - t0) / 10 == 20 + 3, $sformatf("quantum period %0d cycles", (t1 - t0) / 10));
    while (iq[0].size() + iq[1].size() + iq[2].size() + iq[3].size() > 0) @(negedge clk);

    // random traffic with output contention and occasional lack of room
    for (int n = 0; n < 400; n++) begin
      int s, len, dd;
      s = $urandom_range(0, 3);
      dd = $urandom_range(0, 3);
      len = $urandom_range(1, 12);
      add_frag(s, dd, len, $urandom_range(0, 1));
    end
    fork
      begin
        while (iq[0].size() + iq[1].size() + iq[2].size() + iq[3].size() > 0) begin
          @(negedge clk);
          if ($urandom_range(0, 30) == 0) begin
            int a, b;
            a = $urandom_range(0, 3); b = $urandom_range(0, 3);
            dest_ready[a][b] = 0;
            repeat ($urandom_range(10, 60)) @(negedge clk);
            dest_ready[a][b] = 1;
            n_norooms++;
          end
        end
      end
      begin
        // no starvation: count quanta an input with room waits
        int w [N_PORTS];
        for (int p = 0; p < N_PORTS; p++) w[p] = 0;
        while (iq[0].size() + iq[1].size() + iq[2].size() + iq[3].size() > 0) begin
          @(negedge clk);
          if (!quantum_start[0]) continue;
          for (int p = 0; p < N_PORTS; p++) begin
            if (granted[p] || !in_hdr[p].valid) w[p] = 0;
            else if (dest_ready[p][in_hdr[p].dest]) w[p]++;
            if (w[p] > max_wait) max_wait = w[p];
          end
        end
      end
    join
    repeat (10) @(negedge clk);
    check(received == expected_total, "all words delivered");
    check(n_blocks > 0, "some input was blocked");
    check(n_ccw > 0 && n_cw > 0 && n_local > 0, "all three kinds of path used");
    for (int p = 0; p < N_PORTS; p++) check(tok_count[p] > 0, "every tile holds the token");
    check(n_norooms > 0, "output without room exercised");
    check(max_wait <= N_PORTS, $sformatf("longest wait %0d quanta", max_wait));
    $display("quanta %0d grants %0d blocked %0d cw %0d ccw %0d local %0d longest wait %0d",
             n_quanta, n_grants, n_blocks, n_cw, n_ccw, n_local, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
