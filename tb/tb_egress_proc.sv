// tb_egress_proc: checks reassembly and in-order delivery at one egress.
//
// A crossbar model sends fragments of at most one quantum from four sources,
// one word per cycle, switching source from fragment to fragment so the
// packets of different sources interleave.  It only starts a fragment for
// source s while room[s] is high.  The output line card is sometimes not
// ready.  The testbench checks that every packet leaves whole and unbroken
// (no word of another packet in between), that packets leave in the order
// their last fragment arrived, that the data is intact, that a packet is
// streamed at one word per cycle while the line card is ready, and that
// room[s] drops when a queue fills.
module tb_egress_proc;
  import rr_pkg::*;
  localparam int Q = 4;
  localparam int SB = 32;
  localparam int NPKT = 200;

  logic clk = 0, rst_n = 0;
  link_t xb_in = '0;
  port_t xb_src = 0;
  logic room [N_PORTS];
  logic lc_valid, lc_last;
  word_t lc_data;
  logic lc_ready = 0;

  int checks = 0, failures = 0;
  int room_low = 0, gaps = 0;

  egress_proc #(.QUANTUM(Q), .SRC_BUF_WORDS(SB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  word_t pending [N_PORTS][$];   // words of the packet being sent, per source
  int    plen    [N_PORTS];
  word_t done_q  [$][$];         // complete packets in completion order
  int    sent = 0;

  function automatic word_t tag(int s, int n, int i);
    return {8'(s), 12'(n), 12'(i)};
  endfunction

  initial begin : xbar
    int nid [N_PORTS];
    for (int s = 0; s < N_PORTS; s++) begin nid[s] = 0; plen[s] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (sent < NPKT) begin
      int s, n;
      @(negedge clk);
      xb_in = '0;
      s = $urandom_range(0, N_PORTS - 1);
      if (!room[s]) begin room_low++; continue; end
      if (pending[s].size() == 0) begin
        int len;
        len = $urandom_range(5, 14);
        for (int i = 0; i < len; i++) pending[s].push_back(tag(s, nid[s], i));
        nid[s]++;
      end
      n = pending[s].size() < Q ? pending[s].size() : Q;
      for (int k = 0; k < n; k++) begin
        word_t w;
        w = pending[s].pop_front();
        xb_in.valid = 1; xb_in.data = w; xb_in.last = (pending[s].size() == 0);
        xb_src = port_t'(s);
        if (pending[s].size() == 0) begin
          word_t pk [$];
          pk = {};
          for (int i = 0; i <= int'(w[11:0]); i++) pk.push_back(tag(s, int'(w[23:12]), i));
          done_q.push_back(pk);
          sent++;
        end
        @(negedge clk);
      end
      xb_in = '0;
    end
  end

  // output line card: ready most of the time, fully ready in bursts
  initial begin : sink
    int got, idx;
    bit in_pkt;
    word_t cur [$];
    got = 0; idx = 0; in_pkt = 0;
    @(posedge rst_n);
    while (got < NPKT) begin
      @(negedge clk);
      lc_ready = ((got / 20) % 2 == 1) ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (in_pkt && lc_ready && !lc_valid) gaps++;
      if (lc_valid && lc_ready) begin
        if (!in_pkt) begin
          check(done_q.size() > 0, "packet leaves only when complete");
          if (done_q.size() > 0) cur = done_q.pop_front();
          idx = 0; in_pkt = 1;
        end
        check(idx < cur.size() && lc_data == cur[idx], $sformatf("word %0d of packet %0d", idx, got));
        check(lc_last == (idx == cur.size() - 1), "last-word flag");
        idx++;
        if (lc_last) begin in_pkt = 0; got++; end
      end
    end
    check(gaps == 0, "packet streamed without breaks");
    check(room_low > 0, "room signal exercised");
    $display("packets %0d, cycles with room low %0d", got, room_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
