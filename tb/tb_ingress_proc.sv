// tb_ingress_proc: checks the ingress stage of one port.
//
// A line-card model sends IPv4 packets of random length (5 to 40 words) with
// a correct header checksum and random idle cycles.  A lookup model answers
// each destination address after 1 to 3 cycles with port = address mod 4.
// A crossbar model takes whole fragments at random times, one word per
// cycle, and checks, against a reference computed here:
//   * the fragment header: output port, length min(quantum, remaining),
//     last-fragment flag;
//   * every word, with header word 2 carrying TTL-1 and a checksum recomputed
//     from scratch over the modified header;
//   * that a fragment can be read one word per cycle and that the next
//     fragment of a packet is offered right after the previous one.
// Runt packets of 1-2 words (no address, sent to port 0) and a TTL of 0 are
// also sent.
module tb_ingress_proc;
  import rr_pkg::*;
  localparam int Q = 8;
  localparam int NPKT = 120;

  logic clk = 0, rst_n = 0;
  logic lc_valid = 0, lc_last = 0, lc_ready;
  word_t lc_data = 0;
  logic lk_req_valid;
  logic [31:0] lk_req_addr;
  logic lk_resp_valid = 0;
  port_t lk_resp_port = 0;
  frag_hdr_t xb_hdr;
  link_t xb_word;
  logic xb_pop = 0;

  int checks = 0, failures = 0;
  int frags = 0, multi = 0, back_to_back = 0, waits = 0;

  ingress_proc #(.QUANTUM(Q), .BUF_WORDS(64), .DESC_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  // expected output, packet by packet
  word_t exp_words [$][$];
  int    exp_dest  [$];

  function automatic word_t fix_hdr_word2(input word_t w2, input word_t hdr [5]);
    logic [31:0] sum;
    logic [7:0]  ttl;
    word_t h [5];
    h = hdr;
    ttl = (w2[31:24] == 0) ? 8'd0 : w2[31:24] - 8'd1;
    h[2] = {ttl, w2[23:16], 16'h0};
    sum = 0;
    for (int i = 0; i < 5; i++) sum += h[i][31:16] + h[i][15:0];
    while (sum[31:16] != 0) sum = sum[15:0] + sum[31:16];
    return {ttl, w2[23:16], ~sum[15:0]};
  endfunction

  // ---------------- line card
  initial begin : line_card
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPKT; p++) begin
      int len;
      word_t w [$];
      word_t hdr [5];
      logic [31:0] sum;
      w = {};
      len = (p % 17 == 5) ? $urandom_range(1, 2) : $urandom_range(5, 40);
      hdr[0] = {4'h4, 4'h5, 8'h00, 16'(len * 4)};
      hdr[1] = {16'(p), 16'h0000};
      hdr[2] = {(p % 13 == 0) ? 8'd0 : 8'($urandom_range(1, 255)), 8'd17, 16'h0};
      hdr[3] = $urandom;
      hdr[4] = $urandom;
      sum = 0;
      for (int i = 0; i < 5; i++) sum += hdr[i][31:16] + hdr[i][15:0];
      while (sum[31:16] != 0) sum = sum[15:0] + sum[31:16];
      hdr[2][15:0] = ~sum[15:0];
      for (int i = 0; i < len; i++) w.push_back(i < 5 ? hdr[i] : $urandom);
      begin
        word_t e [$];
        e = w;
        if (len >= 5) e[2] = fix_hdr_word2(w[2], hdr);
        exp_words.push_back(e);
        exp_dest.push_back(len >= 5 ? int'(hdr[4][1:0]) : 0);
      end
      for (int i = 0; i < len; i++) begin
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        lc_valid = 1; lc_data = w[i]; lc_last = (i == len - 1);
        @(posedge clk);
        while (!lc_ready) begin waits++; @(posedge clk); end
        @(negedge clk);
        lc_valid = 0;
      end
    end
  end

  // ---------------- lookup model
  initial begin : lookup
    forever begin
      @(posedge clk);
      if (lk_req_valid) begin
        int lat;
        logic [1:0] p;
        p = lk_req_addr[1:0];
        lat = $urandom_range(1, 3);
        repeat (lat - 1) @(posedge clk);
        @(negedge clk);
        lk_resp_valid = 1; lk_resp_port = p;
        @(negedge clk);
        lk_resp_valid = 0;
      end
    end
  end

  // ---------------- crossbar model
  initial begin : xbar
    int pkt, idx, rem;
    pkt = 0; idx = 0;
    @(posedge rst_n);
    while (pkt < NPKT) begin
      @(negedge clk);
      if (xb_hdr.valid && $urandom_range(0, 2) != 0) begin
        int n;
        rem = exp_words[pkt].size() - idx;
        n = xb_hdr.len;
        check(int'(xb_hdr.dest) == exp_dest[pkt], "fragment output port");
        check(n == (rem < Q ? rem : Q), "fragment length");
        check(xb_hdr.last == (rem <= Q), "last-fragment flag");
        frags++;
        if (idx > 0) multi++;
        for (int k = 0; k < n; k++) begin
          xb_pop = 1;
          check(xb_word.valid, "word present while reading a fragment");
          check(xb_word.data == exp_words[pkt][idx], $sformatf("word %0d of packet %0d: %h vs %h", idx, pkt, xb_word.data, exp_words[pkt][idx]));
          check(xb_word.last == (idx == exp_words[pkt].size() - 1), "packet-end flag");
          idx++;
          @(negedge clk);
        end
        xb_pop = 0;
        if (idx == exp_words[pkt].size()) begin pkt++; idx = 0; end
        else begin
          check(xb_hdr.valid, "next fragment offered at once");
          back_to_back++;
        end
      end
    end
    repeat (5) @(negedge clk);
    check(!xb_hdr.valid, "nothing left over");
    check(multi > 20, "packets were split into several fragments");
    $display("fragments %0d, follow-on fragments %0d, input stall cycles %0d", frags, multi, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
