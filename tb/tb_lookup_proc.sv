// tb_lookup_proc: checks the longest-prefix-match route lookup.
//
// Loads a table with nested prefixes, then sends random and hand-picked
// addresses, one per cycle back to back, and compares each answer (one cycle
// later) with a reference match computed in the testbench.  Also checks the
// default port on a miss, that an entry can be removed, and the one-cycle
// latency.
module tb_lookup_proc;
  import rr_pkg::*;
  localparam int ENTRIES = 16;

  logic clk = 0, rst_n = 0;
  logic tbl_we = 0, tbl_valid = 0;
  logic [3:0] tbl_idx = 0;
  logic [31:0] tbl_prefix = 0;
  logic [5:0] tbl_plen = 0;
  port_t tbl_port = 0;
  logic req_valid = 0;
  logic [31:0] req_addr = 0;
  logic resp_valid, resp_hit;
  port_t resp_port;

  int checks = 0, failures = 0;
  bit          r_valid [ENTRIES];
  logic [31:0] r_prefix[ENTRIES];
  int          r_plen  [ENTRIES];
  int          r_port  [ENTRIES];

  lookup_proc #(.ENTRIES(ENTRIES), .DEFAULT_PORT(0)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic void ref_match(input logic [31:0] a, output int port, output bit hit);
    int best;
    best = -1; port = 0; hit = 0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (r_valid[e] && (r_plen[e] == 0 || (a >> (32 - r_plen[e])) == (r_prefix[e] >> (32 - r_plen[e])))
          && r_plen[e] > best) begin
        best = r_plen[e]; port = r_port[e]; hit = 1;
      end
    end
  endfunction

  task automatic write(input int idx, input bit v, input logic [31:0] pfx, input int len, input int port);
    @(negedge clk);
    tbl_we = 1; tbl_idx = 4'(idx); tbl_valid = v; tbl_prefix = pfx; tbl_plen = 6'(len); tbl_port = port_t'(port);
    r_valid[idx] = v; r_prefix[idx] = pfx; r_plen[idx] = len; r_port[idx] = port;
    @(negedge clk);
    tbl_we = 0;
  endtask

  // expected answers travel one cycle behind the requests
  int  exp_port_q [$];
  bit  exp_hit_q  [$];

  always @(posedge clk) begin
    if (rst_n && resp_valid) begin
      check(exp_port_q.size() > 0, "answer without request");
      if (exp_port_q.size() > 0) begin
        int p; bit h;
        p = exp_port_q.pop_front(); h = exp_hit_q.pop_front();
        check(int'(resp_port) == p && resp_hit == h, $sformatf("lookup answer %0d/%0d vs %0d/%0d", resp_port, resp_hit, p, h));
      end
    end
  end

  task automatic ask(input logic [31:0] a);
    int p; bit h;
    @(negedge clk);
    req_valid = 1; req_addr = a;
    ref_match(a, p, h);
    exp_port_q.push_back(p); exp_hit_q.push_back(h);
  endtask

  initial begin
    for (int e = 0; e < ENTRIES; e++) r_valid[e] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // no table yet: default port, miss
    ask(32'h0A00_0001);
    @(negedge clk) req_valid = 0;
    @(negedge clk);
    write(0, 1, 32'h0A00_0000, 8, 1);     // 10/8      -> 1
    write(1, 1, 32'h0A01_0000, 16, 2);    // 10.1/16   -> 2
    write(2, 1, 32'h0A01_0200, 24, 3);    // 10.1.2/24 -> 3
    write(3, 1, 32'hC0A8_0000, 16, 3);    // 192.168/16 -> 3
    write(4, 1, 32'hC0A8_0101, 32, 2);    // host route -> 2
    write(5, 1, 32'hAC10_0000, 12, 1);    // 172.16/12 -> 1
    ask(32'h0A01_0203); ask(32'h0A01_0303); ask(32'h0A02_0000); ask(32'hC0A8_0101);
    ask(32'hC0A8_0102); ask(32'hAC1F_FFFF); ask(32'hAC20_0000); ask(32'h0B00_0000);
    // one-cycle latency
    @(negedge clk) req_valid = 0;
    @(negedge clk);
    req_valid = 1; req_addr = 32'h0A01_0299;
    exp_port_q.push_back(3); exp_hit_q.push_back(1);
    @(posedge clk); #1;
    req_valid = 0;
    check(resp_valid && resp_port == 3, "answer one cycle after the request");
    for (int e = 6; e < ENTRIES; e++)
      write(e, 1, $urandom, $urandom_range(0, 32), $urandom_range(0, 3));
    for (int n = 0; n < 300; n++) ask((n % 2) ? $urandom : {8'h0A, 8'($urandom_range(0, 2)), 16'($urandom)});
    @(negedge clk) req_valid = 0;
    write(2, 0, 32'h0A01_0200, 24, 3);    // remove 10.1.2/24
    ask(32'h0A01_0203);
    @(negedge clk) req_valid = 0;
    repeat (3) @(negedge clk);
    check(exp_port_q.size() == 0, "all requests answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
