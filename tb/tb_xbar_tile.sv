// tb_xbar_tile: checks one crossbar tile (port 1) on its own.
//
// The testbench plays the other three tiles: it drives their exchanged
// headers and fresh random words on both incoming ring links every cycle.
// Four quanta are run, with the token at tiles 0, 1, 2 and 3:
//   1. inputs 0..3 bound for 2,3,0,1: tile 1 sends counterclockwise, passes
//      input 0's data clockwise and hands input 3's data to its egress;
//   2. tile 1 sends to its own egress;
//   3. the egress tile 1 wants has no room: it must not send, while input 3
//      crosses elsewhere;
//   4. tile 1's output is taken by input 0: tile 1 is blocked and forwards
//      input 0's clockwise data to its egress.
// In every cycle of a quantum each server output must equal, one cycle
// later, the input its client names; the tile must read exactly its
// fragment length; and a quantum must last its length plus 3 drain cycles.
module tb_xbar_tile;
  import rr_pkg::*;

  logic clk = 0, rst_n = 0;
  frag_hdr_t in_hdr = '0;
  link_t in_word = '0;
  logic in_pop;
  logic dest_ready [N_PORTS];
  frag_hdr_t hdr_out;
  frag_hdr_t hdr_all [N_PORTS];
  frag_hdr_t others [N_PORTS];
  link_t cw_in = '0, ccw_in = '0, cw_out, ccw_out, eg_out;
  port_t eg_src;
  logic quantum_start, has_token, granted, blocked;

  int checks = 0, failures = 0;

  xbar_tile #(.ID(1)) dut (.*);

  always_comb begin
    hdr_all = others;
    hdr_all[1] = hdr_out;
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic frag_hdr_t h(bit v, int d, int l);
    return '{valid: v, dest: port_t'(d), len: len_t'(l), last: 1'b1};
  endfunction

  // fresh data every cycle
  always @(negedge clk) begin
    cw_in   <= '{valid: 1'b1, last: 1'($urandom), data: $urandom};
    ccw_in  <= '{valid: 1'b1, last: 1'($urandom), data: $urandom};
    in_word <= '{valid: 1'b1, last: 1'($urandom), data: $urandom};
  end

  // run one quantum; e_* name the expected client of each server.  The
  // headers for the quantum after this one (n_*) are applied as soon as this
  // one starts, ahead of the header latch in its first drain cycle.
  task automatic quantum(input int qlen, input int own_len, input client_e e_out,
                         input client_e e_cw, input client_e e_ccw, input int e_src,
                         input bit e_tok, input bit e_grant, input bit e_block, input string name,
                         input frag_hdr_t n_own, input frag_hdr_t n_oth [N_PORTS],
                         input int n_noroom);
    int pops;
    link_t p_in, p_cw, p_ccw;
    pops = 0;
    while (!quantum_start) @(negedge clk);
    check(has_token == e_tok, {name, ": token"});
    check(granted == e_grant, {name, ": grant"});
    check(blocked == e_block, {name, ": blocked"});
    in_hdr = n_own;
    others = n_oth;
    for (int p = 0; p < N_PORTS; p++) dest_ready[p] = (p != n_noroom);
    // stream cycles plus two drain cycles of forwarding
    for (int cyc = 0; cyc < qlen + 3; cyc++) begin
      @(posedge clk);
      p_in = in_word; p_in.valid = in_pop;
      p_cw = cw_in; p_ccw = ccw_in;
      if (in_pop) pops++;
      @(negedge clk);
      if (cyc < qlen + 2) begin
        check(eg_out  == (e_out == CL_IN ? p_in : e_out == CL_CWPREV ? p_cw : e_out == CL_CCWPREV ? p_ccw : '0),
              {name, ": egress server"});
        check(cw_out  == (e_cw == CL_IN ? p_in : e_cw == CL_CWPREV ? p_cw : e_cw == CL_CCWPREV ? p_ccw : '0),
              {name, ": clockwise server"});
        check(ccw_out == (e_ccw == CL_IN ? p_in : e_ccw == CL_CWPREV ? p_cw : e_ccw == CL_CCWPREV ? p_ccw : '0),
              {name, ": counterclockwise server"});
        if (e_out != CL_NONE) check(int'(eg_src) == e_src, {name, ": egress source"});
        check(!quantum_start, {name, ": no new quantum yet"});
      end
    end
    check(pops == own_len, $sformatf("%s: %0d words read", name, pops));
    if (name != "last") check(quantum_start, $sformatf("%s: next quantum after %0d + 3 cycles", name, qlen));
  endtask

  initial begin
    frag_hdr_t none [N_PORTS], o [N_PORTS];
    none = '{default: '0};
    for (int p = 0; p < N_PORTS; p++) dest_ready[p] = 1;
    // quantum 1 (token 0): 0->2, 1->3, 2->0, 3->1
    others = none;
    others[0] = h(1, 2, 12); others[2] = h(1, 0, 9); others[3] = h(1, 1, 7);
    in_hdr = h(1, 3, 10);
    repeat (2) @(negedge clk);
    rst_n = 1;
    quantum(12, 10, CL_CCWPREV, CL_CWPREV, CL_IN, 3, 0, 1, 0, "example", h(1, 1, 5), none, -1);
    // quantum 2 (token 1): only tile 1, to its own egress
    o = none; o[3] = h(1, 0, 4);
    quantum(5, 5, CL_IN, CL_NONE, CL_NONE, 1, 1, 1, 0, "local", h(1, 2, 6), o, 2);
    // quantum 3 (token 2): egress 2 has no room for tile 1; 3->0 elsewhere
    o = none; o[0] = h(1, 1, 8);
    quantum(4, 0, CL_NONE, CL_NONE, CL_NONE, 0, 0, 0, 0, "no room", h(1, 1, 3), o, -1);
    // quantum 4 (token 3): 0->1 takes tile 1's egress: tile 1 blocked
    quantum(8, 0, CL_CWPREV, CL_NONE, CL_NONE, 0, 0, 0, 1, "last", '0, none, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
