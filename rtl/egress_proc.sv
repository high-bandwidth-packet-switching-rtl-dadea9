// egress_proc: egress stage of one router port.
//
// Fragments arrive from the crossbar one word per cycle (xb_in, with xb_src
// naming the input port they come from).  Fragments of different input
// ports may interleave from quantum to quantum, so each input port has its
// own reassembly queue of SRC_BUF_WORDS words.  When the last word of a
// packet is stored, the packet is complete and its input port is noted in
// a completion queue.  Complete packets leave in the order they were
// completed, each one streamed without a break to the output line card
// (lc_valid/lc_ready/lc_last).
//
// room[s] tells the crossbar that queue s can take another fragment: it is
// held high while at least two quanta of space are free, one for a fragment
// that may still be in flight and one for the next.
//
// Buffering until a packet is whole and first-in-first-out delivery follow
// the router described; the per-input queues, the room rule and the
// 2048-word queue size (a quarter of a 8192-word tile memory) are this
// design's own choices.  Packets must be at least 5 words long (a bare IPv4
// header) for the completion queue never to fill.
module egress_proc
  import rr_pkg::*;
#(
  parameter int unsigned QUANTUM       = 64,
  parameter int unsigned SRC_BUF_WORDS = 2048,
  parameter int unsigned CPL_DEPTH     = N_PORTS * SRC_BUF_WORDS / 5 + 1
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the crossbar
  input  link_t xb_in,
  input  port_t xb_src,
  output logic  room [N_PORTS],
  // output line card
  output logic  lc_valid,
  output word_t lc_data,
  output logic  lc_last,
  input  logic  lc_ready
);
  localparam int unsigned AW  = (SRC_BUF_WORDS > 1) ? $clog2(SRC_BUF_WORDS) : 1;
  localparam int unsigned CAW = (CPL_DEPTH > 1) ? $clog2(CPL_DEPTH) : 1;

  logic [WORD_W:0] q_head  [N_PORTS];
  logic            q_empty [N_PORTS];
  logic            q_full  [N_PORTS];
  logic [AW:0]     q_count [N_PORTS];
  logic            q_pop   [N_PORTS];

  logic            cpl_empty, cpl_full, cpl_pop;
  port_t           cpl_head;
  logic [CAW:0]    cpl_count;

  logic            sending;
  port_t           cur;

  for (genvar s = 0; s < N_PORTS; s++) begin : g_q
    sync_fifo #(.WIDTH(1 + WORD_W), .DEPTH(SRC_BUF_WORDS)) u_q (
      .clk, .rst_n,
      .wr_en  (xb_in.valid && xb_src == port_t'(s)),
      .wr_data({xb_in.last, xb_in.data}),
      .rd_en  (q_pop[s]),
      .rd_data(q_head[s]),
      .empty  (q_empty[s]),
      .full   (q_full[s]),
      .count  (q_count[s])
    );
    assign room[s]  = (q_count[s] + (AW+1)'(2 * QUANTUM)) <= (AW+1)'(SRC_BUF_WORDS);
    assign q_pop[s] = sending && (cur == port_t'(s)) && lc_ready && !q_empty[s];
  end

  sync_fifo #(.WIDTH(PORT_W), .DEPTH(CPL_DEPTH)) u_cpl (
    .clk, .rst_n,
    .wr_en  (xb_in.valid && xb_in.last),
    .wr_data(xb_src),
    .rd_en  (cpl_pop),
    .rd_data(cpl_head),
    .empty  (cpl_empty),
    .full   (cpl_full),
    .count  (cpl_count)
  );

  assign cpl_pop  = !sending && !cpl_empty;
  assign lc_valid = sending && !q_empty[cur];
  assign lc_data  = q_head[cur][WORD_W-1:0];
  assign lc_last  = q_head[cur][WORD_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending <= 1'b0;
      cur     <= '0;
    end else if (cpl_pop) begin
      sending <= 1'b1;
      cur     <= cpl_head;
    end else if (lc_valid && lc_ready && lc_last) begin
      sending <= 1'b0;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 xb_in.valid |-> !q_full[xb_src]);
  a_cpl_room:   assert property (@(posedge clk) disable iff (!rst_n)
                                 (xb_in.valid && xb_in.last) |-> !cpl_full);
endmodule
