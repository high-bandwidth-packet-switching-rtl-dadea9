// ingress_proc: ingress stage of one router port.
//
// Packets arrive from the input line card as a stream of 32-bit words
// (lc_valid/lc_ready handshake, lc_last on the final word).  Each word is
// stored in the packet buffer as it arrives.  On the way in, the IPv4 header
// is processed: the Time-to-Live byte of header word 2 is decremented and the
// header checksum in the same word is updated incrementally
// (HC' = ~(~HC + ~m + m') in one's-complement arithmetic, m being the old and
// m' the new TTL/protocol half-word).  The destination address, header word
// 4, is sent to the lookup stage (lk_req_valid for one cycle) while the
// payload keeps streaming in.  When the last word is stored and the lookup
// has answered, a descriptor {output port, length} is queued; if the answer
// is still outstanding the input stalls (lc_ready low) until it arrives.  A
// packet shorter than five words carries no destination address and goes to
// port 0.
//
// Towards the Rotating Crossbar the stage offers the head packet as a
// sequence of fragments of at most QUANTUM words: xb_hdr describes the
// fragment now at the head (output port, length, last-fragment flag) and is
// recomputed combinationally, so a new fragment is offered in the cycle after
// the previous one was taken.  xb_word is the next word of the buffer, and
// xb_pop takes it.  A packet is only offered once it is completely buffered,
// so the crossbar can read a whole fragment at one word per cycle.
//
// The buffering, header processing, lookup hand-off and fragmentation follow
// the router described; the descriptor queue, the quantum of 64 words and
// store-and-forward of whole packets are this design's own choices.  Packets
// may be no longer than BUF_WORDS words.
module ingress_proc
  import rr_pkg::*;
#(
  parameter int unsigned QUANTUM    = 64,
  parameter int unsigned BUF_WORDS  = 8192,
  parameter int unsigned DESC_DEPTH = BUF_WORDS / 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // input line card
  input  logic        lc_valid,
  input  word_t       lc_data,
  input  logic        lc_last,
  output logic        lc_ready,
  // lookup stage
  output logic        lk_req_valid,
  output logic [31:0] lk_req_addr,
  input  logic        lk_resp_valid,
  input  port_t       lk_resp_port,
  // crossbar side
  output frag_hdr_t   xb_hdr,
  output link_t       xb_word,
  input  logic        xb_pop
);
  typedef struct packed {
    port_t dest;
    len_t  len;
  } desc_t;

  localparam int unsigned DAW = (BUF_WORDS > 1) ? $clog2(BUF_WORDS) : 1;
  localparam int unsigned QAW = (DESC_DEPTH > 1) ? $clog2(DESC_DEPTH) : 1;

  // One's-complement 16-bit sum with end-around carry.
  function automatic logic [15:0] oc_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

  // ---------------------------------------------------------------- input
  len_t  wcnt;          // index of the next word within the packet
  logic  wait_lk;       // last word stored, lookup answer outstanding
  logic  dest_v;        // lookup answer for the current packet captured
  port_t dest_q;
  len_t  len_q;         // length of a packet waiting for its lookup answer
  logic  accept;
  word_t wr_word;
  logic  desc_push;
  desc_t desc_in;

  logic  desc_pop;
  logic  active;        // head packet partly sent, rem_q holds what is left
  len_t  rem_q, cur_rem;
  logic  data_full, desc_full, data_empty, desc_empty;
  desc_t desc_head;
  logic [DAW:0] data_count;
  logic [QAW:0] desc_count;

  assign lc_ready     = !data_full && !desc_full && !wait_lk;
  assign accept       = lc_valid && lc_ready;
  assign lk_req_valid = accept && (wcnt == len_t'(4));
  assign lk_req_addr  = lc_data;

  always_comb begin
    logic [7:0]  ttl_new;
    logic [15:0] m_old, m_new;
    wr_word = lc_data;
    ttl_new = '0;
    m_old   = '0;
    m_new   = '0;
    if (wcnt == len_t'(2)) begin
      ttl_new = (lc_data[31:24] == 8'd0) ? 8'd0 : lc_data[31:24] - 8'd1;
      m_old   = lc_data[31:16];
      m_new   = {ttl_new, lc_data[23:16]};
      wr_word = {m_new, ~oc_add(oc_add(~lc_data[15:0], ~m_old), m_new)};
    end
  end

  // Descriptor for a finished packet: now if the lookup already answered
  // (or the packet is too short to have an address), else when it answers.
  always_comb begin
    desc_push = 1'b0;
    desc_in   = '{dest: dest_q, len: len_q};
    if (wait_lk && lk_resp_valid) begin
      desc_push = 1'b1;
      desc_in   = '{dest: lk_resp_port, len: len_q};
    end else if (accept && lc_last) begin
      if (wcnt < len_t'(4)) begin
        desc_push = 1'b1;
        desc_in   = '{dest: '0, len: wcnt + 1'b1};
      end else if (dest_v || lk_resp_valid) begin
        desc_push = 1'b1;
        desc_in   = '{dest: dest_v ? dest_q : lk_resp_port, len: wcnt + 1'b1};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt    <= '0;
      wait_lk <= 1'b0;
      dest_v  <= 1'b0;
      dest_q  <= '0;
      len_q   <= '0;
    end else begin
      if (lk_resp_valid && !wait_lk) begin
        dest_v <= 1'b1;
        dest_q <= lk_resp_port;
      end
      if (accept) begin
        wcnt <= lc_last ? '0 : wcnt + 1'b1;
        if (lc_last) begin
          len_q <= wcnt + 1'b1;
          if (!desc_push) wait_lk <= 1'b1;
          dest_v <= 1'b0;
        end
      end
      if (wait_lk && lk_resp_valid) wait_lk <= 1'b0;
    end
  end

  sync_fifo #(.WIDTH(1 + WORD_W), .DEPTH(BUF_WORDS)) u_data (
    .clk, .rst_n,
    .wr_en  (accept),
    .wr_data({lc_last, wr_word}),
    .rd_en  (xb_pop),
    .rd_data({xb_word.last, xb_word.data}),
    .empty  (data_empty),
    .full   (data_full),
    .count  (data_count)
  );
  assign xb_word.valid = !data_empty;

  sync_fifo #(.WIDTH($bits(desc_t)), .DEPTH(DESC_DEPTH)) u_desc (
    .clk, .rst_n,
    .wr_en  (desc_push),
    .wr_data(desc_in),
    .rd_en  (desc_pop),
    .rd_data(desc_head),
    .empty  (desc_empty),
    .full   (desc_full),
    .count  (desc_count)
  );

  // ------------------------------------------------------- fragmentation

  assign cur_rem = active ? rem_q : desc_head.len;

  always_comb begin
    xb_hdr.valid = !desc_empty;
    xb_hdr.dest  = desc_head.dest;
    xb_hdr.len   = (cur_rem > len_t'(QUANTUM)) ? len_t'(QUANTUM) : cur_rem;
    xb_hdr.last  = (cur_rem <= len_t'(QUANTUM));
  end

  assign desc_pop = xb_pop && (cur_rem == len_t'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      rem_q  <= '0;
    end else if (xb_pop) begin
      active <= (cur_rem != len_t'(1));
      rem_q  <= cur_rem - 1'b1;
    end
  end

  a_pop_has_data: assert property (@(posedge clk) disable iff (!rst_n)
                                   xb_pop |-> (!desc_empty && !data_empty));
endmodule
