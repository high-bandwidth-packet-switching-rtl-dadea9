// rr_tb_util.svh: packet helpers shared by the router testbenches, included
// inside a testbench module.
//
// make_packet builds an IPv4 packet of a given length in 32-bit words: a
// 5-word header with version 4, IHL 5, the total length in bytes, an
// identification field {source port, sequence number}, a TTL, protocol 17, a
// correct header checksum and the destination address, followed by random
// payload.  routed_packet gives what the router must deliver for it: the
// same words with TTL one lower and the checksum recomputed from scratch.
typedef logic [31:0] pkt_t [$];

function automatic logic [15:0] hdr_csum(input logic [31:0] h [5]);
  logic [31:0] sum;
  sum = 0;
  for (int i = 0; i < 5; i++) sum += 32'(h[i][31:16]) + 32'(h[i][15:0]);
  while (sum[31:16] != 0) sum = 32'(sum[15:0]) + 32'(sum[31:16]);
  return ~sum[15:0];
endfunction

function automatic pkt_t make_packet(input int len, input int src, input int seq,
                                     input logic [31:0] dst_ip, input logic [7:0] ttl);
  pkt_t p;
  logic [31:0] h [5];
  h[0] = {4'h4, 4'h5, 8'h00, 16'(len * 4)};
  h[1] = {4'(src), 12'(seq), 16'h4000};
  h[2] = {ttl, 8'd17, 16'h0};
  h[3] = {8'd192, 8'd168, 8'(src), 8'd1};
  h[4] = dst_ip;
  h[2][15:0] = hdr_csum(h);
  p = {};
  for (int i = 0; i < len; i++) p.push_back(i < 5 ? h[i] : $urandom);
  return p;
endfunction

function automatic pkt_t routed_packet(input pkt_t p);
  pkt_t r;
  logic [31:0] h [5];
  r = p;
  for (int i = 0; i < 5; i++) h[i] = p[i];
  h[2][31:24] = (h[2][31:24] == 0) ? 8'd0 : h[2][31:24] - 8'd1;
  h[2][15:0] = 16'h0;
  h[2][15:0] = hdr_csum(h);
  r[2] = h[2];
  return r;
endfunction
