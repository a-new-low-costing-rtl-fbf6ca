// ldpc_vnu: two-input variable-node update unit (min-sum, LLR domain).
//
// For variable node i with channel LLR L(P)_i and incoming check messages
// L(r)_ji it forms the total L(Q)_i = L(P)_i + sum_j L(r)_ji and sends back, on
// every edge, L(q)_ij = L(Q)_i - L(r)_ji, which is the sum over all other edges
// (the source's variable-node update, eq. 10). The total is also handed to the
// decision block as the pseudo-posterior LLR (eq. 12).
//
// One computing core takes two edges per clock (a slot). It has two stages, as
// chosen for this design: stage A accumulates the slots of one node into the
// total and keeps the incoming messages and their edge addresses in a small
// buffer; stage B then emits the node's outgoing messages, two per clock, from
// that buffer while stage A already takes in the next node. Both stages see one
// node for ceil(d/2) clocks, so equal-degree nodes stream without a gap. When
// the next node has fewer slots than the one being emitted, in_ready drops
// until stage B can take it (a stall).
//
// Outgoing messages are saturated to [-31, 31]; the total is kept at full
// width. The edge address of each input travels with it (tag) and comes back
// with the matching output, so the outputs can be written straight to the
// L(q) RAM. Interface timing: a slot is taken when in_valid && in_ready; the
// first output slot of a node appears the clock after the node is handed to
// stage B; dec_valid pulses on that clock with the node's total.
module ldpc_vnu
  import ldpc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  msg_t   in_r0,
  input  msg_t   in_r1,
  input  logic   in_en1,
  input  eaddr_t in_tag0,
  input  eaddr_t in_tag1,
  input  logic   in_first,
  input  logic   in_last,
  input  msg_t   in_lp,
  input  node_t  in_node,
  output logic   out_valid,
  output msg_t   out_q0,
  output msg_t   out_q1,
  output logic   out_en1,
  output eaddr_t out_tag0,
  output eaddr_t out_tag1,
  output logic   dec_valid,
  output node_t  dec_node,
  output logic signed [9:0] dec_total,
  output logic   busy
);

  typedef struct packed {
    msg_t   r0;
    msg_t   r1;
    logic   en1;
    eaddr_t tag0;
    eaddr_t tag1;
  } slot_t;

  typedef logic signed [9:0] tot_t;

  // stage A
  slot_t          a_buf [PMAX];
  tot_t           a_tot;
  logic [PW-1:0]  a_cnt;
  logic           a_full;
  node_t          a_node;
  // stage B
  slot_t          b_buf [PMAX];
  tot_t           b_tot;
  logic [PW-1:0]  b_cnt, b_len;
  logic           b_active;

  logic b_free_next, move, take;
  tot_t add_in;

  assign b_free_next = !b_active || (b_cnt == b_len - 1'b1);
  assign move        = a_full && b_free_next;
  assign in_ready    = !a_full || b_free_next;
  assign take        = in_valid && in_ready;

  always_comb begin
    add_in = tot_t'(in_r0) + (in_en1 ? tot_t'(in_r1) : tot_t'(0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_tot     <= '0;
      a_cnt     <= '0;
      a_full    <= 1'b0;
      a_node    <= '0;
      b_tot     <= '0;
      b_cnt     <= '0;
      b_len     <= '0;
      b_active  <= 1'b0;
      dec_valid <= 1'b0;
      dec_node  <= '0;
      dec_total <= '0;
      for (int i = 0; i < int'(PMAX); i++) begin
        a_buf[i] <= '0;
        b_buf[i] <= '0;
      end
    end else begin
      dec_valid <= 1'b0;
      // stage B: emit one slot per clock, take the next node when handed over
      if (move) begin
        b_buf     <= a_buf;
        b_tot     <= a_tot;
        b_len     <= a_cnt;
        b_cnt     <= '0;
        b_active  <= 1'b1;
        dec_valid <= 1'b1;
        dec_node  <= a_node;
        dec_total <= a_tot;
      end else if (b_active) begin
        if (b_cnt == b_len - 1'b1) b_active <= 1'b0;
        else                       b_cnt    <= b_cnt + 1'b1;
      end
      // stage A: accumulate
      if (move) a_full <= 1'b0;
      if (take) begin
        if (in_first) begin
          a_buf[0] <= '{r0: in_r0, r1: in_r1, en1: in_en1, tag0: in_tag0, tag1: in_tag1};
          a_tot    <= tot_t'(in_lp) + add_in;
          a_cnt    <= PW'(1);
          a_node   <= in_node;
        end else begin
          a_buf[a_cnt] <= '{r0: in_r0, r1: in_r1, en1: in_en1, tag0: in_tag0, tag1: in_tag1};
          a_tot        <= a_tot + add_in;
          a_cnt        <= a_cnt + 1'b1;
        end
        if (in_last) a_full <= 1'b1;
      end
    end
  end

  slot_t cur;
  always_comb begin
    cur       = b_buf[b_cnt];
    out_valid = b_active;
    out_q0    = sat_msg(16'(b_tot) - 16'($signed(cur.r0)));
    out_q1    = sat_msg(16'(b_tot) - 16'($signed(cur.r1)));
    out_en1   = cur.en1;
    out_tag0  = cur.tag0;
    out_tag1  = cur.tag1;
  end

  assign busy = a_full || b_active;

endmodule
