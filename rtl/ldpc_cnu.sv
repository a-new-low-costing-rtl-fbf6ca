// ldpc_cnu: two-input check-node update unit (min-sum).
//
// For check node j with incoming variable messages L(q)_ij it sends back on
// every edge L(r)_ji = prod(sign of the other inputs) * min(|other inputs|), the
// source's check-node update (eq. 11). It keeps, while the node streams in, the
// XOR of all signs, the smallest magnitude, its position and the second
// smallest magnitude; the output on edge i is the second smallest where i holds
// the smallest and the smallest elsewhere. A zero input counts as positive.
// No scaling or offset is applied, as in the source's plain min-sum.
//
// The core takes two edges per clock (a slot) and has the same two-stage
// structure as the variable-node unit, which is this design's choice: stage A
// accumulates one node and buffers its edge addresses and signs, stage B emits
// the node's outputs two per clock while stage A takes the next node; in_ready
// drops while stage A holds a finished node that stage B cannot take yet.
// The edge address of each input comes back with the matching output (tag), so
// outputs are written straight to the L(r) RAM.
module ldpc_cnu
  import ldpc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  msg_t   in_q0,
  input  msg_t   in_q1,
  input  logic   in_en1,
  input  eaddr_t in_tag0,
  input  eaddr_t in_tag1,
  input  logic   in_first,
  input  logic   in_last,
  output logic   out_valid,
  output msg_t   out_r0,
  output msg_t   out_r1,
  output logic   out_en1,
  output eaddr_t out_tag0,
  output eaddr_t out_tag1,
  output logic   busy
);

  localparam int unsigned IW = $clog2(DMAX);
  typedef logic [QW-1:0] mag_t;
  typedef logic [IW-1:0] pos_t;

  typedef struct packed {
    logic   s0;
    logic   s1;
    logic   en1;
    eaddr_t tag0;
    eaddr_t tag1;
  } slot_t;

  typedef struct packed {
    logic sgn;     // XOR of all signs
    mag_t min1;
    mag_t min2;
    pos_t idx;     // edge position of min1 within the node
  } acc_t;

  function automatic mag_t mag_of(msg_t v);
    logic [QW-1:0] u = v;
    return v[QW-1] ? mag_t'(-u) : mag_t'(u);
  endfunction

  function automatic acc_t merge(acc_t a, mag_t m, pos_t p);
    acc_t r = a;
    if (m < a.min1) begin
      r.min2 = a.min1;
      r.min1 = m;
      r.idx  = p;
    end else if (m < a.min2) begin
      r.min2 = m;
    end
    return r;
  endfunction

  slot_t          a_buf [PMAX];
  acc_t           a_acc;
  logic [PW-1:0]  a_cnt;
  logic           a_full;
  slot_t          b_buf [PMAX];
  acc_t           b_acc;
  logic [PW-1:0]  b_cnt, b_len;
  logic           b_active;

  logic b_free_next, move, take;
  acc_t acc_in, acc_nx;
  pos_t p0, p1;

  assign b_free_next = !b_active || (b_cnt == b_len - 1'b1);
  assign move        = a_full && b_free_next;
  assign in_ready    = !a_full || b_free_next;
  assign take        = in_valid && in_ready;

  always_comb begin
    if (in_first) begin
      acc_in = '{sgn: 1'b0, min1: '1, min2: '1, idx: '0};
      p0     = '0;
    end else begin
      acc_in = a_acc;
      p0     = pos_t'(2 * int'(a_cnt));
    end
    p1     = p0 + 1'b1;
    acc_nx = merge(acc_in, mag_of(in_q0), p0);
    acc_nx.sgn = acc_in.sgn ^ in_q0[QW-1];
    if (in_en1) begin
      acc_nx     = merge(acc_nx, mag_of(in_q1), p1);
      acc_nx.sgn = acc_nx.sgn ^ in_q1[QW-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_acc    <= '0;
      a_cnt    <= '0;
      a_full   <= 1'b0;
      b_acc    <= '0;
      b_cnt    <= '0;
      b_len    <= '0;
      b_active <= 1'b0;
      for (int i = 0; i < int'(PMAX); i++) begin
        a_buf[i] <= '0;
        b_buf[i] <= '0;
      end
    end else begin
      if (move) begin
        b_buf    <= a_buf;
        b_acc    <= a_acc;
        b_len    <= a_cnt;
        b_cnt    <= '0;
        b_active <= 1'b1;
      end else if (b_active) begin
        if (b_cnt == b_len - 1'b1) b_active <= 1'b0;
        else                       b_cnt    <= b_cnt + 1'b1;
      end
      if (move) a_full <= 1'b0;
      if (take) begin
        a_buf[in_first ? '0 : a_cnt] <= '{s0: in_q0[QW-1], s1: in_q1[QW-1], en1: in_en1,
                                          tag0: in_tag0, tag1: in_tag1};
        a_acc <= acc_nx;
        a_cnt <= in_first ? PW'(1) : a_cnt + 1'b1;
        if (in_last) a_full <= 1'b1;
      end
    end
  end

  function automatic msg_t out_msg(acc_t a, logic s, pos_t p);
    mag_t m = (p == a.idx) ? a.min2 : a.min1;
    msg_t v;
    if (m > mag_t'(MSG_MAX)) m = mag_t'(MSG_MAX);
    v = msg_t'(m);
    return (a.sgn ^ s) ? -v : v;
  endfunction

  slot_t cur;
  pos_t  q0, q1;
  always_comb begin
    cur       = b_buf[b_cnt];
    q0        = pos_t'(2 * int'(b_cnt));
    q1        = q0 + 1'b1;
    out_valid = b_active;
    out_r0    = out_msg(b_acc, cur.s0, q0);
    out_r1    = out_msg(b_acc, cur.s1, q1);
    out_en1   = cur.en1;
    out_tag0  = cur.tag0;
    out_tag1  = cur.tag1;
  end

  assign busy = a_full || b_active;

endmodule
