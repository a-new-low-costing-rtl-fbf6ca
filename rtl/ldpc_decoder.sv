// ldpc_decoder: (2560,1024) quasi-cyclic LDPC decoder, min-sum, 6-bit messages,
// 25 iterations, two edges per clock.
//
// Structure (after the source's block diagram): the LLR RAM (RAM_p) holds the
// received LLRs, the L(r) RAM (RAM_r) the check-to-variable messages and the
// L(q) RAM (RAM_q) the variable-to-check messages. One iteration is a
// variable-node phase followed by a check-node phase:
//   variable phase: the RAM_r address generator walks H column by column and
//     reads two L(r) per clock plus L(P) of the node; the variable-node unit
//     writes two L(q) per clock into RAM_q and hands L(Q) to the decision block;
//   check phase: the RAM_q address generator walks H row by row and reads two
//     L(q) per clock; the check-node unit writes two L(r) per clock into RAM_r.
// The node units return each input's edge address with the matching output,
// so a phase writes exactly the edges it read. Each message RAM is read on both
// ports in one phase and written on both ports in the other.
// In the first iteration RAM_r's output reset is held, so every L(r) reads as
// 0 (the min-sum initialisation) and the first variable phase sends L(P).
// The decisions of the last iteration's variable phase are stored and then
// the 1024 information bits are sent out, one per clock.
//
// Interface: pulse start while idle; then present llr_in with llr_valid, one
// LLR per code bit in bit order 0..2559, taken on clocks where llr_ready is
// high (two's complement, positive means bit 0 more likely). Decoded
// information bits come out on bit_out with bit_valid, bit_last on the last;
// done pulses when the frame is finished. iter shows the iteration running.
// Timing per frame: 2560 load clocks, then per iteration about 4224 clocks for
// the variable phase and 4096 for the check phase (two edges per clock, plus a
// few clocks of pipeline fill and stalls at block-column borders), then 1024
// output clocks.
module ldpc_decoder
  import ldpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  msg_t       llr_in,
  input  logic       llr_valid,
  output logic       llr_ready,
  output logic       bit_out,
  output logic       bit_valid,
  output logic       bit_last,
  output logic [7:0] iter,
  output logic       busy,
  output logic       done
);

  // control
  logic  load_we, vgen_start, cgen_start, v_idle, c_idle;
  logic  phase_vnu, phase_cnu, ssr, latch, out_start, out_busy;
  node_t load_addr;

  // variable phase path
  logic   v_adv, v_busy, v_iss_valid, v_al_valid, v_al_en1, v_al_first, v_al_last;
  eaddr_t v_addr0, v_addr1, v_tag0, v_tag1;
  node_t  v_iss_node, v_al_node;
  msg_t   r_dout0, r_dout1, p_dout;
  logic   vnu_ready, vnu_busy, vnu_out_valid, vnu_out_en1, dec_valid;
  msg_t   vnu_q0, vnu_q1;
  eaddr_t vnu_tag0, vnu_tag1;
  node_t  dec_node;
  logic signed [9:0] dec_total;

  // check phase path
  logic   c_adv, c_busy, c_iss_valid, c_al_valid, c_al_en1, c_al_first, c_al_last;
  eaddr_t c_addr0, c_addr1, c_tag0, c_tag1;
  node_t  c_iss_node, c_al_node;
  msg_t   q_dout0, q_dout1;
  logic   cnu_ready, cnu_busy, cnu_out_valid, cnu_out_en1;
  msg_t   cnu_r0, cnu_r1;
  eaddr_t cnu_tag0, cnu_tag1;

  ldpc_ctrl u_ctrl (
    .clk, .rst_n, .start, .llr_valid, .llr_ready, .load_we, .load_addr,
    .vgen_start, .cgen_start, .v_idle, .c_idle, .phase_vnu, .phase_cnu,
    .ssr, .latch, .out_start, .out_busy, .iter, .busy, .done
  );

  assign v_idle = !v_busy && !vnu_busy;
  assign c_idle = !c_busy && !cnu_busy;
  assign v_adv  = vnu_ready;
  assign c_adv  = cnu_ready;

  // ---------------- address generators ----------------
  ldpc_addr_gen #(.COL_ORDER(1'b1)) u_agen_r (
    .clk, .rst_n, .start(vgen_start), .adv(v_adv), .busy(v_busy),
    .iss_valid(v_iss_valid), .iss_addr0(v_addr0), .iss_addr1(v_addr1), .iss_node(v_iss_node),
    .al_valid(v_al_valid), .al_tag0(v_tag0), .al_tag1(v_tag1), .al_en1(v_al_en1),
    .al_first(v_al_first), .al_last(v_al_last), .al_node(v_al_node)
  );

  ldpc_addr_gen #(.COL_ORDER(1'b0)) u_agen_q (
    .clk, .rst_n, .start(cgen_start), .adv(c_adv), .busy(c_busy),
    .iss_valid(c_iss_valid), .iss_addr0(c_addr0), .iss_addr1(c_addr1), .iss_node(c_iss_node),
    .al_valid(c_al_valid), .al_tag0(c_tag0), .al_tag1(c_tag1), .al_en1(c_al_en1),
    .al_first(c_al_first), .al_last(c_al_last), .al_node(c_al_node)
  );

  // ---------------- memories ----------------
  ldpc_llr_ram u_ram_p (
    .clk, .we(load_we), .waddr(load_addr), .din(llr_in),
    .en(phase_vnu && v_adv), .raddr(v_iss_node), .dout(p_dout)
  );

  // RAM_r: read on both ports in the variable phase, written in the check phase
  ldpc_msg_ram u_ram_r (
    .clk, .ssr(ssr),
    .en_a  (phase_vnu ? v_adv : cnu_out_valid),
    .we_a  (phase_cnu && cnu_out_valid),
    .addr_a(phase_vnu ? v_addr0 : cnu_tag0),
    .din_a (cnu_r0),
    .dout_a(r_dout0),
    .en_b  (phase_vnu ? v_adv : (cnu_out_valid && cnu_out_en1)),
    .we_b  (phase_cnu && cnu_out_valid && cnu_out_en1),
    .addr_b(phase_vnu ? v_addr1 : cnu_tag1),
    .din_b (cnu_r1),
    .dout_b(r_dout1)
  );

  // RAM_q: written in the variable phase, read on both ports in the check phase
  ldpc_msg_ram u_ram_q (
    .clk, .ssr(1'b0),
    .en_a  (phase_cnu ? c_adv : vnu_out_valid),
    .we_a  (phase_vnu && vnu_out_valid),
    .addr_a(phase_cnu ? c_addr0 : vnu_tag0),
    .din_a (vnu_q0),
    .dout_a(q_dout0),
    .en_b  (phase_cnu ? c_adv : (vnu_out_valid && vnu_out_en1)),
    .we_b  (phase_vnu && vnu_out_valid && vnu_out_en1),
    .addr_b(phase_cnu ? c_addr1 : vnu_tag1),
    .din_b (vnu_q1),
    .dout_b(q_dout1)
  );

  // ---------------- node update units ----------------
  ldpc_vnu u_vnu (
    .clk, .rst_n,
    .in_valid(v_al_valid), .in_ready(vnu_ready),
    .in_r0(r_dout0), .in_r1(r_dout1), .in_en1(v_al_en1),
    .in_tag0(v_tag0), .in_tag1(v_tag1), .in_first(v_al_first), .in_last(v_al_last),
    .in_lp(p_dout), .in_node(v_al_node),
    .out_valid(vnu_out_valid), .out_q0(vnu_q0), .out_q1(vnu_q1), .out_en1(vnu_out_en1),
    .out_tag0(vnu_tag0), .out_tag1(vnu_tag1),
    .dec_valid, .dec_node, .dec_total, .busy(vnu_busy)
  );

  ldpc_cnu u_cnu (
    .clk, .rst_n,
    .in_valid(c_al_valid), .in_ready(cnu_ready),
    .in_q0(q_dout0), .in_q1(q_dout1), .in_en1(c_al_en1),
    .in_tag0(c_tag0), .in_tag1(c_tag1), .in_first(c_al_first), .in_last(c_al_last),
    .out_valid(cnu_out_valid), .out_r0(cnu_r0), .out_r1(cnu_r1), .out_en1(cnu_out_en1),
    .out_tag0(cnu_tag0), .out_tag1(cnu_tag1), .busy(cnu_busy)
  );

  // ---------------- decoding ----------------
  ldpc_decision u_dec (
    .clk, .rst_n, .latch, .dec_valid, .dec_node, .dec_total,
    .out_start, .out_valid(bit_valid), .out_bit(bit_out), .out_last(bit_last),
    .busy(out_busy)
  );

  // Unused in this configuration: the check generator's node index and the
  // check generator's issue-valid flag (reads are qualified by the aligned flag).
  logic unused;
  assign unused = ^{c_iss_node, c_al_node, c_iss_valid, v_iss_valid};

endmodule
