// tb_ldpc_vnu: self-checking test of the two-input variable-node unit.
//
// Random nodes of degree 1..6 with random channel LLRs and check messages
// (extremes included, so saturation happens) are streamed in slots of two
// edges, with random gaps on in_valid. A queue model computes the expected
// outgoing messages L(Q) - L(r) saturated to +-31, their edge tags and the
// totals handed to the decision output. A second run streams degree-6 nodes
// back to back and checks that the unit takes one slot on every clock (three
// clocks per node), and a mixed-degree run checks that in_ready stalls.
module tb_ldpc_vnu;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   in_valid = 1'b0, in_en1 = 1'b0, in_first = 1'b0, in_last = 1'b0;
  msg_t   in_r0 = '0, in_r1 = '0, in_lp = '0;
  eaddr_t in_tag0 = '0, in_tag1 = '0;
  node_t  in_node = '0;
  logic   in_ready, out_valid, out_en1, dec_valid, busy;
  msg_t   out_q0, out_q1;
  eaddr_t out_tag0, out_tag1;
  node_t  dec_node;
  logic signed [9:0] dec_total;

  ldpc_vnu dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int q; int tag; } exp_t;
  exp_t exp_q [$];
  int   exp_dn [$], exp_dt [$];

  function automatic int sat(int v);
    return v > 31 ? 31 : (v < -31 ? -31 : v);
  endfunction

  function automatic int rnd_msg();
    int t = $urandom % 10;
    if (t == 0) return 31;
    if (t == 1) return -31;
    return int'($urandom % 63) - 31;
  endfunction

  int stalls = 0;
  always @(posedge clk) if (rst_n && in_valid && !in_ready) stalls++;

  task automatic send_node(int d, bit gaps);
    int r [DMAX];
    int lp, tot, node;
    int tags [DMAX];
    int ns = (d + 1) / 2;
    lp   = ($urandom % 8 == 0) ? -32 : int'($urandom % 64) - 32;
    node = int'($urandom % N);
    tot  = lp;
    for (int i = 0; i < d; i++) begin
      r[i] = rnd_msg();
      tags[i] = int'($urandom % NEDGE);
      tot += r[i];
    end
    for (int i = 0; i < d; i++) exp_q.push_back('{q: sat(tot - r[i]), tag: tags[i]});
    exp_dn.push_back(node);
    exp_dt.push_back(tot);
    for (int s = 0; s < ns; s++) begin
      while (gaps && ($urandom % 4 == 0)) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_first = (s == 0);
      in_last  = (s == ns - 1);
      in_en1   = (2 * s + 1 < d);
      in_r0    = msg_t'(r[2 * s]);
      in_tag0  = eaddr_t'(tags[2 * s]);
      in_r1    = in_en1 ? msg_t'(r[2 * s + 1]) : msg_t'($urandom);
      in_tag1  = in_en1 ? eaddr_t'(tags[2 * s + 1]) : eaddr_t'($urandom);
      in_lp    = (s == 0) ? msg_t'(lp) : msg_t'($urandom);
      in_node  = node_t'(node);
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = exp_q.pop_front();
        if (int'(out_q0) != e.q || int'(out_tag0) != e.tag) begin
          failures++;
          $display("q0 %0d tag %0d, expected %0d tag %0d", out_q0, out_tag0, e.q, e.tag);
        end
        if (out_en1) begin
          checks++;
          if (exp_q.size() == 0) begin failures++; $display("unexpected output 1"); end
          else begin
            e = exp_q.pop_front();
            if (int'(out_q1) != e.q || int'(out_tag1) != e.tag) begin
              failures++;
              $display("q1 %0d tag %0d, expected %0d tag %0d", out_q1, out_tag1, e.q, e.tag);
            end
          end
        end
      end
    end
    if (dec_valid) begin
      checks++;
      if (exp_dn.size() == 0) begin failures++; $display("unexpected decision"); end
      else begin
        int n, t;
        n = exp_dn.pop_front();
        t = exp_dt.pop_front();
        if (int'(dec_node) != n || int'(dec_total) != t) begin
          failures++;
          $display("total %0d node %0d, expected %0d node %0d", dec_total, dec_node, t, n);
        end
      end
    end
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // random degrees and gaps
    for (int n = 0; n < 3000; n++) send_node(1 + int'($urandom % DMAX), 1'b1);
    repeat (20) @(negedge clk);
    // full rate: degree-6 nodes back to back, three clocks each, no stall
    stalls = 0;
    t0 = $time;
    for (int n = 0; n < 200; n++) send_node(6, 1'b0);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != 200 * 3 || stalls != 0) begin
      failures++;
      $display("full rate: %0d clocks for 600 slots, %0d stalls", (t1 - t0) / 10, stalls);
    end
    // degree 6 followed by degree 2: the unit must stall
    stalls = 0;
    for (int n = 0; n < 20; n++) send_node((n % 2) ? 2 : 6, 1'b0);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || exp_dn.size() != 0 || busy) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
