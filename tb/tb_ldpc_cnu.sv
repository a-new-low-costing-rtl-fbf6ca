// tb_ldpc_cnu: self-checking test of the two-input min-sum check-node unit.
//
// Random check nodes of degree 2..6 with random variable messages (zeros,
// ties and extremes included) are streamed in slots of two edges, with random
// gaps on in_valid. The expected output on each edge is computed directly from
// its definition: the product of the other inputs' signs times the smallest of
// the other inputs' magnitudes, with the edge tags passed through. A run of
// degree-6 nodes back to back checks one slot per clock, and alternating
// degrees 6 and 4 check that in_ready stalls.
module tb_ldpc_cnu;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   in_valid = 1'b0, in_en1 = 1'b0, in_first = 1'b0, in_last = 1'b0;
  msg_t   in_q0 = '0, in_q1 = '0;
  eaddr_t in_tag0 = '0, in_tag1 = '0;
  logic   in_ready, out_valid, out_en1, busy;
  msg_t   out_r0, out_r1;
  eaddr_t out_tag0, out_tag1;

  ldpc_cnu dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int r; int tag; } exp_t;
  exp_t exp_q [$];

  function automatic int rnd_msg();
    int t = $urandom % 12;
    if (t == 0) return 31;
    if (t == 1) return -31;
    if (t == 2) return 0;
    if (t == 3) return 1;
    return int'($urandom % 63) - 31;
  endfunction

  int stalls = 0;
  always @(posedge clk) if (rst_n && in_valid && !in_ready) stalls++;

  task automatic send_node(int d, bit gaps);
    int q [DMAX];
    int tags [DMAX];
    int ns = (d + 1) / 2;
    for (int i = 0; i < d; i++) begin
      q[i] = rnd_msg();
      tags[i] = int'($urandom % NEDGE);
    end
    for (int i = 0; i < d; i++) begin
      int mn = 1000;
      bit sg = 0;
      for (int u = 0; u < d; u++)
        if (u != i) begin
          if (q[u] < 0) sg = !sg;
          if ((q[u] < 0 ? -q[u] : q[u]) < mn) mn = (q[u] < 0 ? -q[u] : q[u]);
        end
      exp_q.push_back('{r: sg ? -mn : mn, tag: tags[i]});
    end
    for (int s = 0; s < ns; s++) begin
      while (gaps && ($urandom % 4 == 0)) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_first = (s == 0);
      in_last  = (s == ns - 1);
      in_en1   = (2 * s + 1 < d);
      in_q0    = msg_t'(q[2 * s]);
      in_tag0  = eaddr_t'(tags[2 * s]);
      in_q1    = in_en1 ? msg_t'(q[2 * s + 1]) : msg_t'(-6'sd1);
      in_tag1  = in_en1 ? eaddr_t'(tags[2 * s + 1]) : eaddr_t'($urandom);
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = exp_q.pop_front();
      if (int'(out_r0) != e.r || int'(out_tag0) != e.tag) begin
        failures++;
        $display("r0 %0d tag %0d, expected %0d tag %0d", out_r0, out_tag0, e.r, e.tag);
      end
      if (out_en1) begin
        checks++;
        if (exp_q.size() == 0) begin failures++; $display("unexpected output 1"); end
        else begin
          e = exp_q.pop_front();
          if (int'(out_r1) != e.r || int'(out_tag1) != e.tag) begin
            failures++;
            $display("r1 %0d tag %0d, expected %0d tag %0d", out_r1, out_tag1, e.r, e.tag);
          end
        end
      end
    end
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) send_node(2 + int'($urandom % (DMAX - 1)), 1'b1);
    repeat (20) @(negedge clk);
    stalls = 0;
    t0 = $time;
    for (int n = 0; n < 200; n++) send_node(6, 1'b0);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != 200 * 3 || stalls != 0) begin
      failures++;
      $display("full rate: %0d clocks for 600 slots, %0d stalls", (t1 - t0) / 10, stalls);
    end
    stalls = 0;
    for (int n = 0; n < 20; n++) send_node((n % 2) ? 4 : 6, 1'b0);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || busy) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
