// tb_ldpc_addr_gen: self-checking test of the edge address generator.
//
// Both walking orders are instantiated. The expected slot sequence is built
// here from the base matrix alone: for the column walk, node i of block column
// c visits its circulants top to bottom and the edge of circulant k with shift
// s sits at k*128 + (i - s) mod 128; for the row walk, node j of block row r
// visits its circulants left to right at k*128 + j. Each slot carries two
// addresses, the second marked unused for the odd tail of a node. The bench
// checks every aligned slot (tags, first/last, en1, node index), that the
// stage-1 addresses lead the aligned tags by one advance, the slot counts
// (4224 column slots, 4096 row slots) and, with adv held high, that one walk
// takes exactly slots + 2 clocks. A second walk holds adv low at random to
// check that a stall loses and repeats nothing.
module tb_ldpc_addr_gen;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int a0; int a1; bit en1; bit first; bit last; int node;
  } slot_t;

  slot_t exp_slots [2][$];

  function automatic int circ_no(int r, int c);
    int n = 0;
    for (int rr = 0; rr < int'(MB); rr++)
      for (int cc = 0; cc < int'(NB); cc++)
        if ((rr < r || (rr == r && cc < c)) && BASE[rr][cc] >= 0) n++;
    return n;
  endfunction

  task automatic build_expected();
    int addrs [DMAX];
    int d;
    exp_slots[0].delete();
    exp_slots[1].delete();
    // index 1: column walk, index 0: row walk
    for (int c = 0; c < int'(NB); c++)
      for (int i = 0; i < int'(Z); i++) begin
        d = 0;
        for (int r = 0; r < int'(MB); r++)
          if (BASE[r][c] >= 0) begin
            addrs[d] = circ_no(r, c) * int'(Z) + ((i - BASE[r][c]) % int'(Z) + int'(Z)) % int'(Z);
            d++;
          end
        for (int s = 0; s < (d + 1) / 2; s++)
          exp_slots[1].push_back('{a0: addrs[2*s], a1: (2*s+1 < d) ? addrs[2*s+1] : -1,
                                   en1: (2*s+1 < d), first: (s == 0), last: (s == (d+1)/2 - 1),
                                   node: c * int'(Z) + i});
      end
    for (int r = 0; r < int'(MB); r++)
      for (int j = 0; j < int'(Z); j++) begin
        d = 0;
        for (int c = 0; c < int'(NB); c++)
          if (BASE[r][c] >= 0) begin
            addrs[d] = circ_no(r, c) * int'(Z) + j;
            d++;
          end
        for (int s = 0; s < (d + 1) / 2; s++)
          exp_slots[0].push_back('{a0: addrs[2*s], a1: (2*s+1 < d) ? addrs[2*s+1] : -1,
                                   en1: (2*s+1 < d), first: (s == 0), last: (s == (d+1)/2 - 1),
                                   node: r * int'(Z) + j});
      end
  endtask

  logic   start [2];
  logic   adv [2];
  logic   busy [2], iss_valid [2], al_valid [2], al_en1 [2], al_first [2], al_last [2];
  eaddr_t iss_addr0 [2], iss_addr1 [2], al_tag0 [2], al_tag1 [2];
  node_t  iss_node [2], al_node [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    ldpc_addr_gen #(.COL_ORDER(g == 1)) dut (
      .clk, .rst_n, .start(start[g]), .adv(adv[g]), .busy(busy[g]),
      .iss_valid(iss_valid[g]), .iss_addr0(iss_addr0[g]), .iss_addr1(iss_addr1[g]),
      .iss_node(iss_node[g]), .al_valid(al_valid[g]), .al_tag0(al_tag0[g]),
      .al_tag1(al_tag1[g]), .al_en1(al_en1[g]), .al_first(al_first[g]),
      .al_last(al_last[g]), .al_node(al_node[g])
    );
  end

  task automatic walk(int g, bit stalls);
    int idx = 0, clocks = 0, nexp;
    eaddr_t prev0, prev1;
    bit prev_v = 0;
    slot_t e;
    nexp = exp_slots[g].size();
    @(negedge clk);
    start[g] = 1'b1;
    adv[g]   = 1'b1;
    @(negedge clk);
    start[g] = 1'b0;
    while (busy[g]) begin
      adv[g] = stalls ? ($urandom % 3 != 0) : 1'b1;
      @(posedge clk);
      clocks++;
      if (adv[g] && al_valid[g]) begin
        e = exp_slots[g][idx];
        idx++;
        checks++;
        if (int'(al_tag0[g]) != e.a0 || al_en1[g] != e.en1 || al_first[g] != e.first ||
            al_last[g] != e.last || int'(al_node[g]) != e.node ||
            (e.en1 && int'(al_tag1[g]) != e.a1)) begin
          failures++;
          if (failures < 10)
            $display("walk %0d slot %0d: tag %0d/%0d en1 %0d f %0d l %0d node %0d, expected %0d/%0d %0d %0d %0d %0d",
                     g, idx - 1, al_tag0[g], al_tag1[g], al_en1[g], al_first[g], al_last[g], al_node[g],
                     e.a0, e.a1, e.en1, e.first, e.last, e.node);
        end
        checks++;
        if (!prev_v || prev0 != al_tag0[g] || (e.en1 && prev1 != al_tag1[g])) begin
          failures++;
          $display("walk %0d slot %0d: stage 1 did not lead", g, idx - 1);
        end
      end
      if (adv[g]) begin
        prev_v = iss_valid[g];
        prev0  = iss_addr0[g];
        prev1  = iss_addr1[g];
      end
      @(negedge clk);
    end
    checks++;
    if (idx != nexp) begin failures++; $display("walk %0d: %0d slots, expected %0d", g, idx, nexp); end
    if (!stalls) begin
      checks++;
      if (clocks != nexp + 2) begin
        failures++;
        $display("walk %0d: %0d clocks for %0d slots", g, clocks, nexp);
      end
    end
  endtask

  initial begin
    start = '{1'b0, 1'b0};
    adv   = '{1'b0, 1'b0};
    build_expected();
    checks++;
    if (exp_slots[1].size() != 33 * 128 || exp_slots[0].size() != 32 * 128) begin
      failures++;
      $display("slot totals %0d %0d", exp_slots[1].size(), exp_slots[0].size());
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    walk(1, 1'b0);
    walk(0, 1'b0);
    walk(1, 1'b1);
    walk(0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
