// tb_ldpc_decision: self-checking test of the decision and output block.
//
// Random totals (zero and +-1 included) are offered for every node index of
// a frame, once with latch low (must leave no trace) and once with latch high;
// nodes above the information part must be ignored. The bench then starts the
// output and checks that exactly 1024 bits come out on consecutive clocks, in
// index order, with bit = 1 exactly when the total is not positive, and that
// bit_last marks the final one.
module tb_ldpc_decision;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic latch = 0, dec_valid = 0, out_start = 0;
  node_t dec_node = '0;
  logic signed [9:0] dec_total = '0;
  logic out_valid, out_bit, out_last, busy;

  ldpc_decision dut (.*);

  int checks = 0, failures = 0;
  bit exp_bits [K];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_total();
    int t = $urandom % 8;
    if (t == 0) return 0;
    if (t == 1) return 1;
    if (t == 2) return -1;
    return int'($urandom % 400) - 200;
  endfunction

  task automatic offer(bit l, bit record);
    for (int i = 0; i < int'(N); i++) begin
      int t = rnd_total();
      latch = l; dec_valid = 1; dec_node = node_t'(i); dec_total = 10'(t);
      if (record && i < int'(K)) exp_bits[i] = (t <= 0);
      @(negedge clk);
      dec_valid = 0;
      if ($urandom % 3 == 0) @(negedge clk);
    end
    latch = 0;
  endtask

  task automatic drain();
    int n = 0, first_t = -1, last_t = -1, t = 0;
    out_start = 1;
    @(negedge clk);
    out_start = 0;
    while (n < int'(K) && t < 3000) begin
      @(posedge clk);
      #1;
      t++;
      if (out_valid) begin
        checks++;
        if (out_bit != exp_bits[n]) begin
          failures++;
          if (failures < 10) $display("bit %0d: got %0d expected %0d", n, out_bit, exp_bits[n]);
        end
        if (first_t < 0) first_t = t;
        last_t = t;
        checks++;
        if (out_last != (n == int'(K) - 1)) begin failures++; $display("last flag at %0d", n); end
        n++;
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (n != int'(K) || last_t - first_t != int'(K) - 1 || busy) begin
      failures++;
      $display("%0d bits over %0d clocks", n, last_t - first_t + 1);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    offer(1'b1, 1'b1);
    offer(1'b0, 1'b0);   // latch low: stored bits must stay
    drain();
    offer(1'b1, 1'b1);   // a second frame
    drain();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
