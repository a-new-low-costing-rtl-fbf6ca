// tb_ldpc_ctrl: self-checking test of the processing controller.
//
// The two node-update phases are stood in for by a small model that reports
// busy for a random number of clocks after each generator start. The bench
// checks that a frame loads exactly 2560 LLRs (with gaps in llr_valid) at
// addresses 0..2559, that it then runs 25 variable phases each followed by a
// check phase and never overlaps them, that ssr is high only in the first
// variable phase and latch only in the last, that the output is started once
// after the last check phase, and that done pulses once and the clock count
// equals the sum of the phase lengths plus the one-clock start states.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 0, llr_valid = 0, v_idle, c_idle, out_busy;
  logic llr_ready, load_we, vgen_start, cgen_start, phase_vnu, phase_cnu;
  logic ssr, latch, out_start, busy, done;
  node_t load_addr;
  logic [7:0] iter;

  ldpc_ctrl dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase models: busy for a random time after a start
  int v_left = 0, c_left = 0, o_left = 0;
  int v_len_sum = 0, c_len_sum = 0, lv, lc;
  always @(posedge clk) begin
    if (vgen_start) begin lv = 5 + int'($urandom % 40); v_left <= lv; v_len_sum += lv; end
    else if (v_left > 0) v_left <= v_left - 1;
    if (cgen_start) begin lc = 5 + int'($urandom % 40); c_left <= lc; c_len_sum += lc; end
    else if (c_left > 0) c_left <= c_left - 1;
    if (out_start) o_left <= int'(K);
    else if (o_left > 0) o_left <= o_left - 1;
  end
  assign v_idle   = (v_left == 0);
  assign c_idle   = (c_left == 0);
  assign out_busy = (o_left != 0);

  int n_v = 0, n_c = 0, n_o = 0, n_done = 0, n_load = 0, n_ssr_ph = 0, n_latch_ph = 0;
  int last_phase = 0;   // 1 = variable, 2 = check
  int v_clocks = 0, c_clocks = 0;
  always @(posedge clk) if (rst_n) begin
    if (vgen_start) begin
      n_v++;
      checks++;
      if (last_phase == 1) begin failures++; $display("two variable phases in a row"); end
      last_phase = 1;
      if (ssr) n_ssr_ph++;
      if (latch) n_latch_ph++;
      checks++;
      if (ssr != (n_v == 1) || latch != (n_v == int'(MAX_ITER))) begin
        failures++;
        $display("phase %0d: ssr %0d latch %0d", n_v, ssr, latch);
      end
    end
    if (cgen_start) begin
      n_c++;
      checks++;
      if (last_phase != 1) begin failures++; $display("check phase without variable phase"); end
      last_phase = 2;
    end
    if (phase_vnu) v_clocks++;
    if (phase_cnu) c_clocks++;
    checks++;
    if ((phase_vnu && phase_cnu) || (phase_cnu && !(v_idle)) || (phase_vnu && !c_idle)) begin
      failures++;
      $display("phases overlap");
    end
    if (out_start) begin
      n_o++;
      checks++;
      if (n_v != int'(MAX_ITER) || n_c != int'(MAX_ITER)) begin
        failures++;
        $display("output after %0d/%0d phases", n_v, n_c);
      end
    end
    if (done) n_done++;
    if (load_we) begin
      checks++;
      if (int'(load_addr) != n_load) begin failures++; $display("load address %0d at %0d", load_addr, n_load); end
      n_load++;
    end
  end

  task automatic frame(bit gaps);
    int t0, t;
    n_v = 0; n_c = 0; n_o = 0; n_done = 0; n_load = 0; last_phase = 0;
    v_clocks = 0; c_clocks = 0; v_len_sum = 0; c_len_sum = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = $time / 10;
    while (n_load < int'(N)) begin
      llr_valid = gaps ? ($urandom % 4 != 0) : 1'b1;
      @(negedge clk);
    end
    llr_valid = 0;
    while (!done) @(negedge clk);
    t = $time / 10 - t0;
    @(negedge clk);
    checks++;
    if (n_v != int'(MAX_ITER) || n_c != int'(MAX_ITER) || n_o != 1 || n_done != 1 || n_load != int'(N)) begin
      failures++;
      $display("counts v %0d c %0d out %0d done %0d load %0d", n_v, n_c, n_o, n_done, n_load);
    end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    // each phase: one GO clock, then RUN until the model reports idle
    checks++;
    if (v_clocks != v_len_sum + 2 * int'(MAX_ITER) || c_clocks != c_len_sum + 2 * int'(MAX_ITER)) begin
      failures++;
      $display("phase clocks %0d/%0d for lengths %0d/%0d", v_clocks, c_clocks, v_len_sum, c_len_sum);
    end
    $display("frame: %0d clocks, variable-phase clocks %0d, check-phase clocks %0d", t, v_clocks, c_clocks);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    frame(1'b0);
    frame(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
