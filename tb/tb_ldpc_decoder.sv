// tb_ldpc_decoder: end-to-end test of the full-size decoder at its default
// parameters (2560-bit frames, 25 iterations).
//
// For each frame the bench draws 1024 random information bits, encodes them
// with the staircase structure of H (and checks H*c = 0 itself), sends the
// codeword over a BPSK channel with Gaussian noise (sum of twelve uniforms),
// quantises the channel values to 6-bit LLRs and feeds them to the decoder,
// sometimes with gaps in llr_valid. Its own flooding min-sum model of the same
// arithmetic (messages saturated to +-31, plain min-sum, decisions from the
// last iteration's variable update) gives the expected output, which must
// match the decoder bit for bit; errors against the sent bits are counted and
// must be zero for the low-noise frames. The clock count per frame is checked
// against the phase timing, and the bench counts how often each mechanism
// occurred: zero reads of L(r) in the first iteration, node-unit stalls,
// half-used slots of odd-degree nodes, message saturation, gaps on the input
// handshake and the stop after the last iteration.
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int NFRAMES = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  msg_t llr_in = '0;
  logic llr_valid = 1'b0;
  logic llr_ready, bit_out, bit_valid, bit_last, busy, done;
  logic [7:0] iter;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (NFRAMES * 260000 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- code tables ----------------
  int e_var [NEDGE];   // variable of each edge (address k*Z + j)
  int e_chk [NEDGE];
  int v_deg [N];
  int v_edges [N][DMAX];
  int c_deg [M];
  int c_edges [M][DMAX];

  task automatic build_tables();
    int k = 0;
    for (int i = 0; i < int'(N); i++) v_deg[i] = 0;
    for (int i = 0; i < int'(M); i++) c_deg[i] = 0;
    for (int r = 0; r < int'(MB); r++)
      for (int c = 0; c < int'(NB); c++)
        if (BASE[r][c] >= 0) begin
          for (int j = 0; j < int'(Z); j++) begin
            int e = k * int'(Z) + j;
            int v = c * int'(Z) + (j + BASE[r][c]) % int'(Z);
            int ch = r * int'(Z) + j;
            e_var[e] = v;
            e_chk[e] = ch;
            v_edges[v][v_deg[v]] = e; v_deg[v]++;
            c_edges[ch][c_deg[ch]] = e; c_deg[ch]++;
          end
          k++;
        end
  endtask

  // ---------------- encoder ----------------
  bit cw [N];
  task automatic encode();
    for (int i = 0; i < int'(K); i++) cw[i] = 1'($urandom);
    for (int r = 0; r < int'(MB); r++)
      for (int j = 0; j < int'(Z); j++) begin
        bit p = 0;
        for (int c = 0; c < int'(NB); c++)
          if (BASE[r][c] >= 0 && c != int'(KB) + r)
            p ^= cw[c * int'(Z) + (j + BASE[r][c]) % int'(Z)];
        cw[(int'(KB) + r) * int'(Z) + j] = p;
      end
  endtask

  function automatic bit syndrome_ok();
    for (int ch = 0; ch < int'(M); ch++) begin
      bit s = 0;
      for (int t = 0; t < c_deg[ch]; t++) s ^= cw[e_var[c_edges[ch][t]]];
      if (s) return 0;
    end
    return 1;
  endfunction

  // ---------------- channel ----------------
  int lp [N];
  int sat_in = 0;
  function automatic real gauss();
    real s = 0.0;
    for (int t = 0; t < 12; t++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  task automatic channel(real sigma, real scale);
    for (int i = 0; i < int'(N); i++) begin
      real y = (cw[i] ? -1.0 : 1.0) + sigma * gauss();
      int  q = int'($rtoi(y * scale + (y >= 0 ? 0.5 : -0.5)));
      if (q > 31)  begin q = 31;  sat_in++; end
      if (q < -32) begin q = -32; sat_in++; end
      lp[i] = q;
    end
  endtask

  // ---------------- reference min-sum ----------------
  int rm [NEDGE], qm [NEDGE];
  bit ref_bits [K];
  int ref_sat = 0;

  function automatic int sat31(int v);
    if (v > 31) begin ref_sat++; return 31; end
    if (v < -31) begin ref_sat++; return -31; end
    return v;
  endfunction

  task automatic reference();
    for (int e = 0; e < int'(NEDGE); e++) rm[e] = 0;
    for (int it = 0; it < int'(MAX_ITER); it++) begin
      for (int v = 0; v < int'(N); v++) begin
        int tot = lp[v];
        for (int t = 0; t < v_deg[v]; t++) tot += rm[v_edges[v][t]];
        for (int t = 0; t < v_deg[v]; t++) qm[v_edges[v][t]] = sat31(tot - rm[v_edges[v][t]]);
        if (it == int'(MAX_ITER) - 1 && v < int'(K)) ref_bits[v] = !(tot > 0);
      end
      for (int ch = 0; ch < int'(M); ch++)
        for (int t = 0; t < c_deg[ch]; t++) begin
          int mn = 1000;
          bit sg = 0;
          for (int u = 0; u < c_deg[ch]; u++)
            if (u != t) begin
              int x = qm[c_edges[ch][u]];
              if (x < 0) sg = !sg;
              if ((x < 0 ? -x : x) < mn) mn = (x < 0 ? -x : x);
            end
          rm[c_edges[ch][t]] = sg ? -mn : mn;
        end
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_ssr_reads = 0, n_vstall = 0, n_cstall = 0, n_half_v = 0, n_half_c = 0;
  int n_sat_hw = 0, n_gap = 0, n_stop = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ssr && dut.v_adv && dut.v_iss_valid) n_ssr_reads++;
    if (dut.v_al_valid && !dut.vnu_ready) n_vstall++;
    if (dut.c_al_valid && !dut.cnu_ready) n_cstall++;
    if (dut.v_al_valid && dut.vnu_ready && !dut.v_al_en1) n_half_v++;
    if (dut.c_al_valid && dut.cnu_ready && !dut.c_al_en1) n_half_c++;
    if (dut.vnu_out_valid && (dut.vnu_q0 == 6'sd31 || dut.vnu_q0 == -6'sd31)) n_sat_hw++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_CNU_RUN && dut.c_idle && dut.iter == 8'(MAX_ITER - 1)) n_stop++;
  end

  // ---------------- output capture ----------------
  bit got [K];
  int got_n = 0;
  bit got_last = 0;
  always @(posedge clk) if (bit_valid) begin
    if (got_n < int'(K)) got[got_n] = bit_out;
    if (bit_last) got_last = (got_n == int'(K) - 1);
    got_n++;
  end

  task automatic run_frame(int f, real sigma, real scale, bit gaps, bit expect_clean);
    longint t0, t1, lower, upper;
    int mism = 0, errs = 0, fed = 0;
    encode();
    checks++;
    if (!syndrome_ok()) begin failures++; $display("frame %0d: encoder broken", f); end
    channel(sigma, scale);
    reference();
    got_n = 0;
    got_last = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    t0 = cyc;
    while (fed < int'(N)) begin
      if (gaps && ($urandom % 8 == 0)) begin
        llr_valid = 1'b0;
        n_gap++;
      end else begin
        llr_valid = 1'b1;
        llr_in = msg_t'(lp[fed]);
      end
      @(posedge clk);
      if (llr_valid && llr_ready) fed++;
      @(negedge clk);
    end
    llr_valid = 1'b0;
    t1 = cyc;
    while (!done) @(posedge clk);
    t1 = cyc - t0;
    // output
    checks++;
    if (got_n != int'(K) || !got_last) begin
      failures++;
      $display("frame %0d: got %0d bits, last flag %0d", f, got_n, got_last);
    end
    for (int i = 0; i < int'(K); i++) begin
      checks++;
      if (got[i] != ref_bits[i]) begin mism++; failures++; end
      if (got[i] != cw[i]) errs++;
    end
    // timing: load + 25 * (variable phase + check phase) + output
    lower = longint'(N) + longint'(MAX_ITER) * (33 * 128 + 32 * 128) + longint'(K);
    upper = lower + longint'(MAX_ITER) * 200 + (gaps ? 1000 : 0) + 20;
    checks++;
    if (t1 < lower || t1 > upper) begin
      failures++;
      $display("frame %0d: %0d clocks outside [%0d, %0d]", f, t1, lower, upper);
    end
    if (expect_clean) begin
      checks++;
      if (errs != 0) begin failures++; $display("frame %0d: %0d bit errors on a clean frame", f, errs); end
    end
    $display("frame %0d: sigma %0.2f, %0d clocks, %0d mismatches vs model, %0d bit errors vs sent",
             f, sigma, t1, mism, errs);
  endtask

  initial begin
    build_tables();
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    run_frame(0, 0.30, 20.0, 1'b0, 1'b1);   // clean, strong LLRs, clipped at the input
    run_frame(1, 0.70, 6.0,  1'b1, 1'b1);   // moderate noise, gaps on input
    run_frame(2, 0.85, 6.0,  1'b0, 1'b0);   // near the threshold
    run_frame(3, 1.30, 4.0,  1'b1, 1'b0);   // heavy noise, decoder fails, still matches model
    // every mechanism must have happened
    checks++; if (n_ssr_reads == 0) begin failures++; $display("no zero L(r) reads"); end
    checks++; if (n_vstall == 0)    begin failures++; $display("no variable-unit stall"); end
    checks++; if (n_half_v == 0)    begin failures++; $display("no half-used slot"); end
    checks++; if (n_sat_hw == 0 || ref_sat == 0) begin failures++; $display("no saturation"); end
    checks++; if (n_gap == 0)       begin failures++; $display("no input gap"); end
    checks++; if (n_stop != NFRAMES) begin failures++; $display("stops %0d", n_stop); end
    // every L(r) read in the first variable phase of a frame returns 0: 4224 slots
    checks++; if (n_ssr_reads != NFRAMES * 33 * 128) begin
      failures++; $display("zero-read slots %0d", n_ssr_reads);
    end
    $display("mechanisms: zero-reads %0d, v-stalls %0d, c-stalls %0d, half slots v %0d c %0d, saturated outputs %0d, input gaps %0d, stops %0d, input LLRs clipped %0d",
             n_ssr_reads, n_vstall, n_cstall, n_half_v, n_half_c, n_sat_hw, n_gap, n_stop, sat_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
