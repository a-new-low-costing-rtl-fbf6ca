// ldpc_decision: decoding block - hard decision and output of the decoded bits.
//
// It takes the pseudo-posterior LLR L(Q)_i that the variable-node unit forms
// for each variable node and decides bit i as 0 when L(Q)_i > 0 and as 1
// otherwise (the source's decision rule). Decisions are stored only while
// latch is high, which the controller raises in the variable-node phase of the
// last iteration, and only for the information bits (node index below K), which
// sit in the first 1024 columns of H. After the last iteration, out_start
// streams the K stored bits out in index order, one per clock: out_valid is
// high for K clocks and out_last marks bit K-1. The one-bit-per-clock output
// and the bit buffer are this design's choices.
module ldpc_decision
  import ldpc_pkg::*;
#(
  parameter int unsigned NBITS = K
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              latch,
  input  logic              dec_valid,
  input  node_t             dec_node,
  input  logic signed [9:0] dec_total,
  input  logic              out_start,
  output logic              out_valid,
  output logic              out_bit,
  output logic              out_last,
  output logic              busy
);

  localparam int unsigned BW = $clog2(NBITS);

  logic          bits [NBITS];
  logic          run;
  logic [BW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (latch && dec_valid && (int'(dec_node) < int'(NBITS)))
      bits[dec_node[BW-1:0]] <= !(dec_total > 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (out_start && !run) begin
        run <= 1'b1;
        cnt <= '0;
      end else if (run) begin
        out_valid <= 1'b1;
        out_bit   <= bits[cnt];
        out_last  <= (cnt == BW'(NBITS - 1));
        if (cnt == BW'(NBITS - 1)) run <= 1'b0;
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign busy = run | out_valid;

endmodule
