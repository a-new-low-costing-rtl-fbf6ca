// ldpc_llr_ram: channel-LLR RAM (RAM_p), one entry per code bit.
//
// The received 6-bit LLRs are written through the write port while a frame is
// loaded, one per clock; the variable-node phase reads them through the read
// port, addressed by the variable-node index. The read is registered (one clock
// latency) and the output register holds while en is low, so it follows the
// same stall as the message RAMs. One write port plus one read port is this
// design's choice; the source only names the RAM and what it stores.
module ldpc_llr_ram
  import ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = N,
  parameter int unsigned W     = QW,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  din,
  input  logic          en,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  dout
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= din;
    if (en) dout <= mem[raddr];
  end

endmodule
