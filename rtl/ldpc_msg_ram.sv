// ldpc_msg_ram: two-port edge-message RAM (used for both L(r) and L(q)).
//
// Each of the two ports can read or write one message per clock, so the RAM
// delivers or absorbs the two messages per clock of the two-input node units.
// It maps onto one true dual-port block RAM per message bit slice. Reads are
// registered (one clock latency) and read-first; the output register of a port
// is updated only when its en is high, so a stalled reader sees its data held.
// ssr is a synchronous reset of the output registers: while it is high an
// enabled read returns 0 instead of the stored value. The decoder raises it
// during the first iteration so that L(r) reads as 0 without the RAM ever
// being cleared, which is how the source initialises L(r) (eq. 9). Port width,
// read-first behaviour and the en/ssr semantics are this design's choices,
// modelled on the block RAMs of the target FPGA family.
module ldpc_msg_ram
  import ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = NEDGE,
  parameter int unsigned W     = QW,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          ssr,
  input  logic          en_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [W-1:0]  din_a,
  output logic [W-1:0]  dout_a,
  input  logic          en_b,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [W-1:0]  din_b,
  output logic [W-1:0]  dout_b
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en_a) begin
      dout_a <= ssr ? '0 : mem[addr_a];
      if (we_a) mem[addr_a] <= din_a;
    end
    if (en_b) begin
      dout_b <= ssr ? '0 : mem[addr_b];
      if (we_b) mem[addr_b] <= din_b;
    end
  end

endmodule
