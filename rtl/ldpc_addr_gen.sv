// ldpc_addr_gen: edge address generator (ROM of sub-matrix start addresses plus
// an address shifter made of a modulo-128 counter and an adder).
//
// It walks the edges of H node by node and issues two edge addresses per clock
// (one "slot"), which is what the two-input node-update units consume. With
// COL_ORDER = 1 it walks variable nodes (block column by block column), as the
// variable-node phase needs; with COL_ORDER = 0 it walks check nodes (block row
// by block row) for the check-node phase. A node of degree d takes ceil(d/2)
// slots; for odd d the second address of the last slot is flagged unused.
//
// The ROM holds, for every circulant in walking order, its start address
// {k, offset}: k is the circulant number in the edge memories and offset is
// (128 - shift) mod 128 for the column walk, 0 for the row walk. The address of
// the edge of local node cnt is {k, offset + cnt}, the 7-bit add wrapping
// modulo 128, so one adder and one counter serve all 64 sub-matrices as the
// source design describes. The ROM layout and the segment tables are this
// design's choice.
//
// Timing: start begins a walk over the whole matrix. Everything advances only
// on adv (the downstream ready), so a stall freezes the generator, the RAM
// output register (driven with en = adv) and the aligned metadata together.
// Stage 1 (iss_*) drives the RAM read ports; stage 2 (al_*) carries the same
// addresses as tags, plus node flags, in step with the RAM's registered data.
module ldpc_addr_gen
  import ldpc_pkg::*;
#(
  parameter bit COL_ORDER = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   adv,
  output logic   busy,
  // stage 1: read addresses for the RAM
  output logic   iss_valid,
  output eaddr_t iss_addr0,
  output eaddr_t iss_addr1,
  output node_t  iss_node,
  // stage 2: aligned with the RAM read data
  output logic   al_valid,
  output eaddr_t al_tag0,
  output eaddr_t al_tag1,
  output logic   al_en1,
  output logic   al_first,
  output logic   al_last,
  output node_t  al_node
);

  localparam int unsigned NSEG = COL_ORDER ? NB : MB;

  typedef eaddr_t rom_t [NCIRC];
  typedef int     seg_t [NB];

  function automatic rom_t build_rom();
    rom_t t;
    int   n = 0;
    for (int i = 0; i < int'(NCIRC); i++) t[i] = '0;
    if (COL_ORDER) begin
      for (int c = 0; c < int'(NB); c++)
        for (int r = 0; r < int'(MB); r++)
          if (BASE[r][c] >= 0) begin
            t[n] = eaddr_t'(circ_index(r, c) * int'(Z) + ((int'(Z) - BASE[r][c]) % int'(Z)));
            n++;
          end
    end else begin
      for (int r = 0; r < int'(MB); r++)
        for (int c = 0; c < int'(NB); c++)
          if (BASE[r][c] >= 0) begin
            t[n] = eaddr_t'(circ_index(r, c) * int'(Z));
            n++;
          end
    end
    return t;
  endfunction

  function automatic seg_t build_deg();
    seg_t d;
    for (int s = 0; s < int'(NB); s++) d[s] = 0;
    for (int r = 0; r < int'(MB); r++)
      for (int c = 0; c < int'(NB); c++)
        if (BASE[r][c] >= 0) begin
          if (COL_ORDER) d[c]++;
          else           d[r]++;
        end
    return d;
  endfunction

  function automatic seg_t build_start();
    seg_t d = build_deg();
    seg_t s;
    int   acc = 0;
    for (int i = 0; i < int'(NB); i++) begin
      s[i] = acc;
      acc += d[i];
    end
    return s;
  endfunction

  localparam rom_t ROM       = build_rom();
  localparam seg_t SEG_DEG   = build_deg();
  localparam seg_t SEG_START = build_start();

  logic                  run;
  logic [4:0]            seg;
  logic [ZW-1:0]         cnt;      // the modulo-128 counter
  logic [PW-1:0]         slot;

  int                    deg;
  logic [KW-1:0]         idx0, idx1;
  logic [PW-1:0]         nslot;
  eaddr_t                base0, base1, a0, a1;
  logic                  en1;

  always_comb begin
    deg   = SEG_DEG[seg];
    nslot = PW'((deg + 1) / 2);
    idx0  = KW'(SEG_START[seg] + 2 * int'(slot));
    idx1  = idx0 + 1'b1;
    en1   = (2 * int'(slot) + 1) < deg;
    base0 = ROM[idx0];
    base1 = en1 ? ROM[idx1] : base0;
    // address shifter: sub-matrix start + counter, wrapping inside the sub-matrix
    a0    = {base0[EAW-1:ZW], base0[ZW-1:0] + cnt};
    a1    = {base1[EAW-1:ZW], base1[ZW-1:0] + cnt};
  end

  logic iss_en1, iss_first, iss_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      seg       <= '0;
      cnt       <= '0;
      slot      <= '0;
      iss_valid <= 1'b0;
      iss_addr0 <= '0;
      iss_addr1 <= '0;
      iss_en1   <= 1'b0;
      iss_first <= 1'b0;
      iss_last  <= 1'b0;
      iss_node  <= '0;
      al_valid  <= 1'b0;
      al_tag0   <= '0;
      al_tag1   <= '0;
      al_en1    <= 1'b0;
      al_first  <= 1'b0;
      al_last   <= 1'b0;
      al_node   <= '0;
    end else begin
      if (start && !run) begin
        run  <= 1'b1;
        seg  <= '0;
        cnt  <= '0;
        slot <= '0;
      end else if (adv && run) begin
        if (slot == nslot - 1'b1) begin
          slot <= '0;
          if (cnt == ZW'(Z - 1)) begin
            cnt <= '0;
            if (seg == 5'(NSEG - 1)) run <= 1'b0;
            else                     seg <= seg + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end else begin
          slot <= slot + 1'b1;
        end
      end
      if (adv) begin
        iss_valid <= run && !start;
        iss_addr0 <= a0;
        iss_addr1 <= a1;
        iss_en1   <= en1;
        iss_first <= (slot == '0);
        iss_last  <= (slot == nslot - 1'b1);
        iss_node  <= node_t'(int'(seg) * int'(Z) + int'(cnt));
        al_valid  <= iss_valid;
        al_tag0   <= iss_addr0;
        al_tag1   <= iss_addr1;
        al_en1    <= iss_en1;
        al_first  <= iss_first;
        al_last   <= iss_last;
        al_node   <= iss_node;
      end
    end
  end

  assign busy = run | iss_valid | al_valid;

endmodule
