// ldpc_pkg: code definition and shared types of the (2560,1024) QC-LDPC decoder.
//
// The parity-check matrix H is quasi-cyclic: a 12 x 20 base matrix whose entries
// are either empty (-1) or a 128 x 128 circulant permutation matrix with shift s.
// Circulant convention: row j of a circulant with shift s has its one in column
// (j + s) mod 128. Block columns 0..7 carry the 1024 information bits, block
// columns 8..19 the 1536 parity bits. The parity part is a block staircase
// (identity on the diagonal, one shifted circulant right below it), so a codeword
// can be built row by row: p_R = sum_c(P^s(R,c) u_c) + P^s(R,8+R-1) p_(R-1).
//
// The code size (2560,1024), the circulant size 128 (the address shifter counts
// modulo 128), 6-bit messages and 25 iterations follow the source design. The
// shift values are this design's own: the source does not list its matrix. They
// were chosen to give 64 circulants (8192 edges, which makes the source's
// decoding time of 208384 clocks come out as 2560 + 25*8192 + 1024), every check
// row of even degree, and no 4-cycles.
//
// Edge memory layout, shared by the L(r) and L(q) RAMs: circulants are numbered
// k = 0..63 in row-major order of the base matrix, and the edge in local check
// row j of circulant k lives at address k*128 + j.
package ldpc_pkg;

  localparam int unsigned Z      = 128;   // circulant size
  localparam int unsigned MB     = 12;    // block rows
  localparam int unsigned NB     = 20;    // block columns
  localparam int unsigned KB     = 8;     // information block columns
  localparam int unsigned N      = NB * Z;    // 2560 code bits
  localparam int unsigned K      = KB * Z;    // 1024 information bits
  localparam int unsigned M      = MB * Z;    // 1536 checks
  localparam int unsigned NCIRC  = 64;    // non-empty circulants
  localparam int unsigned NEDGE  = NCIRC * Z; // 8192 edges
  localparam int unsigned QW     = 6;     // message width (quantization bits)
  localparam int unsigned DMAX   = 6;     // largest node degree
  localparam int unsigned PMAX   = (DMAX + 1) / 2; // slots per node, two edges per slot
  localparam int unsigned MAX_ITER = 25;

  localparam int unsigned ZW   = $clog2(Z);       // 7
  localparam int unsigned KW   = $clog2(NCIRC);   // 6
  localparam int unsigned EAW  = KW + ZW;         // 13, edge address
  localparam int unsigned NW   = $clog2(N);       // 12, node index
  localparam int unsigned PW   = $clog2(PMAX + 1);

  typedef logic signed [QW-1:0] msg_t;
  typedef logic [EAW-1:0]       eaddr_t;
  typedef logic [NW-1:0]        node_t;

  // Largest message magnitude; messages are kept symmetric in [-MSG_MAX, MSG_MAX].
  localparam int MSG_MAX = (1 << (QW - 1)) - 1;

  typedef int base_row_t [NB];
  typedef base_row_t base_t [MB];

  localparam base_t BASE = '{
    '{ 31,  29, 124,  -1,  -1,  -1, 119, 122,   0,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1},
    '{123,  -1,  79,  21,  36,  -1,  -1,  -1,  26,   0,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1},
    '{ -1,  87,  67, 122,  -1,  -1,  41,  -1,  -1,   5,   0,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1},
    '{ 52,  92,  -1,  -1,  -1,  37,  -1,   6,  -1,  -1,  76,   0,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1},
    '{ -1,  23,  66,  93,  -1,  42,  -1,  -1,  -1,  -1,  -1,  91,   0,  -1,  -1,  -1,  -1,  -1,  -1,  -1},
    '{ 57,  -1,  84,  57,  49,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  61,   0,  -1,  -1,  -1,  -1,  -1,  -1},
    '{102,  58,  -1,  -1,  -1,  51,  -1, 126,  -1,  -1,  -1,  -1,  -1,  91,   0,  -1,  -1,  -1,  -1,  -1},
    '{  7,   7,  -1,  -1,  -1,  -1,  71, 120,  -1,  -1,  -1,  -1,  -1,  -1,  66,   0,  -1,  -1,  -1,  -1},
    '{ -1,  -1,  -1,  49,  88,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1, 114,   0,  -1,  -1,  -1},
    '{ -1,  -1,  -1,  89,  -1,  93,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  20,   0,  -1,  -1},
    '{ -1,  -1,  56,  -1,  26,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  58,   0,  -1},
    '{ -1,  -1,  -1,  -1,  -1,  -1, 120,  50,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  -1,  86,   0}
  };

  // Circulant number k of base entry (r, c): count of non-empty entries before it
  // in row-major order.
  function automatic int circ_index(int r, int c);
    int n = 0;
    for (int rr = 0; rr < int'(MB); rr++)
      for (int cc = 0; cc < int'(NB); cc++)
        if (rr < r || (rr == r && cc < c))
          if (BASE[rr][cc] >= 0) n++;
    return n;
  endfunction

  // Saturate a wide signed value to the symmetric message range.
  function automatic msg_t sat_msg(logic signed [15:0] v);
    if (v > 16'(MSG_MAX))       return msg_t'(MSG_MAX);
    else if (v < -16'(MSG_MAX)) return msg_t'(-MSG_MAX);
    else                        return msg_t'(v);
  endfunction

endpackage
