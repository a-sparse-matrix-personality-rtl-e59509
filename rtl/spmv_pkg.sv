// spmv_pkg: shared constants, types and double-precision helper functions for
// the sparse matrix-vector multiplier (SpMV). Sizes that follow the design
// description: 8 PEs per application engine, 4 engines, 42 val-col pairs per
// 4096-bit matrix block, 16 blocks (672 pairs) per matrix cache segment, a
// 4-line vector cache of 2048 doubles per line, 16 64-bit memory ports per
// engine (8 memory controllers x 2 ports). Address widths, tag widths and the
// block memory layout are this design's own choices.
package spmv_pkg;

  localparam int unsigned ADDR_W      = 48;   // byte address width
  localparam int unsigned SET_W       = 32;   // row (set) ID width
  localparam int unsigned COL_W       = 32;   // column number width
  localparam int unsigned MEM_PORTS   = 16;   // 8 controllers x 2 ports of 64 bits
  localparam int unsigned ROW_BITS    = 1024; // one matrix cache row, 16 words
  localparam int unsigned BLK_PAIRS   = 42;   // val-col pairs per block
  localparam int unsigned BLK_ROWS    = 4;    // cache rows per block (4096 bits)
  localparam int unsigned SEG_BLOCKS  = 16;   // blocks per segment (672 pairs)
  localparam int unsigned SEG_WORDS   = SEG_BLOCKS * BLK_ROWS * MEM_PORTS; // 1024
  localparam int unsigned VC_LINES    = 4;
  localparam int unsigned VC_LINE_W   = 2048; // doubles per vector cache line
  localparam int unsigned TAG_W       = 11;   // word offset within a miss line

  // Kind of memory request a PE has outstanding at the global controller.
  typedef enum logic [1:0] {REQ_NONE, REQ_RESULT, REQ_VEC, REQ_MAT} req_kind_e;

  // One word of fill data returned from memory, broadcast to all caches.
  typedef struct packed {
    logic [MEM_PORTS-1:0]        valid;  // lane p carries a word
    logic [MEM_PORTS-1:0][6:0]   row;    // row of the line, per lane
    logic [MEM_PORTS-1:0][63:0]  data;
  } fill_bus_t;

  // Result leaving the reduction circuit: sum of one row.
  typedef struct packed {
    logic [SET_W-1:0] set;
    logic [63:0]      value;
  } result_t;

  localparam logic [63:0] DP_ZERO = 64'h0;

  // IEEE-754 double addition, round to nearest even. Subnormal inputs and
  // results are flushed to zero; infinities and NaN are propagated.
  function automatic logic [63:0] dp_add(input logic [63:0] a, input logic [63:0] b);
    logic        sa, sb, sr, swap;
    logic [10:0] ea, eb;
    logic [52:0] ma, mb;
    logic [55:0] xa, xb, sh;
    logic [56:0] s;
    logic [12:0] e;
    logic [11:0] d;
    logic        sticky;
    int          lz;
    logic [53:0] rnd;
    sa = a[63]; sb = b[63];
    ea = a[62:52]; eb = b[62:52];
    ma = {1'b1, a[51:0]}; mb = {1'b1, b[51:0]};
    if (ea == 11'h7ff || eb == 11'h7ff) begin
      if (ea == 11'h7ff && a[51:0] != 0) return a;
      if (eb == 11'h7ff && b[51:0] != 0) return b;
      if (ea == 11'h7ff && eb == 11'h7ff && sa != sb) return 64'h7ff8_0000_0000_0000;
      return (ea == 11'h7ff) ? a : b;
    end
    if (ea == 0 && eb == 0) return {sa & sb, 63'h0};
    if (ea == 0) return b;
    if (eb == 0) return a;
    swap = ({eb, mb} > {ea, ma});
    if (swap) begin
      {sa, sb} = {sb, sa}; {ea, eb} = {eb, ea}; {ma, mb} = {mb, ma};
    end
    xa = {ma, 3'b000};
    xb = {mb, 3'b000};
    d  = {1'b0, ea} - {1'b0, eb};
    if (d >= 56) begin
      sh = 56'h1;                      // only the sticky bit survives
    end else begin
      sh = xb >> d;
      sticky = 1'b0;
      for (int i = 0; i < 56; i++) if (i < int'(d) && xb[i]) sticky = 1'b1;
      sh[0] = sh[0] | sticky;
    end
    e  = {2'b00, ea};
    sr = sa;
    if (sa == sb) begin
      s = {1'b0, xa} + {1'b0, sh};
      if (s[56]) begin
        s = {1'b0, s[56:1]} | {56'h0, s[0]};
        e = e + 1;
      end
    end else begin
      s = {1'b0, xa} - {1'b0, sh};
      if (s == 0) return 64'h0;
      lz = 0;
      for (int i = 55; i >= 0; i--) begin
        if (s[i]) break;
        lz++;
      end
      s = s << lz;
      e = e - 13'(lz);
    end
    // s[55:3] mantissa, s[2] guard, s[1] round, s[0] sticky
    rnd = {1'b0, s[55:3]};
    if (s[2] && (s[1] || s[0] || s[3])) rnd = rnd + 1;
    if (rnd[53]) begin
      rnd = rnd >> 1;
      e = e + 1;
    end
    if ($signed(e) <= 0) return {sr, 63'h0};
    if (e >= 13'd2047) return {sr, 11'h7ff, 52'h0};
    return {sr, e[10:0], rnd[51:0]};
  endfunction

  // IEEE-754 double multiplication, round to nearest even, subnormals
  // flushed to zero.
  function automatic logic [63:0] dp_mul(input logic [63:0] a, input logic [63:0] b);
    logic         sr;
    logic [10:0]  ea, eb;
    logic [105:0] p;
    logic [13:0]  e;
    logic [53:0]  m;
    logic         g, st;
    sr = a[63] ^ b[63];
    ea = a[62:52]; eb = b[62:52];
    if ((ea == 11'h7ff && a[51:0] != 0)) return a;
    if ((eb == 11'h7ff && b[51:0] != 0)) return b;
    if (ea == 11'h7ff || eb == 11'h7ff) begin
      if (ea == 0 || eb == 0) return 64'h7ff8_0000_0000_0000;
      return {sr, 11'h7ff, 52'h0};
    end
    if (ea == 0 || eb == 0) return {sr, 63'h0};
    p = {1'b1, a[51:0]} * {1'b1, b[51:0]};
    e = 14'(ea) + 14'(eb) - 14'd1023;
    if (p[105]) begin
      m  = {1'b0, p[105:53]};
      g  = p[52];
      st = |p[51:0];
      e  = e + 1;
    end else begin
      m  = {1'b0, p[104:52]};
      g  = p[51];
      st = |p[50:0];
    end
    if (g && (st || m[0])) m = m + 1;
    if (m[53]) begin
      m = m >> 1;
      e = e + 1;
    end
    if ($signed(e) <= 0) return {sr, 63'h0};
    if ($signed(e) >= 2047) return {sr, 11'h7ff, 52'h0};
    return {sr, e[10:0], m[51:0]};
  endfunction

endpackage
