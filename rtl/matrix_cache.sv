// matrix_cache: the application engine's shared 64 KB matrix cache. It is
// 512 rows of 1024 bits (16 lanes of 64 bits), split into one segment of 64
// rows per PE. A segment holds 16 blocks of 4 rows; each block carries 42
// val-col pairs, so a segment holds 672 pairs.
// Read side: a PE raises rd_req with the block number it wants; requests are
// granted with fixed priority, lowest PE number first, and a granted PE gets
// its block's four rows on consecutive cycles (rd_valid, rd_pe, rd_row,
// rd_last and rd_data, one cycle after the row address). rd_gnt pulses in
// the cycle a request is accepted.
// Write side: the global memory controller writes a segment through the
// fill bus; lane p of a fill goes to lane p of row fill_row[p] of segment
// fill_seg. Geometry, the fixed-priority read arbitration and the 16-block
// refill follow the description; the signal-level protocol is this design's.
module matrix_cache #(
  parameter int unsigned NPE        = 8,
  parameter int unsigned LANES      = 16,
  parameter int unsigned SEG_ROWS   = 64,
  parameter int unsigned BLK_ROWS   = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [NPE-1:0]                    rd_req,
  input  logic [NPE-1:0][$clog2(SEG_ROWS/BLK_ROWS)-1:0] rd_blk,
  output logic [NPE-1:0]                    rd_gnt,
  output logic                              rd_valid,
  output logic [$clog2(NPE)-1:0]            rd_pe,
  output logic [$clog2(BLK_ROWS)-1:0]       rd_row,
  output logic                              rd_last,
  output logic [LANES*64-1:0]               rd_data,
  input  logic                              fill_en,
  input  logic [$clog2(NPE)-1:0]            fill_seg,
  input  logic [LANES-1:0]                  fill_valid,
  input  logic [LANES-1:0][6:0]             fill_row,
  input  logic [LANES-1:0][63:0]            fill_data
);
  localparam int unsigned PW = $clog2(NPE);
  localparam int unsigned RW = $clog2(SEG_ROWS);
  localparam int unsigned BW = $clog2(SEG_ROWS / BLK_ROWS);
  localparam int unsigned KW = $clog2(BLK_ROWS);

  logic [63:0] mem [LANES][NPE * SEG_ROWS];

  logic          busy_q;
  logic [PW-1:0] pe_q;
  logic [BW-1:0] blk_q;
  logic [KW-1:0] k_q;
  logic          gnt_f;
  logic [PW-1:0] gnt_pe;

  always_comb begin
    gnt_f  = 1'b0;
    gnt_pe = '0;
    for (int p = NPE-1; p >= 0; p--) begin
      if (rd_req[p]) begin gnt_f = 1'b1; gnt_pe = PW'(p); end
    end
  end

  always_comb begin
    rd_gnt = '0;
    if (!busy_q && gnt_f) rd_gnt[gnt_pe] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      pe_q     <= '0;
      blk_q    <= '0;
      k_q      <= '0;
      rd_valid <= 1'b0;
      rd_pe    <= '0;
      rd_row   <= '0;
      rd_last  <= 1'b0;
    end else begin
      rd_valid <= busy_q;
      rd_pe    <= pe_q;
      rd_row   <= k_q;
      rd_last  <= busy_q && (k_q == KW'(BLK_ROWS-1));
      if (!busy_q) begin
        if (gnt_f) begin
          busy_q <= 1'b1;
          pe_q   <= gnt_pe;
          blk_q  <= rd_blk[gnt_pe];
          k_q    <= '0;
        end
      end else begin
        k_q <= k_q + 1'b1;
        if (k_q == KW'(BLK_ROWS-1)) busy_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < LANES; p++) begin
      if (busy_q) rd_data[p*64 +: 64] <= mem[p][{pe_q, blk_q, k_q}];
      if (fill_en && fill_valid[p]) mem[p][{fill_seg, fill_row[p][RW-1:0]}] <= fill_data[p];
    end
  end
endmodule
