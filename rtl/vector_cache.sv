// vector_cache: a PE's private cache of the input vector x, direct mapped
// with four lines of 2048 consecutive doubles (8192 doubles, 64 KB).
// A column number c maps to line c[12:11], word c[10:0] within the line and
// tag c[31:13]. Lookup is combinational on the tags (lk_hit); a hit is read
// with rd_en and the double appears on rd_data in the next cycle (it holds
// while rd_en is low). On a miss, miss_req stays high with the byte address
// of the 2048-double line (vec_base + 8*(c & ~2047)) until the global memory
// controller has written the whole line through the fill bus and pulses
// fill_done; the tag is then updated. Storage is 16 banks, one per memory
// port: word w of a line lives in bank w[3:0] at row w[10:4], so the 16
// words a memory cycle can deliver land in 16 different banks. `inval`
// clears all tags (start of a new multiplication). The geometry follows the
// description; the banking and handshake are this design's.
module vector_cache #(
  parameter int unsigned LINES  = 4,
  parameter int unsigned LINE_W = 2048,
  parameter int unsigned LANES  = 16,
  parameter int unsigned ADDR_W = 48
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     inval,
  input  logic [ADDR_W-1:0]        vec_base,
  input  logic                     lk_valid,
  input  logic [31:0]              lk_col,
  output logic                     lk_hit,
  input  logic                     rd_en,
  output logic [63:0]              rd_data,
  output logic                     miss_req,
  output logic [ADDR_W-1:0]        miss_addr,
  output logic [$clog2(LINES)-1:0] miss_line,
  input  logic                     fill_en,
  input  logic [$clog2(LINES)-1:0] fill_line,
  input  logic [LANES-1:0]         fill_valid,
  input  logic [LANES-1:0][6:0]    fill_row,
  input  logic [LANES-1:0][63:0]   fill_data,
  input  logic                     fill_done
);
  localparam int unsigned LB = $clog2(LINES);
  localparam int unsigned WB = $clog2(LINE_W);   // word-in-line bits
  localparam int unsigned PB = $clog2(LANES);
  localparam int unsigned RB = WB - PB;          // rows per line bits
  localparam int unsigned TW = 32 - LB - WB;

  logic [63:0]   mem [LANES][LINES * (LINE_W / LANES)];
  logic [TW-1:0] tag_q [LINES];
  logic [LINES-1:0] val_q;

  logic [LB-1:0] line;
  logic [TW-1:0] tag;
  assign line = lk_col[WB +: LB];
  assign tag  = lk_col[31 -: TW];

  assign lk_hit    = lk_valid && val_q[line] && (tag_q[line] == tag);
  assign miss_req  = lk_valid && !lk_hit;
  assign miss_line = line;
  assign miss_addr = vec_base + (ADDR_W'({lk_col[31:WB], {WB{1'b0}}}) << 3);

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[lk_col[PB-1:0]][{line, lk_col[WB-1:PB]}];
    for (int p = 0; p < LANES; p++) begin
      if (fill_en && fill_valid[p])
        mem[p][{fill_line, fill_row[p][RB-1:0]}] <= fill_data[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      val_q <= '0;
      for (int l = 0; l < LINES; l++) tag_q[l] <= '0;
    end else if (inval) begin
      val_q <= '0;
    end else if (fill_en && fill_done) begin
      val_q[fill_line] <= 1'b1;
      tag_q[fill_line] <= tag;
    end
  end
endmodule
