// block_shifter: the PE's 4096-bit shift register. A matrix block (42
// val-col pairs) is loaded in parallel from the matrix cache, one 1024-bit
// cache row per cycle over four cycles, and the pairs are then shifted out
// serially, one per cycle while out_ready is high, first pair first.
// Block layout (this design's choice; the description gives only 42 pairs
// per block and a 4096-bit shifter): 64-bit words 0..41 hold the values,
// words 42..62 hold the column numbers, two per word with the lower-numbered
// pair in the low half, and word 63 is unused. `flush` drops a partly used
// block. The value field shifts by 64
// bits and the column field by 32 bits per pair.
module block_shifter #(
  parameter int unsigned PAIRS    = 42,
  parameter int unsigned ROW_BITS = 1024,
  parameter int unsigned ROWS     = 4
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            flush,      // discard held pairs
  input  logic                            load_en,
  input  logic [$clog2(ROWS)-1:0]         load_row,
  input  logic [ROW_BITS-1:0]             load_data,
  input  logic                            load_done,  // last row written this cycle
  output logic                            empty,
  output logic                            out_valid,
  output logic [63:0]                     out_val,
  output logic [31:0]                     out_col,
  input  logic                            out_ready
);
  localparam int unsigned VAL_BITS = PAIRS * 64;
  localparam int unsigned COL_BITS = PAIRS * 32;

  logic [ROWS*ROW_BITS-1:0]      blk_q;
  logic [$clog2(PAIRS+1)-1:0]    left_q;

  assign out_valid = (left_q != '0);
  assign empty     = !out_valid;
  assign out_val   = blk_q[63:0];
  assign out_col   = blk_q[VAL_BITS +: 32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_q  <= '0;
      left_q <= '0;
    end else if (flush) begin
      left_q <= '0;
    end else if (load_en) begin
      blk_q[load_row*ROW_BITS +: ROW_BITS] <= load_data;
      if (load_done) left_q <= ($bits(left_q))'(PAIRS);
    end else if (out_valid && out_ready) begin
      blk_q[0 +: VAL_BITS]        <= {64'h0, blk_q[64 +: VAL_BITS-64]};
      blk_q[VAL_BITS +: COL_BITS] <= {32'h0, blk_q[VAL_BITS+32 +: COL_BITS-32]};
      left_q <= left_q - 1'b1;
    end
  end

  a_load_when_empty: assert property (@(posedge clk) disable iff (!rst_n) load_en |-> empty);
endmodule
