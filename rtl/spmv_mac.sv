// spmv_mac: double-precision streaming multiply-accumulator, the core of a
// PE. A matrix value and the matching vector value enter the multiplier with
// their row ID and an end-of-row flag; products wait in the product FIFO and
// are summed per row by the reduction circuit, which emits one (row, sum)
// result per row. A row terminator of the matrix stream enters as a pair
// whose product is +0.0 with the end-of-row flag set, so that every row,
// empty rows included, produces exactly one result (this design's choice).
// Flow control: in_ready stays high while the product FIFO has room for
// everything already inside the multiplier (credit count), so the pair rate
// is one per cycle when the accumulator keeps up. The description gives the
// structure (multiplier, product FIFO, reduction circuit); latencies and the
// FIFO depth are this design's choices.
module spmv_mac #(
  parameter int unsigned MUL_LAT   = 10,
  parameter int unsigned ADD_LAT   = 14,
  parameter int unsigned NBUF      = 4,
  parameter int unsigned PF_DEPTH  = 32,
  parameter int unsigned SET_W     = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [63:0]      in_val,
  input  logic [63:0]      in_vec,
  input  logic [SET_W-1:0] in_set,
  input  logic             in_last,
  output logic             in_ready,
  output logic             out_valid,
  output logic [63:0]      out_value,
  output logic [SET_W-1:0] out_set,
  input  logic             out_ready,
  output logic             idle,
  output logic [4:0]       ev_rule,
  output logic             ev_stall,
  output logic             ev_drain
);
  localparam int unsigned CW = $clog2(PF_DEPTH) + 1;

  logic             mul_v, acc_idle, acc_ready, pf_empty, pf_full, ev_recirc;
  logic [63:0]      mul_p;
  logic [SET_W:0]   mul_side;
  logic [SET_W+64:0] pf_out;
  logic [CW-1:0]    pf_count;
  logic [CW-1:0]    in_mul;

  assign in_ready = (CW'(pf_count) + in_mul) < CW'(PF_DEPTH);

  fp_mul #(.LAT(MUL_LAT), .SIDE_W(SET_W+1)) u_mul (
    .clk, .rst_n, .en(1'b1),
    .in_valid(in_valid && in_ready), .a(in_val), .b(in_vec), .in_side({in_last, in_set}),
    .out_valid(mul_v), .prod(mul_p), .out_side(mul_side)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_mul <= '0;
    else        in_mul <= in_mul + CW'(in_valid && in_ready) - CW'(mul_v);
  end

  sync_fifo #(.WIDTH(SET_W+65), .DEPTH(PF_DEPTH)) u_pfifo (
    .clk, .rst_n,
    .wr_en(mul_v), .wr_data({mul_side, mul_p}),
    .rd_en(acc_ready), .rd_data(pf_out),
    .full(pf_full), .empty(pf_empty), .count(pf_count)
  );

  reduction_circuit #(.ADD_LAT(ADD_LAT), .NBUF(NBUF), .SET_W(SET_W)) u_acc (
    .clk, .rst_n,
    .in_valid(!pf_empty), .in_value(pf_out[63:0]), .in_set(pf_out[SET_W+63:64]),
    .in_last(pf_out[SET_W+64]), .in_ready(acc_ready),
    .out_valid, .out_value, .out_set, .out_ready,
    .idle(acc_idle), .ev_rule, .ev_recirc, .ev_stall, .ev_drain
  );

  assign idle = acc_idle && pf_empty && (in_mul == '0);

  a_pf_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) mul_v |-> !pf_full);
endmodule
