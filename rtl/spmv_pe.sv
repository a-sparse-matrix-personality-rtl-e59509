// spmv_pe: one processing element. It streams its share of the matrix
// (rows row_start .. row_start+num_rows-1, stored from mat_base in the
// zero-terminated block format) through a 4096-bit block shifter, looks up
// x[col] in its vector cache, and feeds value and x[col] to the
// multiply-accumulator; each row's sum goes with its row number into the
// result FIFO, which the global memory controller drains to memory.
// Control unit (inside this module):
//  * Matrix segment: when no segment is held, request a refill of this PE's
//    matrix cache segment (1024 words from mat_addr) and advance mat_addr
//    by one segment when it completes. Then read its 16 blocks one by one
//    through the shared matrix cache, each time the shifter is empty.
//  * Stream: a pair with val = 0 and col = 0 ends the current row; it is
//    sent to the MAC with x forced to +0.0 and the end-of-row flag, the row
//    number is incremented and the rows-left count decremented. Other pairs
//    wait for a vector cache hit; on a miss the PE stalls while the line is
//    fetched. Pairs after the last row of the workload are ignored.
//  * done rises when all rows were streamed, the MAC is empty and every
//    result has been written.
// Pipeline: shifter head + tag check (cycle 0), vector data read (cycle 1,
// MAC input), then the MAC. Configuration is captured on `start`, which
// also invalidates the vector cache and flushes the shifter. The structure
// (shifter, vector cache, MAC, control unit, result FIFO) follows the
// description; the handshakes, block format and terminator handling in the
// MAC are this design's choices.
module spmv_pe
  import spmv_pkg::*;
#(
  parameter int unsigned NPE       = 8,
  parameter int unsigned MUL_LAT   = 10,
  parameter int unsigned ADD_LAT   = 14,
  parameter int unsigned NBUF      = 4,
  parameter int unsigned RF_DEPTH  = 16,
  parameter int unsigned LINE_W    = 2048
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NPE)-1:0]   pe_id,
  // workload
  input  logic                     start,
  input  logic [SET_W-1:0]         row_start,
  input  logic [ADDR_W-1:0]        mat_base,
  input  logic [SET_W-1:0]         num_rows,
  input  logic [ADDR_W-1:0]        vec_base,
  output logic                     done,
  // matrix cache read port
  output logic                     mc_req,
  output logic [3:0]               mc_blk,
  input  logic                     mc_gnt,
  input  logic                     mc_valid,
  input  logic [$clog2(NPE)-1:0]   mc_pe,
  input  logic [1:0]               mc_row,
  input  logic                     mc_last,
  input  logic [ROW_BITS-1:0]      mc_data,
  // requests to the global memory controller
  output logic                     vreq,
  output logic [ADDR_W-1:0]        vreq_addr,
  output logic [1:0]               vreq_line,
  output logic                     mreq,
  output logic [ADDR_W-1:0]        mreq_addr,
  input  logic                     mdone,
  // vector cache fill
  input  logic                     vfill_en,
  input  logic [1:0]               vfill_line,
  input  logic [MEM_PORTS-1:0]     fill_valid,
  input  logic [MEM_PORTS-1:0][6:0]  fill_row,
  input  logic [MEM_PORTS-1:0][63:0] fill_data,
  input  logic                     vfill_done,
  // result FIFO read side
  output logic                     res_valid,
  output result_t                  res_data,
  input  logic                     res_pop,
  // events, one pulse each
  output logic [4:0]               ev_rule,
  output logic                     ev_acc_stall,
  output logic                     ev_drain,
  output logic                     ev_vec_miss,
  output logic                     ev_res_full
);
  // control state
  logic             active_q, seg_valid_q, mreq_q, blk_busy_q;
  logic [3:0]       blk_next_q;
  logic [SET_W-1:0] rows_left_q, cur_row_q;
  logic [ADDR_W-1:0] mat_addr_q, vec_base_q;

  // stream
  logic        sh_valid, sh_empty, sh_pop, term, hit, vc_miss;
  logic [63:0] sh_val, vc_rd;
  logic [31:0] sh_col;
  logic        s2_v_q, s2_term_q, s2_last_q, adv;
  logic [63:0] s2_val_q;
  logic [SET_W-1:0] s2_set_q;
  logic        mac_ready, mac_out_v, mac_idle, rf_full, rf_empty;
  logic [63:0] mac_out_val;
  logic [SET_W-1:0] mac_out_set;
  logic        my_rd, streaming;

  assign streaming = active_q && (rows_left_q != '0);
  assign my_rd     = mc_valid && (mc_pe == pe_id);

  // ---------------- matrix segment and block control ----------------
  assign mc_req    = streaming && seg_valid_q && sh_empty && !blk_busy_q && !start;
  assign mc_blk    = blk_next_q;
  assign mreq      = mreq_q;
  assign mreq_addr = mat_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q    <= 1'b0;
      seg_valid_q <= 1'b0;
      mreq_q      <= 1'b0;
      blk_busy_q  <= 1'b0;
      blk_next_q  <= '0;
      rows_left_q <= '0;
      cur_row_q   <= '0;
      mat_addr_q  <= '0;
      vec_base_q  <= '0;
    end else if (start) begin
      active_q    <= 1'b1;
      seg_valid_q <= 1'b0;
      mreq_q      <= 1'b0;
      blk_busy_q  <= 1'b0;
      blk_next_q  <= '0;
      rows_left_q <= num_rows;
      cur_row_q   <= row_start;
      mat_addr_q  <= mat_base;
      vec_base_q  <= vec_base;
    end else begin
      if (streaming && !seg_valid_q && !mreq_q && !blk_busy_q) mreq_q <= 1'b1;
      if (mdone) begin
        mreq_q      <= 1'b0;
        seg_valid_q <= 1'b1;
        blk_next_q  <= '0;
        mat_addr_q  <= mat_addr_q + ADDR_W'(SEG_WORDS * 8);
      end
      if (mc_gnt) begin
        blk_busy_q <= 1'b1;
        blk_next_q <= blk_next_q + 1'b1;
      end
      if (my_rd && mc_last) begin
        blk_busy_q <= 1'b0;
        if (blk_next_q == 4'd0) seg_valid_q <= 1'b0;   // all 16 blocks used
      end
      if (sh_pop && term) begin
        rows_left_q <= rows_left_q - 1'b1;
        cur_row_q   <= cur_row_q + 1'b1;
      end
    end
  end

  block_shifter #(.PAIRS(BLK_PAIRS), .ROW_BITS(ROW_BITS), .ROWS(BLK_ROWS)) u_shift (
    .clk, .rst_n, .flush(start),
    .load_en(my_rd), .load_row(mc_row), .load_data(mc_data), .load_done(my_rd && mc_last),
    .empty(sh_empty), .out_valid(sh_valid), .out_val(sh_val), .out_col(sh_col),
    .out_ready(sh_pop)
  );

  // ---------------- stream through vector cache ----------------
  assign term   = (sh_val == 64'h0) && (sh_col == 32'h0);
  assign adv    = !s2_v_q || mac_ready;
  assign sh_pop = streaming && sh_valid && adv && (term || hit);

  vector_cache #(.LINES(VC_LINES), .LINE_W(LINE_W), .LANES(MEM_PORTS), .ADDR_W(ADDR_W)) u_vc (
    .clk, .rst_n, .inval(start), .vec_base(vec_base_q),
    .lk_valid(streaming && sh_valid && !term), .lk_col(sh_col), .lk_hit(hit),
    .rd_en(sh_pop && !term), .rd_data(vc_rd),
    .miss_req(vc_miss), .miss_addr(vreq_addr), .miss_line(vreq_line),
    .fill_en(vfill_en), .fill_line(vfill_line), .fill_valid, .fill_row, .fill_data,
    .fill_done(vfill_done)
  );
  assign vreq = vc_miss;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v_q    <= 1'b0;
      s2_term_q <= 1'b0;
      s2_last_q <= 1'b0;
      s2_val_q  <= '0;
      s2_set_q  <= '0;
    end else if (start) begin
      s2_v_q    <= 1'b0;
    end else if (adv) begin
      s2_v_q    <= sh_pop;
      s2_term_q <= term;
      s2_last_q <= term;
      s2_val_q  <= sh_val;
      s2_set_q  <= cur_row_q;
    end
  end

  spmv_mac #(.MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT), .NBUF(NBUF), .SET_W(SET_W)) u_mac (
    .clk, .rst_n,
    .in_valid(s2_v_q), .in_val(s2_val_q), .in_vec(s2_term_q ? DP_ZERO : vc_rd),
    .in_set(s2_set_q), .in_last(s2_last_q), .in_ready(mac_ready),
    .out_valid(mac_out_v), .out_value(mac_out_val), .out_set(mac_out_set),
    .out_ready(!rf_full), .idle(mac_idle),
    .ev_rule, .ev_stall(ev_acc_stall), .ev_drain
  );

  // ---------------- result FIFO ----------------
  logic [$clog2(RF_DEPTH):0] rf_count;
  sync_fifo #(.WIDTH($bits(result_t)), .DEPTH(RF_DEPTH)) u_rfifo (
    .clk, .rst_n,
    .wr_en(mac_out_v), .wr_data({mac_out_set, mac_out_val}),
    .rd_en(res_pop), .rd_data(res_data),
    .full(rf_full), .empty(rf_empty), .count(rf_count)
  );
  assign res_valid = !rf_empty;

  assign done        = active_q && (rows_left_q == '0) && !s2_v_q && mac_idle && rf_empty;
  assign ev_vec_miss = vfill_done && vfill_en;
  assign ev_res_full = rf_full;
endmodule
