// spmv_ae: one application engine (one FPGA) of the SpMV personality: NPE
// processing elements, the shared matrix cache they read their blocks from,
// and the global memory controller that connects the caches and the result
// FIFOs to the engine's 16 memory ports. On `start` each PE takes its
// workload (first row, matrix address, number of rows); vec_base (x) and
// res_base (y) are common. `done` is high once every PE has finished and all
// results are written. Per-PE event pulses are brought out for performance
// counting. The composition follows the description's top-level design; the
// port protocols are this design's.
module spmv_ae
  import spmv_pkg::*;
#(
  parameter int unsigned NPE     = 8,
  parameter int unsigned MUL_LAT = 10,
  parameter int unsigned ADD_LAT = 14,
  parameter int unsigned NBUF    = 4
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  logic [NPE-1:0][SET_W-1:0]          row_start,
  input  logic [NPE-1:0][ADDR_W-1:0]         mat_base,
  input  logic [NPE-1:0][SET_W-1:0]          num_rows,
  input  logic [ADDR_W-1:0]                  vec_base,
  input  logic [ADDR_W-1:0]                  res_base,
  output logic                               done,
  output logic [MEM_PORTS-1:0]               mem_req_valid,
  output logic [MEM_PORTS-1:0]               mem_req_we,
  output logic [MEM_PORTS-1:0][ADDR_W-1:0]   mem_req_addr,
  output logic [MEM_PORTS-1:0][63:0]         mem_req_wdata,
  output logic [MEM_PORTS-1:0][TAG_W-1:0]    mem_req_tag,
  input  logic [MEM_PORTS-1:0]               mem_stall,
  input  logic [MEM_PORTS-1:0]               mem_resp_valid,
  input  logic [MEM_PORTS-1:0][63:0]         mem_resp_data,
  input  logic [MEM_PORTS-1:0][TAG_W-1:0]    mem_resp_tag,
  output logic [NPE-1:0][4:0]                ev_rule,
  output logic [NPE-1:0]                     ev_acc_stall,
  output logic [NPE-1:0]                     ev_drain,
  output logic [NPE-1:0]                     ev_vec_miss,
  output logic [NPE-1:0]                     ev_res_full,
  output logic [NPE-1:0]                     ev_mat_refill,
  output logic                               ev_mem_stall,
  output logic                               ev_res_write
);
  localparam int unsigned PW = $clog2(NPE);

  logic [NPE-1:0]             mc_req, mc_gnt;
  logic [NPE-1:0][3:0]        mc_blk;
  logic                       mc_valid, mc_last;
  logic [PW-1:0]              mc_pe;
  logic [1:0]                 mc_row;
  logic [ROW_BITS-1:0]        mc_data;

  logic [NPE-1:0]             vreq, mreq, mdone, vfill_en, res_valid, res_pop, pe_done;
  logic [NPE-1:0][ADDR_W-1:0] vreq_addr, mreq_addr;
  logic [NPE-1:0][1:0]        vreq_line;
  result_t [NPE-1:0]          res_data;
  logic [1:0]                 vfill_line;
  logic                       vfill_done, mfill_en;
  logic [PW-1:0]              mfill_seg;
  logic [MEM_PORTS-1:0]       fill_valid;
  logic [MEM_PORTS-1:0][6:0]  fill_row;
  logic [MEM_PORTS-1:0][63:0] fill_data;

  matrix_cache #(.NPE(NPE), .LANES(MEM_PORTS), .SEG_ROWS(SEG_BLOCKS*BLK_ROWS), .BLK_ROWS(BLK_ROWS)) u_mcache (
    .clk, .rst_n,
    .rd_req(mc_req), .rd_blk(mc_blk), .rd_gnt(mc_gnt),
    .rd_valid(mc_valid), .rd_pe(mc_pe), .rd_row(mc_row), .rd_last(mc_last), .rd_data(mc_data),
    .fill_en(mfill_en), .fill_seg(mfill_seg), .fill_valid, .fill_row, .fill_data
  );

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    spmv_pe #(.NPE(NPE), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT), .NBUF(NBUF)) u_pe (
      .clk, .rst_n, .pe_id(PW'(p)),
      .start, .row_start(row_start[p]), .mat_base(mat_base[p]), .num_rows(num_rows[p]),
      .vec_base, .done(pe_done[p]),
      .mc_req(mc_req[p]), .mc_blk(mc_blk[p]), .mc_gnt(mc_gnt[p]),
      .mc_valid, .mc_pe, .mc_row, .mc_last, .mc_data,
      .vreq(vreq[p]), .vreq_addr(vreq_addr[p]), .vreq_line(vreq_line[p]),
      .mreq(mreq[p]), .mreq_addr(mreq_addr[p]), .mdone(mdone[p]),
      .vfill_en(vfill_en[p]), .vfill_line, .fill_valid, .fill_row, .fill_data, .vfill_done,
      .res_valid(res_valid[p]), .res_data(res_data[p]), .res_pop(res_pop[p]),
      .ev_rule(ev_rule[p]), .ev_acc_stall(ev_acc_stall[p]), .ev_drain(ev_drain[p]),
      .ev_vec_miss(ev_vec_miss[p]), .ev_res_full(ev_res_full[p])
    );
  end

  global_mem_ctrl #(.NPE(NPE), .LINE_W(VC_LINE_W)) u_gmc (
    .clk, .rst_n, .res_base,
    .res_valid, .res_data, .res_pop,
    .vreq, .vreq_addr, .vreq_line, .mreq, .mreq_addr, .mdone,
    .vfill_en, .vfill_line, .vfill_done, .mfill_en, .mfill_seg,
    .fill_valid, .fill_row, .fill_data,
    .mem_req_valid, .mem_req_we, .mem_req_addr, .mem_req_wdata, .mem_req_tag,
    .mem_stall, .mem_resp_valid, .mem_resp_data, .mem_resp_tag,
    .ev_mem_stall, .ev_res_write
  );

  assign ev_mat_refill = mdone;
  assign done = &pe_done;
endmodule
