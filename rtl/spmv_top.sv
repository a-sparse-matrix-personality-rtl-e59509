// spmv_top: the complete SpMV coprocessor personality, NAE application
// engines of NPE processing elements each (4 x 8 = 32 PEs by default, the
// configuration evaluated in the description). Engines work independently;
// each has its own 16 memory ports, which on the target machine lead through
// the vendor crossbar to the shared coprocessor memory, and each takes its
// PEs' workloads from the host. The host divides the matrix rows into equal
// sets, one per PE, padding so that no row crosses a PE boundary. `done`
// rises when every engine is done. Ports are flattened arrays indexed by
// engine, then PE or memory port.
module spmv_top
  import spmv_pkg::*;
#(
  parameter int unsigned NAE     = 4,
  parameter int unsigned NPE     = 8,
  parameter int unsigned MUL_LAT = 10,
  parameter int unsigned ADD_LAT = 14,
  parameter int unsigned NBUF    = 4
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        start,
  input  logic [NAE-1:0][NPE-1:0][SET_W-1:0]          row_start,
  input  logic [NAE-1:0][NPE-1:0][ADDR_W-1:0]         mat_base,
  input  logic [NAE-1:0][NPE-1:0][SET_W-1:0]          num_rows,
  input  logic [ADDR_W-1:0]                           vec_base,
  input  logic [ADDR_W-1:0]                           res_base,
  output logic                                        done,
  output logic [NAE-1:0][MEM_PORTS-1:0]               mem_req_valid,
  output logic [NAE-1:0][MEM_PORTS-1:0]               mem_req_we,
  output logic [NAE-1:0][MEM_PORTS-1:0][ADDR_W-1:0]   mem_req_addr,
  output logic [NAE-1:0][MEM_PORTS-1:0][63:0]         mem_req_wdata,
  output logic [NAE-1:0][MEM_PORTS-1:0][TAG_W-1:0]    mem_req_tag,
  input  logic [NAE-1:0][MEM_PORTS-1:0]               mem_stall,
  input  logic [NAE-1:0][MEM_PORTS-1:0]               mem_resp_valid,
  input  logic [NAE-1:0][MEM_PORTS-1:0][63:0]         mem_resp_data,
  input  logic [NAE-1:0][MEM_PORTS-1:0][TAG_W-1:0]    mem_resp_tag,
  output logic [NAE-1:0][NPE-1:0][4:0]                ev_rule,
  output logic [NAE-1:0][NPE-1:0]                     ev_acc_stall,
  output logic [NAE-1:0][NPE-1:0]                     ev_drain,
  output logic [NAE-1:0][NPE-1:0]                     ev_vec_miss,
  output logic [NAE-1:0][NPE-1:0]                     ev_res_full,
  output logic [NAE-1:0][NPE-1:0]                     ev_mat_refill,
  output logic [NAE-1:0]                              ev_mem_stall,
  output logic [NAE-1:0]                              ev_res_write
);
  logic [NAE-1:0] ae_done;

  for (genvar a = 0; a < NAE; a++) begin : g_ae
    spmv_ae #(.NPE(NPE), .MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT), .NBUF(NBUF)) u_ae (
      .clk, .rst_n, .start,
      .row_start(row_start[a]), .mat_base(mat_base[a]), .num_rows(num_rows[a]),
      .vec_base, .res_base, .done(ae_done[a]),
      .mem_req_valid(mem_req_valid[a]), .mem_req_we(mem_req_we[a]),
      .mem_req_addr(mem_req_addr[a]), .mem_req_wdata(mem_req_wdata[a]),
      .mem_req_tag(mem_req_tag[a]), .mem_stall(mem_stall[a]),
      .mem_resp_valid(mem_resp_valid[a]), .mem_resp_data(mem_resp_data[a]),
      .mem_resp_tag(mem_resp_tag[a]),
      .ev_rule(ev_rule[a]), .ev_acc_stall(ev_acc_stall[a]), .ev_drain(ev_drain[a]),
      .ev_vec_miss(ev_vec_miss[a]), .ev_res_full(ev_res_full[a]),
      .ev_mat_refill(ev_mat_refill[a]), .ev_mem_stall(ev_mem_stall[a]),
      .ev_res_write(ev_res_write[a])
    );
  end

  assign done = &ae_done;
endmodule
