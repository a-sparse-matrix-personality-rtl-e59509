// global_mem_ctrl: the application engine's top-level memory controller.
// All PEs share it for three kinds of work, arbitrated in one pool with
// fixed priority by PE number: result writes (from each PE's result FIFO)
// come first, then cache misses (a vector cache line miss before a matrix
// segment refill of the same PE, this design's order).
//  * Result write: the head of the FIFO (row r, sum) is written to
//    res_base + 8*r in one cycle. Posted, no response.
//  * Miss: the line (2048 words for the vector cache, 1024 for a matrix
//    segment) is read 16 consecutive words per cycle, word k on memory port
//    k mod 16 with tag k. Responses come back in any order; each is put on
//    the fill bus for the requesting cache at row k/16 of lane k mod 16.
//    When every word has come back, the PE is told (mdone or vfill_done).
// Only one miss is serviced at a time, and results wait until it is
// complete; while any memory port signals stall, nothing is issued on any
// port. Both limits are those of the described design. Line base addresses
// must be 128-byte aligned. The port protocol is this design's: a request
// is taken in any cycle its valid is high and no port stalls.
// Response data and result data are wired straight through to the fill
// bus and the write-data ports; the controller only steers and qualifies
// them, so those output bits follow inputs without logic in between.
module global_mem_ctrl
  import spmv_pkg::*;
#(
  parameter int unsigned NPE    = 8,
  parameter int unsigned LINE_W = 2048
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [ADDR_W-1:0]             res_base,
  // PE result FIFOs
  input  logic [NPE-1:0]                res_valid,
  input  result_t [NPE-1:0]             res_data,
  output logic [NPE-1:0]                res_pop,
  // PE miss requests
  input  logic [NPE-1:0]                vreq,
  input  logic [NPE-1:0][ADDR_W-1:0]    vreq_addr,
  input  logic [NPE-1:0][1:0]           vreq_line,
  input  logic [NPE-1:0]                mreq,
  input  logic [NPE-1:0][ADDR_W-1:0]    mreq_addr,
  output logic [NPE-1:0]                mdone,
  // fill bus
  output logic [NPE-1:0]                vfill_en,
  output logic [1:0]                    vfill_line,
  output logic                          vfill_done,
  output logic                          mfill_en,
  output logic [$clog2(NPE)-1:0]        mfill_seg,
  output logic [MEM_PORTS-1:0]          fill_valid,
  output logic [MEM_PORTS-1:0][6:0]     fill_row,
  output logic [MEM_PORTS-1:0][63:0]    fill_data,
  // memory ports
  output logic [MEM_PORTS-1:0]              mem_req_valid,
  output logic [MEM_PORTS-1:0]              mem_req_we,
  output logic [MEM_PORTS-1:0][ADDR_W-1:0]  mem_req_addr,
  output logic [MEM_PORTS-1:0][63:0]        mem_req_wdata,
  output logic [MEM_PORTS-1:0][TAG_W-1:0]   mem_req_tag,
  input  logic [MEM_PORTS-1:0]              mem_stall,
  input  logic [MEM_PORTS-1:0]              mem_resp_valid,
  input  logic [MEM_PORTS-1:0][63:0]        mem_resp_data,
  input  logic [MEM_PORTS-1:0][TAG_W-1:0]   mem_resp_tag,
  // events
  output logic                          ev_mem_stall,
  output logic                          ev_res_write
);
  localparam int unsigned PW = $clog2(NPE);
  localparam int unsigned PB = $clog2(MEM_PORTS);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  state_e             state_q;
  req_kind_e          kind_q;
  logic [PW-1:0]      pe_q;
  logic [ADDR_W-1:0]  base_q;
  logic [1:0]         line_q;
  logic [TAG_W:0]     nwords_q, issued_q, rcvd_q;

  logic          stall, res_f, miss_f, miss_vec;
  logic [PW-1:0] res_pe, miss_pe;
  logic [TAG_W:0] rcv_now;
  logic          last_resp;
  logic [ADDR_W-1:0] waddr;

  assign stall        = |mem_stall;
  assign ev_mem_stall = stall && (state_q == S_ISSUE || (state_q == S_IDLE && res_f));

  always_comb begin
    res_f = 1'b0; res_pe = '0;
    miss_f = 1'b0; miss_pe = '0; miss_vec = 1'b0;
    for (int p = NPE-1; p >= 0; p--) begin
      if (res_valid[p]) begin res_f = 1'b1; res_pe = PW'(p); end
      if (vreq[p] || mreq[p]) begin
        miss_f = 1'b1; miss_pe = PW'(p); miss_vec = vreq[p];
      end
    end
  end

  always_comb begin
    rcv_now = '0;
    for (int p = 0; p < MEM_PORTS; p++) rcv_now = rcv_now + (TAG_W+1)'(mem_resp_valid[p]);
  end
  assign last_resp = (state_q != S_IDLE) && (rcvd_q + rcv_now == nwords_q);

  // Memory requests
  assign waddr = res_base + (ADDR_W'(res_data[res_pe].set) << 3);
  always_comb begin
    mem_req_valid = '0;
    mem_req_we    = '0;
    mem_req_addr  = '0;
    mem_req_wdata = '0;
    mem_req_tag   = '0;
    res_pop       = '0;
    ev_res_write  = 1'b0;
    if (state_q == S_IDLE && res_f && !stall) begin
      mem_req_valid[waddr[PB+2:3]] = 1'b1;
      mem_req_we[waddr[PB+2:3]]    = 1'b1;
      mem_req_addr[waddr[PB+2:3]]  = waddr;
      mem_req_wdata[waddr[PB+2:3]] = res_data[res_pe].value;
      res_pop[res_pe] = 1'b1;
      ev_res_write    = 1'b1;
    end else if (state_q == S_ISSUE && !stall) begin
      for (int p = 0; p < MEM_PORTS; p++) begin
        mem_req_valid[p] = 1'b1;
        mem_req_addr[p]  = base_q + (ADDR_W'(issued_q + (TAG_W+1)'(p)) << 3);
        mem_req_tag[p]   = TAG_W'(issued_q + (TAG_W+1)'(p));
      end
    end
  end

  // Fill bus
  always_comb begin
    for (int p = 0; p < MEM_PORTS; p++) begin
      fill_valid[p] = mem_resp_valid[p] && (state_q != S_IDLE);
      fill_row[p]   = mem_resp_tag[p][TAG_W-1:PB];
      fill_data[p]  = mem_resp_data[p];
    end
    vfill_en   = '0;
    if (state_q != S_IDLE && kind_q == REQ_VEC) vfill_en[pe_q] = 1'b1;
    vfill_line = line_q;
    vfill_done = last_resp && kind_q == REQ_VEC;
    mfill_en   = (state_q != S_IDLE) && kind_q == REQ_MAT;
    mfill_seg  = pe_q;
    mdone      = '0;
    if (last_resp && kind_q == REQ_MAT) mdone[pe_q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      kind_q   <= REQ_NONE;
      pe_q     <= '0;
      base_q   <= '0;
      line_q   <= '0;
      nwords_q <= '0;
      issued_q <= '0;
      rcvd_q   <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (!res_f && miss_f) begin
          state_q  <= S_ISSUE;
          kind_q   <= miss_vec ? REQ_VEC : REQ_MAT;
          pe_q     <= miss_pe;
          base_q   <= miss_vec ? vreq_addr[miss_pe] : mreq_addr[miss_pe];
          line_q   <= vreq_line[miss_pe];
          nwords_q <= miss_vec ? (TAG_W+1)'(LINE_W) : (TAG_W+1)'(SEG_WORDS);
          issued_q <= '0;
          rcvd_q   <= '0;
        end
        S_ISSUE: begin
          rcvd_q <= rcvd_q + rcv_now;
          if (!stall) begin
            issued_q <= issued_q + (TAG_W+1)'(MEM_PORTS);
            if (issued_q + (TAG_W+1)'(MEM_PORTS) == nwords_q) state_q <= S_WAIT;
          end
        end
        S_WAIT: begin
          rcvd_q <= rcvd_q + rcv_now;
          if (last_resp) begin
            state_q <= S_IDLE;
            kind_q  <= REQ_NONE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_no_stray_resp: assert property (@(posedge clk) disable iff (!rst_n)
                                    (|mem_resp_valid) |-> state_q != S_IDLE);
endmodule
