// tb_global_mem_ctrl: the global memory controller against the behavioural
// memory model (random latency, out-of-order responses, random port
// stalls), with eight stub PEs that post results and raise random vector
// and matrix misses. Checks: every word of a serviced line appears exactly
// once on the fill bus with the memory's data, for the right PE, cache and
// line; the done pulse comes once, after the last word; each result lands
// at res_base + 8*row; a miss is only started when no result is waiting, and
// always for the lowest-numbered requesting PE (vector before matrix); the
// number of cycles in which nothing was issued because a port stalled is
// counted and must be non-zero.
module tb_global_mem_ctrl;
  import spmv_pkg::*;
  localparam int NPE = 8;
  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] res_base = 48'h80_0000;
  logic [NPE-1:0] res_valid, res_pop, vreq, mreq, mdone, vfill_en;
  result_t [NPE-1:0] res_data;
  logic [NPE-1:0][ADDR_W-1:0] vreq_addr, mreq_addr;
  logic [NPE-1:0][1:0] vreq_line;
  logic [1:0] vfill_line;
  logic vfill_done, mfill_en;
  logic [2:0] mfill_seg;
  logic [15:0] fill_valid;
  logic [15:0][6:0] fill_row;
  logic [15:0][63:0] fill_data;
  logic [15:0] mem_req_valid, mem_req_we, mem_stall, mem_resp_valid;
  logic [15:0][ADDR_W-1:0] mem_req_addr;
  logic [15:0][63:0] mem_req_wdata, mem_resp_data;
  logic [15:0][TAG_W-1:0] mem_req_tag, mem_resp_tag;
  logic ev_mem_stall, ev_res_write;
  int checks = 0, failures = 0, n_stall = 0, n_vec = 0, n_mat = 0, n_res = 0;

  global_mem_ctrl #(.NPE(NPE), .LINE_W(2048)) dut (.*);
  hc1_mem_model #(.NP(16), .MIN_LAT(4), .MAX_LAT(30), .STALL_PCT(4)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_we(mem_req_we), .req_addr(mem_req_addr),
    .req_wdata(mem_req_wdata), .req_tag(mem_req_tag), .stall(mem_stall),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data), .resp_tag(mem_resp_tag));
  always #5 clk = ~clk;

  // stub PE state
  result_t rq [NPE][$];
  always_comb for (int p = 0; p < NPE; p++) begin
    res_valid[p] = rq[p].size() > 0;
    res_data[p]  = res_valid[p] ? rq[p][0] : '0;
  end
  logic [NPE-1:0] vpend, mpend;
  assign vreq = vpend;
  assign mreq = mpend;
  int seen [128][16];
  int wr_expect [longint];

  always @(posedge clk) if (rst_n) begin
    if (ev_mem_stall) n_stall++;
    for (int p = 0; p < NPE; p++) if (res_pop[p]) begin
      wr_expect[longint'(res_base) + 8 * longint'(rq[p][0].set)] = 0;
      void'(rq[p].pop_front());
      n_res++;
    end
    // a miss starts
    if (dut.state_q == dut.S_IDLE && !(|res_valid) && (|(vreq | mreq))) begin
      int lo;
      lo = 0;
      while (!(vreq[lo] || mreq[lo])) lo++;
      checks++;
      if (dut.miss_pe != 3'(lo) || dut.miss_vec != vreq[lo]) begin failures++; if (failures < 5) $display("arb"); end
      foreach (seen[r, l]) seen[r][l] = 0;
    end
    for (int l = 0; l < 16; l++) if (fill_valid[l]) begin
      longint base, a;
      int pe;
      base = longint'(dut.base_q);
      a = base + 8 * longint'(int'(fill_row[l]) * 16 + l);
      seen[fill_row[l]][l]++;
      checks++;
      if (fill_data[l] != u_mem.rd(a)) begin failures++; if (failures < 5) $display("data %h %h", fill_data[l], u_mem.rd(a)); end
      pe = int'(dut.pe_q);
      if (dut.kind_q == REQ_VEC && (vfill_en != NPE'(1 << pe) || vfill_line != vreq_line[pe])) failures++;
      if (dut.kind_q == REQ_MAT && (!mfill_en || mfill_seg != 3'(pe))) failures++;
    end
    if (vfill_done || (|mdone)) begin
      int nrows;
      nrows = vfill_done ? 128 : 64;
      checks++;
      for (int r = 0; r < 128; r++) for (int l = 0; l < 16; l++)
        if (seen[r][l] != (r < nrows ? 1 : 0)) begin failures++; r = 128; break; end
      if (vfill_done) begin vpend[dut.pe_q] <= 0; n_vec++; end
      else begin mpend[dut.pe_q] <= 0; n_mat++; end
    end
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vpend = 0; mpend = 0; vreq_addr = 0; mreq_addr = 0; vreq_line = 0;
    for (longint w = 0; w < 65536; w++) u_mem.wr(w * 8, {32'(w), 32'hC0DE_0000 ^ 32'(w)});
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 30; round++) begin
      @(negedge clk);
      for (int p = 0; p < NPE; p++) begin
        if ($urandom % 3 == 0) begin
          vpend[p] = 1;
          vreq_addr[p] = 48'(($urandom % 24) * 2048 * 8);
          vreq_line[p] = 2'($urandom);
        end
        if ($urandom % 3 == 0) begin
          mpend[p] = 1;
          mreq_addr[p] = 48'(($urandom % 48) * 1024 * 8);
        end
        repeat ($urandom % 3) begin
          result_t r;
          r.set = $urandom % 4096; r.value = {$urandom, $urandom};
          rq[p].push_back(r);
          wr_expect[longint'(res_base) + 8 * longint'(r.set)] = 0;
        end
      end
      while (vpend != 0 || mpend != 0 || res_valid != 0) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (n_stall == 0 || n_vec == 0 || n_mat == 0 || n_res == 0) failures++;
    $display("vec %0d mat %0d res %0d stall cycles %0d", n_vec, n_mat, n_res, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result writes: check address and data as they are issued
  always @(posedge clk) if (rst_n && ev_res_write) begin
    for (int p = 0; p < 16; p++) if (mem_req_valid[p]) begin
      checks++;
      if (!mem_req_we[p] || mem_req_addr[p][6:3] != 4'(p)) failures++;
    end
    for (int p = 0; p < NPE; p++) if (res_pop[p]) begin
      logic [ADDR_W-1:0] a;
      a = res_base + ADDR_W'(rq[p][0].set) * 8;
      checks++;
      if (!mem_req_valid[a[6:3]] || mem_req_addr[a[6:3]] != a ||
          mem_req_wdata[a[6:3]] != rq[p][0].value) failures++;
    end
  end
endmodule
