// tb_spmv_pe: one processing element wired to a matrix cache and a global
// memory controller (sized for eight PEs, only PE 2 present) and to the
// behavioural memory. Test 1 streams rows whose columns all fall in one
// vector cache line and checks the results and the sustained pair rate
// (at least 0.6 pairs per cycle over the whole run including the cold
// misses and segment refills; peak is one pair per cycle). Test 2 restarts
// the PE on rows with scattered columns, empty rows and long rows (vector
// misses and line replacement) and checks every result again.
module tb_spmv_pe;
  import spmv_pkg::*;
  import tb_spmv_pkg::*;
  localparam int NPE = 8, ID = 2;
  localparam longint VEC_BASE = 64'h1000_0000;
  localparam longint RES_BASE = 64'h2000_0000;
  localparam longint MAT_BASE = 64'h4000_0000;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [SET_W-1:0] row_start, num_rows;
  logic [ADDR_W-1:0] mat_base;
  logic [NPE-1:0] mc_req, mc_gnt, vreq, mreq, mdone, vfill_en, res_valid, res_pop;
  logic [NPE-1:0][3:0] mc_blk;
  logic mc_valid, mc_last, vfill_done, mfill_en;
  logic [2:0] mc_pe, mfill_seg;
  logic [1:0] mc_row, vfill_line;
  logic [1023:0] mc_data;
  logic [NPE-1:0][ADDR_W-1:0] vreq_addr, mreq_addr;
  logic [NPE-1:0][1:0] vreq_line;
  result_t [NPE-1:0] res_data;
  logic [15:0] fill_valid, mem_req_valid, mem_req_we, mem_stall, mem_resp_valid;
  logic [15:0][6:0] fill_row;
  logic [15:0][63:0] fill_data, mem_req_wdata, mem_resp_data;
  logic [15:0][ADDR_W-1:0] mem_req_addr;
  logic [15:0][TAG_W-1:0] mem_req_tag, mem_resp_tag;
  logic [4:0] ev_rule;
  logic ev_acc_stall, ev_drain, ev_vec_miss, ev_res_full, ev_mem_stall, ev_res_write;
  int checks = 0, failures = 0, n_pairs = 0, n_miss = 0;

  spmv_pe #(.NPE(NPE)) dut (
    .clk, .rst_n, .pe_id(3'(ID)), .start, .row_start, .mat_base, .num_rows,
    .vec_base(ADDR_W'(VEC_BASE)), .done,
    .mc_req(mc_req[ID]), .mc_blk(mc_blk[ID]), .mc_gnt(mc_gnt[ID]),
    .mc_valid, .mc_pe, .mc_row, .mc_last, .mc_data,
    .vreq(vreq[ID]), .vreq_addr(vreq_addr[ID]), .vreq_line(vreq_line[ID]),
    .mreq(mreq[ID]), .mreq_addr(mreq_addr[ID]), .mdone(mdone[ID]),
    .vfill_en(vfill_en[ID]), .vfill_line, .fill_valid, .fill_row, .fill_data, .vfill_done,
    .res_valid(res_valid[ID]), .res_data(res_data[ID]), .res_pop(res_pop[ID]),
    .ev_rule, .ev_acc_stall, .ev_drain, .ev_vec_miss, .ev_res_full
  );
  for (genvar p = 0; p < NPE; p++) if (p != ID) begin : g_idle
    assign mc_req[p] = 0; assign mc_blk[p] = 0; assign vreq[p] = 0; assign vreq_addr[p] = 0;
    assign vreq_line[p] = 0; assign mreq[p] = 0; assign mreq_addr[p] = 0;
    assign res_valid[p] = 0; assign res_data[p] = '0;
  end

  matrix_cache #(.NPE(NPE)) u_mc (
    .clk, .rst_n, .rd_req(mc_req), .rd_blk(mc_blk), .rd_gnt(mc_gnt),
    .rd_valid(mc_valid), .rd_pe(mc_pe), .rd_row(mc_row), .rd_last(mc_last), .rd_data(mc_data),
    .fill_en(mfill_en), .fill_seg(mfill_seg), .fill_valid, .fill_row, .fill_data);

  global_mem_ctrl #(.NPE(NPE)) u_gmc (
    .clk, .rst_n, .res_base(ADDR_W'(RES_BASE)), .res_valid, .res_data, .res_pop,
    .vreq, .vreq_addr, .vreq_line, .mreq, .mreq_addr, .mdone,
    .vfill_en, .vfill_line, .vfill_done, .mfill_en, .mfill_seg, .fill_valid, .fill_row, .fill_data,
    .mem_req_valid, .mem_req_we, .mem_req_addr, .mem_req_wdata, .mem_req_tag, .mem_stall,
    .mem_resp_valid, .mem_resp_data, .mem_resp_tag, .ev_mem_stall, .ev_res_write);

  hc1_mem_model #(.NP(16), .MIN_LAT(10), .MAX_LAT(40), .STALL_PCT(0)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_we(mem_req_we), .req_addr(mem_req_addr),
    .req_wdata(mem_req_wdata), .req_tag(mem_req_tag), .stall(mem_stall),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data), .resp_tag(mem_resp_tag));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (dut.s2_v_q && dut.mac_ready) n_pairs++;
    if (ev_vec_miss) n_miss++;
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real xval(input int c);
    return real'((c * 5) % 19 - 9);
  endfunction

  task automatic run(input int nrows, input int r0, input bit scattered, output longint cycles);
    logic [63:0] vals [$];
    logic [31:0] cols [$];
    logic [63:0] words [$];
    real y_exp [$];
    longint t0;
    for (int r = 0; r < nrows; r++) begin
      int len;
      real acc;
      len = !scattered ? 30 : (r % 7 == 3) ? 0 : (r % 11 == 0) ? 100 : 1 + int'($urandom % 10);
      acc = 0;
      for (int i = 0; i < len; i++) begin
        int c, v;
        c = !scattered ? int'($urandom % 2048) : int'($urandom % 40000);
        v = int'($urandom % 9) + 1;
        vals.push_back($realtobits(real'(v)));
        cols.push_back(32'(c));
        acc += real'(v) * xval(c);
      end
      vals.push_back(64'h0);
      cols.push_back(32'h0);
      y_exp.push_back(acc);
    end
    pack_pairs(vals, cols, words);
    foreach (words[i]) u_mem.wr(MAT_BASE + 8 * longint'(i), words[i]);
    for (int i = 0; i < 1024; i++) u_mem.wr(MAT_BASE + 8 * longint'(words.size() + i), 64'h0);
    @(negedge clk);
    row_start = SET_W'(r0); num_rows = SET_W'(nrows); mat_base = ADDR_W'(MAT_BASE);
    start = 1;
    @(negedge clk) start = 0;
    t0 = $time;
    wait (done);
    cycles = ($time - t0) / 10;
    repeat (2) @(posedge clk);
    for (int r = 0; r < nrows; r++) begin
      checks++;
      if (u_mem.rd(RES_BASE + 8 * longint'(r0 + r)) != $realtobits(y_exp[r])) begin
        failures++;
        if (failures < 10) $display("row %0d wrong", r0 + r);
      end
    end
  endtask

  initial begin
    longint cyc;
    for (int c = 0; c < 40000; c++) u_mem.wr(VEC_BASE + 8 * longint'(c), $realtobits(xval(c)));
    row_start = 0; num_rows = 0; mat_base = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(200, 0, 0, cyc);
    checks++;
    $display("test 1: %0d pairs in %0d cycles (%f per cycle)", n_pairs, cyc, real'(n_pairs) / real'(cyc));
    if (real'(n_pairs) / real'(cyc) < 0.6) failures++;
    n_miss = 0;
    run(300, 1000, 1, cyc);
    checks++;
    $display("test 2: %0d cycles, %0d vector misses", cyc, n_miss);
    if (n_miss < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
