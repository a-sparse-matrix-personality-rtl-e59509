// tb_spmv_workloads: runs the six benchmark matrices of the evaluation on
// the whole personality at its default size (4 engines x 8 PEs, 32 PEs).
// The real matrices are not available, so each is replaced by a random
// square matrix with the same number of rows and the same number of
// non-zeros (divided by SCALE; the default 1 runs the published sizes), with
// row lengths spread around the mean and columns in a band around the
// diagonal plus a few scattered columns. Values and x are small integers,
// so every y[row] is exact and is checked bit for bit. Rows are split
// evenly over the 32 PEs. For each matrix the testbench prints the cycle
// count and the rate at 150 MHz next to the published 32-PE figure (for
// information only: the memory here is a behavioural model with its own
// latency). A run counts a failure if it does not finish, and also if a
// PE's sustained rate is so low that the pipeline must have stalled for
// no reason (below 1% of peak).
module tb_spmv_workloads;
  import spmv_pkg::*;
  import tb_spmv_pkg::*;
  localparam int NAE = 4, NPE = 8, T = NAE * NPE;
  localparam int SCALE = 1;
  localparam int NW = 6;
  localparam longint VEC_BASE = 64'h1000_0000;
  localparam longint RES_BASE = 64'h2000_0000;
  localparam longint MAT_BASE = 64'h4000_0000;

  string wl_name [NW] = '{"dw8192", "t2d_q9", "epb1", "raefsky1", "psmigr_2", "torso2"};
  int    wl_rows [NW] = '{8192, 9801, 14734, 3242, 3140, 115967};
  int    wl_nz   [NW] = '{41746, 87025, 95053, 294276, 540022, 1033473};
  real   wl_gf32 [NW] = '{1.65, 2.48, 2.56, 3.85, 3.94, 1.17};

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [NAE-1:0][NPE-1:0][SET_W-1:0]  row_start, num_rows;
  logic [NAE-1:0][NPE-1:0][ADDR_W-1:0] mat_base;
  logic [NAE-1:0][MEM_PORTS-1:0] mem_req_valid, mem_req_we, mem_stall, mem_resp_valid;
  logic [NAE-1:0][MEM_PORTS-1:0][ADDR_W-1:0] mem_req_addr;
  logic [NAE-1:0][MEM_PORTS-1:0][63:0] mem_req_wdata, mem_resp_data;
  logic [NAE-1:0][MEM_PORTS-1:0][TAG_W-1:0] mem_req_tag, mem_resp_tag;
  logic [NAE-1:0][NPE-1:0][4:0] ev_rule;
  logic [NAE-1:0][NPE-1:0] ev_acc_stall, ev_drain, ev_vec_miss, ev_res_full, ev_mat_refill;
  logic [NAE-1:0] ev_mem_stall, ev_res_write;
  int checks = 0, failures = 0;
  longint n_vec_miss = 0;

  spmv_top dut (
    .clk, .rst_n, .start, .row_start, .mat_base, .num_rows,
    .vec_base(ADDR_W'(VEC_BASE)), .res_base(ADDR_W'(RES_BASE)), .done,
    .mem_req_valid, .mem_req_we, .mem_req_addr, .mem_req_wdata, .mem_req_tag, .mem_stall,
    .mem_resp_valid, .mem_resp_data, .mem_resp_tag,
    .ev_rule, .ev_acc_stall, .ev_drain, .ev_vec_miss, .ev_res_full, .ev_mat_refill,
    .ev_mem_stall, .ev_res_write
  );

  hc1_mem_model #(.NP(NAE * MEM_PORTS), .MIN_LAT(10), .MAX_LAT(60), .STALL_PCT(1)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_we(mem_req_we), .req_addr(mem_req_addr),
    .req_wdata(mem_req_wdata), .req_tag(mem_req_tag), .stall(mem_stall),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data), .resp_tag(mem_resp_tag));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n)
    for (int a = 0; a < NAE; a++)
      for (int p = 0; p < NPE; p++) n_vec_miss += longint'(ev_vec_miss[a][p]);

  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog: not done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real xval(input int c);
    return real'((c * 7) % 17 - 8);
  endfunction

  task automatic run(input int w);
    int m, nz_target, band;
    real y_exp [];
    longint nnz, t0, t1, cycles, miss0;
    m = wl_rows[w] / SCALE;
    nz_target = wl_nz[w] / SCALE;
    band = 2 * (nz_target / m) + 64;
    if (band > m) band = m;
    y_exp = new[m];
    nnz = 0;
    for (int c = 0; c < m; c++) u_mem.wr(VEC_BASE + 8 * longint'(c), $realtobits(xval(c)));
    for (int r = 0; r < m; r++) u_mem.wr(RES_BASE + 8 * longint'(r), 64'hFFF0_DEAD_0000_0000);
    for (int t = 0; t < T; t++) begin
      logic [63:0] vals [$];
      logic [31:0] cols [$];
      logic [63:0] words [$];
      longint base;
      int r0, r1;
      r0 = int'(longint'(t) * m / T);
      r1 = int'(longint'(t + 1) * m / T);
      vals.delete();
      cols.delete();
      for (int r = r0; r < r1; r++) begin
        int len, mean2;
        // row length uniform in [0, 2*mean], so the mean matches nz/rows
        mean2 = int'((2 * longint'(nz_target) * (r + 1)) / m - (2 * longint'(nz_target) * r) / m);
        len = int'($urandom % (mean2 + 1));
        y_exp[r] = 0;
        for (int i = 0; i < len; i++) begin
          int c, v;
          c = ($urandom % 50 == 0) ? int'($urandom % m)
              : (r + int'($urandom % band) - band / 2 + m) % m;
          v = int'($urandom % 16) - 8;
          if (v >= 0) v++;
          vals.push_back($realtobits(real'(v)));
          cols.push_back(32'(c));
          y_exp[r] += real'(v) * xval(c);
          nnz++;
        end
        vals.push_back(64'h0);
        cols.push_back(32'h0);
      end
      pack_pairs(vals, cols, words);
      base = MAT_BASE + longint'(t) * 64'h100_0000;
      foreach (words[i]) u_mem.wr(base + 8 * longint'(i), words[i]);
      row_start[t / NPE][t % NPE] = SET_W'(r0);
      num_rows[t / NPE][t % NPE]  = SET_W'(r1 - r0);
      mat_base[t / NPE][t % NPE]  = ADDR_W'(base);
    end
    miss0 = n_vec_miss;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = $time;
    repeat (2) @(posedge clk);
    wait (done);
    t1 = $time;
    repeat (2) @(posedge clk);
    for (int r = 0; r < m; r++) begin
      logic [63:0] got;
      got = u_mem.rd(RES_BASE + 8 * longint'(r));
      checks++;
      if (got != $realtobits(y_exp[r])) begin
        failures++;
        if (failures < 10) $display("%s y[%0d] = %h expected %f", wl_name[w], r, got, y_exp[r]);
      end
    end
    cycles = (t1 - t0) / 10;
    $display("%-9s %7d rows %8d nz  %8d cycles  %6.3f GFLOP/s (32-PE figure %4.2f)  %0d vector misses",
             wl_name[w], m, nnz, cycles, 2.0 * real'(nnz) / real'(cycles) * 0.15, wl_gf32[w],
             n_vec_miss - miss0);
    checks++;
    if (real'(nnz) / real'(cycles) < 0.01 * T) begin
      failures++;
      $display("  rate below 1%% of peak");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int w = 0; w < NW; w++) run(w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
