// tb_spmv_top: end-to-end test of the whole personality at its default size
// (4 engines x 8 PEs). It builds a random sparse matrix with integer values
// (so every dot product is exact), banded columns with scattered far
// columns (vector cache misses and line evictions), empty rows, very short
// rows (result traffic) and long rows, splits the rows evenly over the 32
// PEs, stores matrix and x in the behavioural memory, starts the engines and
// waits for done. It then checks every y[row] in memory against the
// reference, reports the cycle count and the achieved rate at 150 MHz, and
// checks that each mechanism occurred at least once: the five scheduling
// rules, accumulator input stalls, drains of lone buffered sums, vector
// cache misses, matrix segment refills, memory port stalls, result writes
// and a full result FIFO.
module tb_spmv_top;
  import spmv_pkg::*;
  import tb_spmv_pkg::*;
  localparam int NAE = 4, NPE = 8, T = NAE * NPE;
  localparam int RPP  = 60;              // rows per PE
  localparam int M    = T * RPP;
  localparam int NCOL = 16384;
  localparam longint VEC_BASE = 64'h1000_0000;
  localparam longint RES_BASE = 64'h2000_0000;
  localparam longint MAT_BASE = 64'h4000_0000;

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
  longint cnt [12];
  string  cnt_name [12] = '{"rule1", "rule2", "rule3", "rule4", "rule5", "acc_stall", "drain",
                            "vec_miss", "mat_refill", "mem_stall", "res_write", "res_fifo_full"};

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

  always @(posedge clk) if (rst_n) begin
    for (int a = 0; a < NAE; a++) begin
      for (int p = 0; p < NPE; p++) begin
        for (int r = 0; r < 5; r++) cnt[r] += longint'(ev_rule[a][p][r]);
        cnt[5] += longint'(ev_acc_stall[a][p]);
        cnt[6] += longint'(ev_drain[a][p]);
        cnt[7] += longint'(ev_vec_miss[a][p]);
        cnt[8] += longint'(ev_mat_refill[a][p]);
        cnt[11] += longint'(ev_res_full[a][p]);
      end
      cnt[9]  += longint'(ev_mem_stall[a]);
      cnt[10] += longint'(ev_res_write[a]);
    end
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: not done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real xval(input int c);
    return real'((c * 7) % 17 - 8);
  endfunction

  initial begin
    real    y_exp [M];
    longint nnz = 0, t0, t1;
    foreach (cnt[i]) cnt[i] = 0;
    for (int c = 0; c < NCOL; c++) u_mem.wr(VEC_BASE + 8 * longint'(c), $realtobits(xval(c)));
    for (int r = 0; r < M; r++) u_mem.wr(RES_BASE + 8 * longint'(r), 64'hFFF0_DEAD_0000_0000);
    for (int t = 0; t < T; t++) begin
      logic [63:0] vals [$];
      logic [31:0] cols [$];
      logic [63:0] words [$];
      longint base;
      vals.delete();
      cols.delete();
      for (int r = t * RPP; r < (t + 1) * RPP; r++) begin
        int len, centre;
        int k;
        k = r % RPP;
        len = (k % 13 == 5) ? 0 : (k % 29 == 7) ? 60 + int'($urandom % 60)
            : (k >= 20 && k < 35) ? int'($urandom % 2) : 1 + int'($urandom % 14);
        centre = int'(longint'(r) * NCOL / M);
        y_exp[r] = 0;
        for (int i = 0; i < len; i++) begin
          int c, v;
          c = ($urandom % 10 == 0) ? int'($urandom % NCOL)
              : (centre + int'($urandom % 600) - 300 + NCOL) % NCOL;
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
      base = MAT_BASE + longint'(t) * 64'h10_0000;
      foreach (words[i]) u_mem.wr(base + 8 * longint'(i), words[i]);
      row_start[t / NPE][t % NPE] = SET_W'(t * RPP);
      num_rows[t / NPE][t % NPE]  = SET_W'(RPP);
      mat_base[t / NPE][t % NPE]  = ADDR_W'(base);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = $time;
    wait (done);
    t1 = $time;
    repeat (2) @(posedge clk);
    for (int r = 0; r < M; r++) begin
      logic [63:0] got;
      got = u_mem.rd(RES_BASE + 8 * longint'(r));
      checks++;
      if (got != $realtobits(y_exp[r])) begin
        failures++;
        if (failures < 10) $display("y[%0d] = %h expected %f", r, got, y_exp[r]);
      end
    end
    begin
      longint cycles;
      cycles = (t1 - t0) / 10;
      $display("%0d rows, %0d non-zeros, %0d cycles, %f GFLOP/s at 150 MHz",
               M, nnz, cycles, 2.0 * real'(nnz) / real'(cycles) * 0.15);
    end
    foreach (cnt[i]) begin
      checks++;
      $display("%-14s %0d", cnt_name[i], cnt[i]);
      if (cnt[i] == 0) begin failures++; $display("  never happened"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
