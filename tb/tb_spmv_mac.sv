// tb_spmv_mac: feeds rows of (matrix value, vector value) pairs, each row
// closed by a terminator pair with value 0 and the end-of-row flag, and
// checks one result per row with the exact dot product (small integers,
// so the order of addition does not matter). Phase 1 uses long rows at full
// rate and checks that the MAC accepts a pair in at least 95% of cycles,
// the one-pair-per-cycle rate behind 2 flops per cycle per PE. Phase 2 uses
// short and empty rows with output back-pressure.
module tb_spmv_mac;
  localparam int NROWS = 300;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_last, in_ready, out_valid, out_ready, idle;
  logic [63:0] in_val, in_vec, out_value;
  logic [31:0] in_set, out_set;
  logic [4:0] ev_rule;
  logic ev_stall, ev_drain;
  int checks = 0, failures = 0;
  real exp_sum [NROWS];
  int  got [NROWS];
  int  len [NROWS];

  spmv_mac #(.MUL_LAT(10), .ADD_LAT(14), .NBUF(4), .PF_DEPTH(32), .SET_W(32)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    got[out_set]++;
    if ($bitstoreal(out_value) != exp_sum[out_set]) begin
      failures++;
      $display("row %0d got %f exp %f", out_set, $bitstoreal(out_value), exp_sum[out_set]);
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: MAC did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int r, input real a, input real x, input bit last);
    @(negedge clk);
    in_valid = 1; in_set = 32'(r); in_last = last;
    in_val = $realtobits(a); in_vec = $realtobits(x);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
  endtask

  initial begin
    longint t0, t1;
    int n1;
    in_valid = 0; in_last = 0; in_val = 0; in_vec = 0; in_set = 0; out_ready = 1;
    for (int r = 0; r < NROWS; r++) begin
      len[r] = r < 20 ? 40 + int'($urandom % 40) : int'($urandom % 8);
      exp_sum[r] = 0; got[r] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = $time; n1 = 0;
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < len[r]; i++) begin
        automatic real a = real'(int'($urandom % 41) - 20), x = real'(int'($urandom % 41) - 20);
        exp_sum[r] += a * x;
        send(r, a, x, 0); n1++;
      end
      send(r, 0.0, 0.0, 1); n1++;
    end
    t1 = $time;
    checks++;
    if (real'(n1) < 0.95 * real'(t1 - t0) / 10.0) begin
      failures++;
      $display("rate %0d pairs in %0d cycles", n1, (t1 - t0) / 10);
    end
    fork
      for (int r = 20; r < NROWS; r++) begin
        for (int i = 0; i < len[r]; i++) begin
          automatic real a = real'(int'($urandom % 41) - 20), x = real'(int'($urandom % 41) - 20);
          exp_sum[r] += a * x;
          send(r, a, x, 0);
        end
        send(r, 0.0, 0.0, 1);
      end
      repeat (1500) @(negedge clk) out_ready = ($urandom % 3 != 0);
    join
    @(negedge clk) in_valid = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    wait (idle);
    repeat (3) @(posedge clk);
    for (int r = 0; r < NROWS; r++) begin
      checks++;
      if (got[r] != 1) begin failures++; $display("row %0d: %0d results", r, got[r]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
