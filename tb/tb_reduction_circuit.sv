// tb_reduction_circuit: streams accumulation sets of random length through
// the reduction circuit and checks that every set comes out exactly once
// with the right sum. Values are small integers, so the sum is exact in any
// order of addition. Phase 1 sends long sets back to back and checks the
// input rate (at least 95% of cycles accept a value); phase 2 sends short
// sets, single-value sets, gaps in the input and back-pressure on the
// output. Each scheduling rule, the input stall, the recirculation and the
// drain path must be seen at least once.
module tb_reduction_circuit;
  localparam int ADD_LAT = 14;
  localparam int NSETS   = 600;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_last, in_ready, out_valid, out_ready, idle;
  logic [63:0] in_value, out_value;
  logic [31:0] in_set, out_set;
  logic [4:0] ev_rule;
  logic ev_recirc, ev_stall, ev_drain;
  int checks = 0, failures = 0;
  int n_rule [5];
  int n_recirc = 0, n_stall = 0, n_drain = 0;
  real exp_sum [NSETS];
  int  got     [NSETS];
  int  set_len [NSETS];

  reduction_circuit #(.ADD_LAT(ADD_LAT), .NBUF(4), .SET_W(32)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < 5; r++) if (ev_rule[r]) n_rule[r]++;
    if (ev_recirc) n_recirc++;
    if (ev_stall)  n_stall++;
    if (ev_drain)  n_drain++;
    if (out_valid) begin
      checks++;
      if (out_set >= NSETS) failures++;
      else begin
        got[out_set]++;
        if ($bitstoreal(out_value) != exp_sum[out_set]) begin
          failures++;
          $display("set %0d: got %f exp %f", out_set, $bitstoreal(out_value), exp_sum[out_set]);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int s, input int idx, input real v, input bit gaps);
    @(negedge clk);
    while (gaps && $urandom % 4 == 0) begin
      in_valid = 0;
      @(negedge clk);
    end
    in_valid = 1; in_set = 32'(s); in_value = $realtobits(v);
    in_last  = (idx == set_len[s] - 1);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
  endtask

  initial begin
    int cyc0, cyc1, sent1;
    in_valid = 0; in_last = 0; in_value = 0; in_set = 0; out_ready = 1;
    for (int s = 0; s < NSETS; s++) begin
      set_len[s] = (s < 40) ? 30 + int'($urandom % 30)
                 : (s % 5 == 0) ? 1 : 1 + int'($urandom % 12);
      exp_sum[s] = 0; got[s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: long sets, no gaps, rate check
    cyc0 = $time; sent1 = 0;
    for (int s = 0; s < 40; s++)
      for (int i = 0; i < set_len[s]; i++) begin
        automatic real v = real'(int'($urandom % 2001) - 1000);
        exp_sum[s] += v;
        send(s, i, v, 0);
        sent1++;
      end
    cyc1 = $time;
    checks++;
    if (real'(sent1) < 0.95 * real'(cyc1 - cyc0) / 10.0) begin
      failures++;
      $display("rate: %0d values in %0d cycles", sent1, (cyc1 - cyc0) / 10);
    end
    // phase 2: short sets, gaps and back-pressure
    fork
      begin
        for (int s = 40; s < NSETS; s++)
          for (int i = 0; i < set_len[s]; i++) begin
            automatic real v = real'(int'($urandom % 2001) - 1000);
            exp_sum[s] += v;
            send(s, i, v, s > 300);
          end
        @(negedge clk) in_valid = 0;
      end
      begin
        repeat (3000) begin
          @(negedge clk) out_ready = ($urandom % 8 != 0);
        end
        out_ready = 1;
      end
    join
    @(negedge clk) in_valid = 0;
    wait (idle);
    repeat (5) @(posedge clk);
    for (int s = 0; s < NSETS; s++) begin
      checks++;
      if (got[s] != 1) begin
        failures++;
        $display("set %0d produced %0d results", s, got[s]);
      end
    end
    for (int r = 0; r < 5; r++) begin
      checks++;
      if (n_rule[r] == 0) begin failures++; $display("rule %0d never fired", r + 1); end
    end
    checks += 3;
    if (n_recirc == 0) begin failures++; $display("no recirculation"); end
    if (n_stall == 0)  begin failures++; $display("no input stall"); end
    if (n_drain == 0)  begin failures++; $display("no drain"); end
    $display("rules %0d %0d %0d %0d %0d recirc %0d stall %0d drain %0d",
             n_rule[0], n_rule[1], n_rule[2], n_rule[3], n_rule[4], n_recirc, n_stall, n_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
