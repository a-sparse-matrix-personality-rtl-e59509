// tb_fp_mul: checks the pipelined double multiplier against the simulator's own
// IEEE-754 double arithmetic on random operands (mixed signs and exponents, with
// zero operands), and checks that
// each product leaves the pipe exactly LAT cycles after its operands entered.
// Results that would be subnormal are skipped (the multiplier flushes them).
module tb_fp_mul;
  localparam int LAT = 10;
  localparam int N   = 4000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [63:0] a, b, sum;
  logic [31:0] side, out_side;
  int checks = 0, failures = 0, cyc = 0;
  logic [63:0] exp_q [$];
  int          t_q   [$];

  fp_mul #(.LAT(LAT), .SIDE_W(32)) dut (.clk, .rst_n, .en(1'b1), .in_valid, .a, .b,
    .in_side(side), .out_valid, .prod(sum), .out_side);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic logic [63:0] rnd_dp(input int emin, input int emax);
    logic [63:0] r;
    r = {$urandom, $urandom};
    r[62:52] = 11'(1023 + emin + int'($urandom % (emax - emin + 1)));
    return r;
  endfunction

  initial begin : watchdog
    repeat (N * 4 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    logic [63:0] e;
    int t;
    e = exp_q.pop_front();
    t = t_q.pop_front();
    checks++;
    if (e[62:52] != 0 && sum !== e) begin
      failures++;
      if (failures < 10) $display("MISMATCH got %h exp %h", sum, e);
    end
    checks++;
    if (cyc - t != LAT || out_side != 32'(t)) begin
      failures++;
      $display("LATENCY got %0d", cyc - t);
    end
  end

  initial begin
    a = 0; b = 0; side = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      a = rnd_dp(-40, 40);
      case (i % 4)
        0: b = rnd_dp(-40, 40);
        1: begin b = a; b[63] = ~a[63]; b[20:0] = 21'($urandom); end   // cancellation
        2: begin b = rnd_dp(-3, 3); a = rnd_dp(-3, 3); end
        default: b = 64'(i % 7 == 0 ? 0 : rnd_dp(-80, 80));
      endcase
      in_valid = 1;
      side = 32'(cyc);
      exp_q.push_back($realtobits($bitstoreal(a) * $bitstoreal(b)));
      t_q.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
