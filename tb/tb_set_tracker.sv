// tb_set_tracker: drives random increment, combine and retire events for a
// handful of set IDs (including IDs that alias modulo DEPTH in later
// rounds) and compares numActive on both read ports with a reference count.
module tb_set_tracker;
  localparam int DEPTH = 8, CW = 6;
  logic clk = 0, rst_n = 0;
  logic inc_en, comb_en, ret_en;
  logic [31:0] inc_set, comb_set, ret_set, rd_set_a, rd_set_b;
  logic [CW-1:0] num_active_a, num_active_b;
  int checks = 0, failures = 0;
  int ref_cnt [int];

  logic [1:0][31:0] rd_set;
  logic [1:0][CW-1:0] num_active;
  assign rd_set = {rd_set_b, rd_set_a};
  assign {num_active_b, num_active_a} = num_active;
  set_tracker #(.DEPTH(DEPTH), .CNT_W(CW), .SET_W(32), .NRD(2)) dut (
    .clk, .rst_n, .inc_en, .inc_set, .comb_en, .comb_set, .ret_en, .ret_set, .rd_set, .num_active);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {inc_en, comb_en, ret_en} = 0;
    {inc_set, comb_set, ret_set, rd_set_a, rd_set_b} = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // sets round*4 .. round*4+3 live in this round; they alias earlier ones
      for (int s = round * 4; s < round * 4 + 4; s++) ref_cnt[s] = 0;
      for (int i = 0; i < 200; i++) begin
        int s1, s2, s3;
        @(negedge clk);
        s1 = round * 4 + int'($urandom % 4);
        s2 = round * 4 + int'($urandom % 4);
        s3 = round * 4 + int'($urandom % 4);
        inc_en  = ($urandom % 2) && ref_cnt[s1] < 20;
        inc_set = 32'(s1);
        comb_en = ($urandom % 2) && ref_cnt[s2] >= 2 && !(inc_en && s1 == s2);
        comb_set = 32'(s2);
        ret_en  = 0;
        ret_set = 32'(s3);
        rd_set_a = 32'(round * 4 + int'($urandom % 4));
        rd_set_b = 32'(round * 4 + int'($urandom % 4));
        #1;
        checks += 2;
        if (num_active_a != CW'(ref_cnt[int'(rd_set_a)])) failures++;
        if (num_active_b != CW'(ref_cnt[int'(rd_set_b)])) failures++;
        @(posedge clk);
        if (inc_en)  ref_cnt[s1]++;
        if (comb_en) ref_cnt[s2]--;
      end
      // retire every set of the round: combine down to one, then retire
      for (int s = round * 4; s < round * 4 + 4; s++) begin
        while (ref_cnt[s] > 1) begin
          @(negedge clk);
          {inc_en, ret_en} = 0; comb_en = 1; comb_set = 32'(s);
          @(posedge clk); ref_cnt[s]--;
        end
        if (ref_cnt[s] == 1) begin
          @(negedge clk);
          {inc_en, comb_en} = 0; ret_en = 1; ret_set = 32'(s); rd_set_a = 32'(s);
          #1 checks++;
          if (num_active_a != 1) failures++;
          @(posedge clk); ref_cnt[s]--;
        end
        @(negedge clk);
        {inc_en, comb_en, ret_en} = 0; rd_set_a = 32'(s);
        #1 checks++;
        if (num_active_a != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
