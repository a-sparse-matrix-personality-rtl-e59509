// tb_block_shifter: loads random 42-pair blocks row by row (in a shuffled
// row order), shifts them out with random back-pressure and checks every
// value and column number against the block layout: values in words 0..41,
// column numbers two per word in words 42..62. Also checks that a flush
// empties the shifter.
module tb_block_shifter;
  logic clk = 0, rst_n = 0, flush = 0, load_en = 0, load_done = 0, empty, out_valid, out_ready = 0;
  logic [1:0] load_row;
  logic [1023:0] load_data;
  logic [63:0] out_val;
  logic [31:0] out_col;
  int checks = 0, failures = 0;

  block_shifter #(.PAIRS(42), .ROW_BITS(1024), .ROWS(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4095:0] blk;
    load_row = 0; load_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      automatic int order [4] = '{3, 1, 0, 2};
      for (int w = 0; w < 128; w++) blk[w*32 +: 32] = $urandom;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        load_en = 1; load_row = 2'(order[k]); load_data = blk[order[k]*1024 +: 1024];
        load_done = (k == 3);
      end
      @(negedge clk) load_en = 0; load_done = 0;
      for (int i = 0; i < 42; i++) begin
        out_ready = 0;
        while ($urandom % 3 == 0) @(negedge clk);
        out_ready = 1;
        checks++;
        if (!out_valid || out_val != blk[i*64 +: 64] || out_col != blk[2688 + i*32 +: 32]) begin
          failures++;
          if (failures < 5) $display("block %0d pair %0d: %h %h", b, i, out_val, out_col);
        end
        if (b == 20 && i == 10) begin
          out_ready = 0; flush = 1;
          @(negedge clk) flush = 0;
          checks++;
          if (!empty) failures++;
          break;
        end
        @(negedge clk);
      end
      out_ready = 0;
      checks++;
      if (!empty || out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
