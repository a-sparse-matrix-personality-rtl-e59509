// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the full/empty flags and the occupancy count every cycle.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (count != ($bits(count))'(model.size()) || full != (model.size() == D) ||
          empty != (model.size() == 0)) failures++;
      if (!empty) begin
        checks++;
        if (rd_data != model[0]) failures++;
      end
      wr_en   = !full && ($urandom % 100 < (i < 1500 ? 70 : 30));
      rd_en   = !empty && ($urandom % 100 < (i < 1500 ? 30 : 70));
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
