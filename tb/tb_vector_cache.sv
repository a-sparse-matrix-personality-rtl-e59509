// tb_vector_cache: random column lookups against a model of a 4-line
// direct-mapped cache of 2048-double lines. On a predicted miss it checks
// miss_req, the line address and the line index, then fills the line
// through the fill bus in a random row order and random lane subsets, and
// finally checks hits and the data read one cycle after rd_en. Also checks
// that `inval` empties the cache.
module tb_vector_cache;
  logic clk = 0, rst_n = 0, inval = 0, lk_valid = 0, lk_hit, rd_en = 0, miss_req;
  logic [47:0] vec_base = 48'h10_0000, miss_addr;
  logic [31:0] lk_col = 0;
  logic [63:0] rd_data;
  logic [1:0]  miss_line, fill_line = 0;
  logic        fill_en = 0, fill_done = 0;
  logic [15:0] fill_valid = 0;
  logic [15:0][6:0]  fill_row = 0;
  logic [15:0][63:0] fill_data = 0;
  int checks = 0, failures = 0;
  int model_tag [4];
  bit model_v [4];

  vector_cache #(.LINES(4), .LINE_W(2048), .LANES(16), .ADDR_W(48)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [63:0] xval(input logic [31:0] c);
    return {c, ~c};
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input logic [31:0] c);
    logic [31:0] base = {c[31:11], 11'h0};
    bit done_lane [128][16];
    int left = 128 * 16;
    foreach (done_lane[r, p]) done_lane[r][p] = 0;
    while (left > 0) begin
      @(negedge clk);
      fill_en = 1; fill_line = c[12:11];
      for (int p = 0; p < 16; p++) begin
        int r = int'($urandom % 128);
        fill_valid[p] = !done_lane[r][p] && ($urandom % 4 != 0);
        fill_row[p] = 7'(r);
        fill_data[p] = xval(base + 32'(r * 16 + p));
        if (fill_valid[p]) begin done_lane[r][p] = 1; left--; end
      end
      if (left < 200) begin   // sweep the remainder in order
        @(negedge clk);
        fill_valid = '0;
        for (int r = 0; r < 128; r++)
          for (int p = 0; p < 16; p++)
            if (!done_lane[r][p]) begin
              @(negedge clk);
              fill_valid = '0; fill_valid[p] = 1; fill_row[p] = 7'(r);
              fill_data[p] = xval(base + 32'(r * 16 + p));
              done_lane[r][p] = 1; left--;
            end
      end
    end
    fill_done = 1;
    @(negedge clk);
    fill_en = 0; fill_done = 0; fill_valid = '0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic [31:0] c;
      bit exp_hit;
      if (i == 150) begin
        @(negedge clk) inval = 1;
        @(negedge clk) inval = 0;
        foreach (model_v[l]) model_v[l] = 0;
      end
      c = (i % 3 == 0) ? $urandom % 32'h20_0000 : $urandom % 32'h4000;
      @(negedge clk);
      lk_valid = 1; lk_col = c;
      exp_hit = model_v[c[12:11]] && model_tag[c[12:11]] == int'(c[31:13]);
      #1 checks++;
      if (lk_hit != exp_hit || miss_req != !exp_hit) begin
        failures++; $display("lookup %h: hit %0d exp %0d", c, lk_hit, exp_hit);
      end
      if (!exp_hit) begin
        checks++;
        if (miss_addr != vec_base + 48'({c[31:11], 11'h0}) * 8 || miss_line != c[12:11]) failures++;
        fill(c);
        model_v[c[12:11]] = 1; model_tag[c[12:11]] = int'(c[31:13]);
        #1 checks++;
        if (!lk_hit) failures++;
      end
      rd_en = 1;
      @(negedge clk);
      rd_en = 0; lk_valid = 0;
      checks++;
      if (rd_data != xval(c)) begin failures++; $display("data %h: %h", c, rd_data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
