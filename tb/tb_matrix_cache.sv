// tb_matrix_cache: fills all eight segments through the fill bus, then lets
// random sets of PEs request random blocks at once. Checks that the lowest
// requesting PE number is granted first, that a granted block arrives as
// four consecutive rows with the right PE, row index, last flag and data,
// and that a new grant follows each four-row burst.
module tb_matrix_cache;
  localparam int NPE = 8;
  logic clk = 0, rst_n = 0;
  logic [NPE-1:0] rd_req = 0, rd_gnt;
  logic [NPE-1:0][3:0] rd_blk = 0;
  logic rd_valid, rd_last;
  logic [2:0] rd_pe;
  logic [1:0] rd_row;
  logic [1023:0] rd_data;
  logic fill_en = 0;
  logic [2:0] fill_seg = 0;
  logic [15:0] fill_valid = 0;
  logic [15:0][6:0] fill_row = 0;
  logic [15:0][63:0] fill_data = 0;
  int checks = 0, failures = 0;

  matrix_cache #(.NPE(NPE), .LANES(16), .SEG_ROWS(64), .BLK_ROWS(4)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [63:0] word(input int seg, input int row, input int lane);
    return {16'(seg), 16'(row), 16'(lane), 16'hA5C3};
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NPE; s++)
      for (int r = 0; r < 64; r++) begin
        @(negedge clk);
        fill_en = 1; fill_seg = 3'(s);
        for (int p = 0; p < 16; p++) begin
          fill_valid[p] = 1; fill_row[p] = 7'(r); fill_data[p] = word(s, r, p);
        end
      end
    @(negedge clk) fill_en = 0; fill_valid = 0;
    for (int round = 0; round < 200; round++) begin
      logic [NPE-1:0] pend;
      logic [NPE-1:0][3:0] blk;
      @(negedge clk);
      pend = NPE'($urandom) | NPE'(1 << ($urandom % NPE));
      for (int p = 0; p < NPE; p++) blk[p] = 4'($urandom);
      rd_req = pend; rd_blk = blk;
      while (pend != 0) begin
        int exp_pe;
        exp_pe = 0;
        while (!pend[exp_pe]) exp_pe++;
        #1 checks++;
        if (rd_gnt != NPE'(1 << exp_pe)) begin
          failures++; $display("grant %b expected PE %0d", rd_gnt, exp_pe);
        end
        @(negedge clk);
        pend[exp_pe] = 0; rd_req = pend;
        for (int k = 0; k < 4; k++) begin
          @(negedge clk);
          checks++;
          if (!rd_valid || rd_pe != 3'(exp_pe) || rd_row != 2'(k) || rd_last != (k == 3)) failures++;
          for (int p = 0; p < 16; p++)
            if (rd_data[p*64 +: 64] != word(exp_pe, int'(blk[exp_pe]) * 4 + k, p)) begin
              failures++; break;
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
