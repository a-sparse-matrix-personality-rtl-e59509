// tb_spmv_pkg: testbench helpers for building sparse matrices in the
// accelerator's memory format. A PE's share of the matrix is a stream of
// val-col pairs, each row's non-zeros followed by a terminator pair (value
// 0.0, column 0). The stream is cut into blocks of 42 pairs; each block is
// 64 words: words 0..41 the values, words 42..62 the column numbers (two
// per word, lower pair in the low half), word 63 unused. The last block is
// padded with terminator pairs.
package tb_spmv_pkg;
  localparam int BLK_PAIRS = 42;
  localparam int BLK_WORDS = 64;

  // Pack pairs into block words.
  function automatic void pack_pairs(input logic [63:0] vals[$], input logic [31:0] cols[$],
                                     ref logic [63:0] words[$]);
    int nblk;
    nblk = (vals.size() + BLK_PAIRS - 1) / BLK_PAIRS;
    words.delete();
    for (int b = 0; b < nblk; b++) begin
      logic [63:0] blk [BLK_WORDS];
      foreach (blk[i]) blk[i] = 64'h0;
      for (int i = 0; i < BLK_PAIRS; i++) begin
        int k;
        k = b * BLK_PAIRS + i;
        if (k < vals.size()) begin
          blk[i] = vals[k];
          blk[BLK_PAIRS + i / 2][(i % 2) * 32 +: 32] = cols[k];
        end
      end
      foreach (blk[i]) words.push_back(blk[i]);
    end
  endfunction
endpackage
