// tb_dbf_transpose_buffer: streams random 4x4 blocks through the transpose
// register array the way the schedule does: in each four-cycle phase slot c
// is read and overwritten in the same cycle. The direction flips between
// most phases and stays the same for some. A model of the array in the
// testbench predicts every word read: the previous block transposed after a
// flip, unchanged after a repeated direction.
module tb_dbf_transpose_buffer;
  import dbf_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic       dir = 1'b0, wr = 1'b0;
  logic [1:0] slot = '0;
  word_t      wdata, rdata;
  always #5 clk = !clk;

  dbf_transpose_buffer dut (.clk(clk), .rst_n(rst_n), .dir_i(dir), .slot_i(slot),
                            .wr_i(wr), .wr_data_i(wdata), .rd_data_o(rdata));

  int checks = 0, failures = 0, n_transposed = 0, n_same = 0;
  int blk [4][4];      // last block written, as [word][element]
  bit blk_dir;

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // first block, row direction
    @(negedge clk);
    dir = 1'b0; wr = 1'b1;
    for (int c = 0; c < 4; c++) begin
      slot = 2'(c);
      for (int i = 0; i < 4; i++) begin blk[c][i] = int'($urandom_range(0, 255)); wdata[8*i +: 8] = 8'(blk[c][i]); end
      @(negedge clk);
    end
    blk_dir = 1'b0;
    for (int ph = 0; ph < 300; ph++) begin
      int nblk [4][4];
      bit same;
      same = ($urandom_range(0, 3) == 0);
      dir = same ? blk_dir : !blk_dir;
      wr  = 1'b1;
      for (int c = 0; c < 4; c++) begin
        slot = 2'(c);
        for (int i = 0; i < 4; i++) begin nblk[c][i] = int'($urandom_range(0, 255)); wdata[8*i +: 8] = 8'(nblk[c][i]); end
        #1;
        for (int i = 0; i < 4; i++) begin
          int exp;
          exp = same ? blk[c][i] : blk[i][c];
          checks++;
          if (int'(rdata[8*i +: 8]) != exp) begin
            failures++;
            if (failures < 10)
              $display("FAIL phase %0d slot %0d elem %0d: got %0d expected %0d (same=%0d)",
                       ph, c, i, rdata[8*i +: 8], exp, same);
          end
        end
        @(negedge clk);
      end
      if (same) n_same++; else n_transposed++;
      blk = nblk;
      blk_dir = dir;
    end
    checks++;
    if (n_same == 0 || n_transposed == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
