// tb_dbf_controller: checks the schedule produced by the sequencer for three
// macroblocks, the first two back to back and the third from idle.
//   - input blocks are requested in raster order of the neighbourhood grid,
//     four rows each (luma 1..24, chroma 1..8);
//   - finished blocks leave in the expected order, four rows each;
//   - edges come in the interleaved order: per block row the left edge of
//     the first two blocks, then alternately the top edge of a block and the
//     left edge of the next, the top edge of the last block at the end;
//   - luma takes 180 cycles and each chroma component 60 when chained,
//     macroblocks start every 300 cycles, and a macroblock from idle takes
//     304 cycles from its first to its last cycle.
module tb_dbf_controller;
  import dbf_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  logic       start = 1'b0;
  always #5 clk = !clk;

  logic       busy, sram_rd, tb_dir, mb_start, mb_done;
  ctrl_t      ctrl;
  logic [1:0] cyc;
  logic [3:0] sram_raddr;

  dbf_controller dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .busy_o(busy), .ctrl_o(ctrl),
    .cyc_o(cyc), .tb_dir_o(tb_dir), .sram_rd_o(sram_rd), .sram_raddr_o(sram_raddr),
    .mb_start_o(mb_start), .mb_done_o(mb_done)
  );

  int checks = 0, failures = 0;

  // expected sequences per component
  int exp_out_y [24] = '{5, 1, 2, 3, 4, 10, 6, 7, 8, 9, 15, 11, 12, 13, 14,
                         20, 16, 17, 18, 19, 21, 22, 23, 24};
  int exp_out_c [8]  = '{3, 1, 2, 6, 4, 5, 7, 8};

  // observed streams, per component of the current macroblock
  int in_seq  [3][$];
  int out_seq [3][$];
  int edge_seq[3][$];    // encoded as dir*100 + y*10 + x
  int in_rows [3], out_rows [3];
  int first_cyc [3], last_cyc [3];
  int cycle = 0;
  int mbs_done = 0;
  int t_mb_start [$];

  function automatic int exp_edge(int n, int k);
    // k-th edge of the component in processing order
    int y = k / (2 * n), q = k % (2 * n);
    if (q == 0) return y * 10 + 0;
    if (q == 1) return y * 10 + 1;
    if (q == 2 * n - 1) return 100 + y * 10 + n - 1;
    if (q % 2 == 0) return 100 + y * 10 + (q - 2) / 2;
    return y * 10 + (q + 1) / 2;
  endfunction

  task automatic check_mb();
    // the last phase of a chained macroblock already loads the next
    // macroblock's first upper luma block
    int carry = -1;
    if (in_seq[0].size() == 25) begin
      carry = in_seq[0].pop_back();
      in_rows[0] -= 4;
    end
    for (int c = 0; c < 3; c++) begin
      int n = (c == 0) ? 4 : 2;
      int nb = (n + 1) * (n + 1) - 1;
      checks++;
      if (in_seq[c].size() != nb || out_seq[c].size() != nb || edge_seq[c].size() != 2 * n * n) begin
        failures++;
        $display("FAIL comp %0d: %0d inputs %0d outputs %0d edges", c,
                 in_seq[c].size(), out_seq[c].size(), edge_seq[c].size());
        continue;
      end
      for (int i = 0; i < nb; i++) begin
        checks += 2;
        if (in_seq[c][i] != i + 1) begin
          failures++; $display("FAIL comp %0d input %0d is block %0d", c, i, in_seq[c][i]);
        end
        if (out_seq[c][i] != ((c == 0) ? exp_out_y[i] : exp_out_c[i])) begin
          failures++; $display("FAIL comp %0d output %0d is block %0d", c, i, out_seq[c][i]);
        end
      end
      for (int k = 0; k < 2 * n * n; k++) begin
        checks++;
        if (edge_seq[c][k] != exp_edge(n, k)) begin
          failures++; $display("FAIL comp %0d edge %0d is %0d expected %0d", c, k,
                               edge_seq[c][k], exp_edge(n, k));
        end
      end
      checks++;
      if (in_rows[c] != 4 * nb || out_rows[c] != 4 * nb) begin
        failures++; $display("FAIL comp %0d row counts %0d %0d", c, in_rows[c], out_rows[c]);
      end
      in_seq[c].delete(); out_seq[c].delete(); edge_seq[c].delete();
      in_rows[c] = 0; out_rows[c] = 0;
    end
    if (carry >= 0) begin
      in_seq[0].push_back(carry);
      in_rows[0] = 4;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (ctrl.in_en) begin
        if (cyc == 2'd0) begin
          in_seq[ctrl.in_comp].push_back(int'(ctrl.in_blk));
          if (ctrl.in_blk == 5'd1) begin
            first_cyc[ctrl.in_comp] = cycle;
            // component durations when chained, start to start
            if (ctrl.in_comp == COMP_CR && mbs_done == 0) begin
              checks += 2;
              if (first_cyc[1] - first_cyc[0] != 180) begin
                failures++; $display("FAIL luma took %0d cycles", first_cyc[1] - first_cyc[0]);
              end
              if (first_cyc[2] - first_cyc[1] != 60) begin
                failures++; $display("FAIL Cb took %0d cycles", first_cyc[2] - first_cyc[1]);
              end
            end
          end
        end
        in_rows[ctrl.in_comp]++;
      end
      if (ctrl.out_en) begin
        if (cyc == 2'd0) out_seq[ctrl.out_comp].push_back(int'(ctrl.out_blk));
        out_rows[ctrl.out_comp]++;
        last_cyc[ctrl.out_comp] = cycle;
      end
      if (ctrl.filt_en) begin
        if (cyc == 2'd0)
          edge_seq[ctrl.edge_comp].push_back(int'(ctrl.filt_horz) * 100 +
                                             int'(ctrl.edge_y) * 10 + int'(ctrl.edge_x));
        checks++;
        if (ctrl.filt_horz && !sram_rd && cyc != 2'd3) begin
          failures++; $display("FAIL no SRAM read ahead during a horizontal edge");
        end
      end
      if (mb_start) t_mb_start.push_back(cycle);
      if (mb_done) begin
        check_mb();
        if (mbs_done == 2) begin
          checks++;
          if (cycle - t_mb_start[2] + 1 != 304) begin
            failures++; $display("FAIL idle macroblock took %0d cycles", cycle - t_mb_start[2] + 1);
          end
        end
        mbs_done++;
      end
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    repeat (20) @(posedge clk);
    start <= 1'b1;          // queued while busy
    @(posedge clk);
    start <= 1'b0;
    wait (mbs_done == 2);
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (4) @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    wait (mbs_done == 3);
    repeat (2) @(posedge clk);
    checks++;
    if (t_mb_start.size() != 3 || t_mb_start[1] - t_mb_start[0] != 300) begin
      failures++;
      $display("FAIL chained macroblocks %0d cycles apart", t_mb_start[1] - t_mb_start[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
