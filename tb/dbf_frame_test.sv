// dbf_frame_test: end-to-end test body for the deblocking filter core,
// shared by the testbenches that run it at different picture sizes.
//
// A picture of MBW x MBH macroblocks (luma plus two 4:2:0 chroma planes) is
// filled with a blocky pattern, and random per-line filter parameters are
// drawn for every edge (bS = 0 at picture borders, bS = 4 only on macroblock
// edges). A behavioural frame memory serves the core's block requests and
// stores the rows it returns; the macroblocks are processed in raster order.
// A reference model filters a copy of the picture in the standard order
// (per macroblock: all vertical edges left to right, then all horizontal
// edges top to bottom) and the two pictures must match pixel for pixel.
// Macroblocks are issued back to back and must follow each other every 300
// cycles; with IDLE_LAST the last one starts from idle and must finish in
// 304. With MAX_CYCLES > 0 the whole picture, first cycle of the first
// macroblock to last cycle of the last, must fit in that many cycles.
// The filter paths and the schedule mechanisms are counted and each must
// occur. The core itself runs at its default configuration. The watchdog
// belongs to the instantiating testbench.
module dbf_frame_test #(
  parameter int MBW        = 3,
  parameter int MBH        = 2,
  parameter bit IDLE_LAST  = 1'b1,
  parameter int MAX_CYCLES = 0
);
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int NMB = MBW * MBH;
  localparam int YW = 16 * MBW, YH = 16 * MBH;
  localparam int CW = 8 * MBW,  CH = 8 * MBH;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic start = 1'b0;
  always #5 clk = !clk;

  logic        busy, mb_start, mb_done;
  logic        in_req, out_valid, prm_req;
  comp_e       in_comp, out_comp, prm_comp;
  logic [4:0]  in_blk, out_blk, prm_edge;
  logic [1:0]  in_row, out_row, prm_x, prm_y, prm_line;
  edge_dir_e   prm_dir;
  word_t       in_data, out_data;
  line_param_t prm;
  logic        f_on, f_strong, f_strong_full, f_normal_p1;

  dbf_top dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .busy_o(busy),
    .mb_start_o(mb_start), .mb_done_o(mb_done),
    .in_req_o(in_req), .in_comp_o(in_comp), .in_blk_o(in_blk), .in_row_o(in_row),
    .in_data_i(in_data),
    .out_valid_o(out_valid), .out_comp_o(out_comp), .out_blk_o(out_blk),
    .out_row_o(out_row), .out_data_o(out_data),
    .prm_req_o(prm_req), .prm_comp_o(prm_comp), .prm_dir_o(prm_dir),
    .prm_x_o(prm_x), .prm_y_o(prm_y), .prm_edge_o(prm_edge), .prm_line_o(prm_line),
    .prm_i(prm),
    .filt_on_o(f_on), .filt_strong_o(f_strong), .filt_strong_full_o(f_strong_full),
    .filt_normal_p1_o(f_normal_p1)
  );

  // Pictures: [comp][y][x]; chroma planes use the top-left CH x CW part.
  int pic_dut [3][YH][YW];
  int pic_ref [3][YH][YW];

  // Per-line parameters: [mb][comp][dir][by][bx][line]
  int p_bs    [NMB][3][2][4][4][4];
  int p_tc0   [NMB][3][2][4][4][4];
  int p_alpha [NMB][3][2][4][4];
  int p_beta  [NMB][3][2][4][4];

  int boff [YH / 4][YW / 4];
  int checks = 0, failures = 0;
  int cycle = 0;
  localparam int NCHAIN = IDLE_LAST ? NMB - 1 : NMB;

  // mechanism counters
  int n_off = 0, n_bs0 = 0, n_normal = 0, n_normal_p1 = 0, n_strong_full = 0,
      n_strong_weak = 0, n_chroma_on = 0, n_row_preload = 0, n_merged = 0,
      n_chained = 0, n_idle_start = 0, n_in = 0, n_out = 0;

  function automatic int nblk(int comp);
    return (comp == 0) ? 4 : 2;
  endfunction

  // -------------------------------------------------------------------
  // Stimulus generation
  // -------------------------------------------------------------------
  task automatic fill_pictures();
    for (int c = 0; c < 3; c++) begin
      int h = (c == 0) ? YH : CH;
      int w = (c == 0) ? YW : CW;
      for (int by = 0; by < h / 4; by++)
        for (int bx = 0; bx < w / 4; bx++)
          boff[by][bx] = int'($urandom_range(0, 24)) - 12;
      for (int y = 0; y < YH; y++)
        for (int x = 0; x < YW; x++) begin
          int v = 0;
          if (y < h && x < w) begin
            v = 60 + ((2 * x + y) % 128) + boff[y / 4][x / 4] + int'($urandom_range(0, 4)) - 2;
            if (($urandom & 31) == 0) v = int'($urandom_range(0, 255));
            v = clip3(0, 255, v);
          end
          pic_dut[c][y][x] = v;
          pic_ref[c][y][x] = v;
        end
    end
  endtask

  task automatic draw_params();
    for (int mb = 0; mb < NMB; mb++) begin
      int mbx = mb % MBW, mby = mb / MBW;
      for (int c = 0; c < 3; c++)
        for (int d = 0; d < 2; d++)
          for (int by = 0; by < nblk(c); by++)
            for (int bx = 0; bx < nblk(c); bx++) begin
              bit mb_edge = (d == 0) ? (bx == 0) : (by == 0);
              bit border  = (d == 0) ? (bx == 0 && mbx == 0) : (by == 0 && mby == 0);
              p_alpha[mb][c][d][by][bx] = int'($urandom_range(4, 120));
              p_beta[mb][c][d][by][bx]  = int'($urandom_range(2, 18));
              for (int l = 0; l < 4; l++) begin
                int bs = int'($urandom_range(0, 7));
                if (bs > 4) bs = mb_edge ? 4 : int'($urandom_range(1, 3));
                if (bs == 4 && !mb_edge) bs = 2;
                if (border) bs = 0;
                p_bs[mb][c][d][by][bx][l]  = bs;
                p_tc0[mb][c][d][by][bx][l] = int'($urandom_range(0, 13));
              end
            end
    end
  endtask

  // -------------------------------------------------------------------
  // Reference: standard order, macroblock by macroblock
  // -------------------------------------------------------------------
  task automatic ref_filter();
    for (int mb = 0; mb < NMB; mb++) begin
      int mbx = mb % MBW, mby = mb / MBW;
      for (int c = 0; c < 3; c++) begin
        int n = nblk(c);
        int x0 = mbx * 4 * n, y0 = mby * 4 * n;
        // vertical edges
        for (int bx = 0; bx < n; bx++)
          for (int yy = 0; yy < 4 * n; yy++) begin
            side_t p, q;
            int by = yy / 4, l = yy % 4;
            int bs = p_bs[mb][c][0][by][bx][l];
            int ex = x0 + 4 * bx, y = y0 + yy;
            if (bs == 0) continue;
            for (int i = 0; i < 4; i++) begin
              p[i] = pic_ref[c][y][ex - 1 - i];
              q[i] = pic_ref[c][y][ex + i];
            end
            void'(ref_filter_line(p, q, bs, p_alpha[mb][c][0][by][bx],
                                  p_beta[mb][c][0][by][bx], p_tc0[mb][c][0][by][bx][l], c != 0));
            for (int i = 0; i < 4; i++) begin
              pic_ref[c][y][ex - 1 - i] = p[i];
              pic_ref[c][y][ex + i] = q[i];
            end
          end
        // horizontal edges
        for (int by = 0; by < n; by++)
          for (int xx = 0; xx < 4 * n; xx++) begin
            side_t p, q;
            int bx = xx / 4, l = xx % 4;
            int bs = p_bs[mb][c][1][by][bx][l];
            int ey = y0 + 4 * by, x = x0 + xx;
            if (bs == 0) continue;
            for (int i = 0; i < 4; i++) begin
              p[i] = pic_ref[c][ey - 1 - i][x];
              q[i] = pic_ref[c][ey + i][x];
            end
            void'(ref_filter_line(p, q, bs, p_alpha[mb][c][1][by][bx],
                                  p_beta[mb][c][1][by][bx], p_tc0[mb][c][1][by][bx][l], c != 0));
            for (int i = 0; i < 4; i++) begin
              pic_ref[c][ey - 1 - i][x] = p[i];
              pic_ref[c][ey + i][x] = q[i];
            end
          end
      end
    end
  endtask

  // -------------------------------------------------------------------
  // Frame memory model
  // -------------------------------------------------------------------
  int in_mb = -1;
  int out_mb = 0;
  int out_cnt_mb = 0, in_cnt_mb = 0;

  // Picture position of row `row` of grid block `blk` of macroblock mb.
  function automatic void blk_pos(int mb, int c, int blk, int row,
                                  output int px, output int py, output bit in_pic);
    int n = nblk(c);
    int g = blk / (n + 1), gx = blk % (n + 1);
    int mbx = mb % MBW, mby = mb / MBW;
    int w = (c == 0) ? YW : CW, h = (c == 0) ? YH : CH;
    px = (mbx * n + gx - 1) * 4;
    py = (mby * n + g - 1) * 4 + row;
    in_pic = (px >= 0 && py >= 0 && px + 3 < w && py < h);
  endfunction

  always @(negedge clk) begin
    int px, py;
    bit in_pic;
    if (rst_n) begin
      if (mb_start) in_mb++;
      in_data = '0;
      if (in_req) begin
        blk_pos(in_mb, int'(in_comp), int'(in_blk), int'(in_row), px, py, in_pic);
        if (in_pic)
          for (int i = 0; i < 4; i++) in_data[8*i +: 8] = 8'(pic_dut[in_comp][py][px + i]);
        n_in++;
      end
      prm = '0;
      if (prm_req) begin
        int d;
        d = (prm_dir == DIR_HORZ) ? 1 : 0;
        prm.alpha = 8'(p_alpha[in_mb][prm_comp][d][prm_y][prm_x]);
        prm.beta  = 5'(p_beta[in_mb][prm_comp][d][prm_y][prm_x]);
        prm.tc0   = 5'(p_tc0[in_mb][prm_comp][d][prm_y][prm_x][prm_line]);
        prm.bs    = 3'(p_bs[in_mb][prm_comp][d][prm_y][prm_x][prm_line]);
      end
    end
  end

  always @(posedge clk) begin
    int px, py;
    bit in_pic;
    if (rst_n) begin
      cycle <= cycle + 1;
      if (out_valid) begin
        blk_pos(out_mb, int'(out_comp), int'(out_blk), int'(out_row), px, py, in_pic);
        if (in_pic)
          for (int i = 0; i < 4; i++) pic_dut[out_comp][py][px + i] = int'(out_data[8*i +: 8]);
        out_cnt_mb++;
        n_out++;
      end
      if (in_req) in_cnt_mb++;
      // mechanism counts
      if (prm_req) begin
        if (prm.bs == 0) n_bs0++;
        else if (!f_on) n_off++;
        else if (f_strong_full) n_strong_full++;
        else if (f_strong) n_strong_weak++;
        else begin
          n_normal++;
          if (f_normal_p1) n_normal_p1++;
        end
        if (f_on && prm_comp != COMP_Y) n_chroma_on++;
      end
      if (in_req && in_row == 2'd0 && in_blk != 5'd0 &&
          in_blk % ((in_comp == COMP_Y) ? 5 : 3) == 0 &&
          in_blk != ((in_comp == COMP_Y) ? 5'd5 : 5'd3)) n_row_preload++;
      if (in_req && out_valid && in_blk == 5'd1 && in_row == 2'd0) n_merged++;
      if (mb_done) begin
        checks++;
        if (out_cnt_mb != 160) begin
          failures++;
          $display("FAIL mb %0d: %0d output words, expected 160", out_mb, out_cnt_mb);
        end
        out_cnt_mb = 0;
        out_mb++;
      end
    end
  end

  // -------------------------------------------------------------------
  // Control: macroblocks 0..NMB-2 back to back, the last one from idle
  // -------------------------------------------------------------------
  int starts = 0;
  int t_last_start = -1;
  int t_pic_start = -1, t_pic_done = -1;

  always @(posedge clk) begin
    if (rst_n && mb_start) begin
      if (t_last_start >= 0 && starts <= NCHAIN) begin
        checks++;
        if (cycle - t_last_start != 300) begin
          failures++;
          $display("FAIL chained macroblock interval %0d cycles, expected 300",
                   cycle - t_last_start);
        end else n_chained++;
      end
      t_last_start = cycle;
      if (t_pic_start < 0) t_pic_start = cycle;
    end
    if (rst_n && mb_done) t_pic_done = cycle;
    if (rst_n && mb_done && starts > NMB) begin
      checks++;
      if (cycle - t_last_start + 1 != 304) begin
        failures++;
        $display("FAIL idle macroblock took %0d cycles, expected 304", cycle - t_last_start + 1);
      end
    end
  end

  initial begin
    void'($urandom(32'd12345));
    #1 rst_n = 1'b0;
    fill_pictures();
    draw_params();
    ref_filter();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // first macroblock, then one queued request per started macroblock
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    starts = 1;
    while (starts < NCHAIN) begin
      @(posedge clk);
      if (mb_start) begin
        start <= 1'b1;
        @(posedge clk);
        start <= 1'b0;
        starts++;
      end
    end
    // wait until the core is idle, then (IDLE_LAST) the last macroblock alone
    wait (mb_start);
    @(posedge clk);
    while (busy) @(posedge clk);
    if (IDLE_LAST) begin
      repeat (5) @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      starts = NMB + 1;   // no interval check for the idle start
      n_idle_start++;
      @(posedge clk);
      while (busy) @(posedge clk);
    end
    repeat (3) @(posedge clk);
    if (MAX_CYCLES > 0) begin
      checks++;
      $display("picture: %0d macroblocks in %0d cycles (budget %0d)",
               NMB, t_pic_done - t_pic_start + 1, MAX_CYCLES);
      if (t_pic_done - t_pic_start + 1 > MAX_CYCLES) begin
        failures++;
        $display("FAIL picture took %0d cycles, budget %0d", t_pic_done - t_pic_start + 1, MAX_CYCLES);
      end
    end

    // compare pictures
    for (int c = 0; c < 3; c++)
      for (int y = 0; y < ((c == 0) ? YH : CH); y++)
        for (int x = 0; x < ((c == 0) ? YW : CW); x++) begin
          checks++;
          if (pic_dut[c][y][x] != pic_ref[c][y][x]) begin
            failures++;
            if (failures < 20)
              $display("FAIL comp %0d pixel (%0d,%0d): got %0d expected %0d",
                       c, x, y, pic_dut[c][y][x], pic_ref[c][y][x]);
          end
        end
    checks++;
    if (n_in != 160 * NMB || n_out != 160 * NMB) begin
      failures++;
      $display("FAIL word counts in=%0d out=%0d expected %0d", n_in, n_out, 160 * NMB);
    end

    $display("mechanisms: bs0=%0d off=%0d normal=%0d normal_p1=%0d strong_full=%0d strong_weak=%0d chroma=%0d",
             n_bs0, n_off, n_normal, n_normal_p1, n_strong_full, n_strong_weak, n_chroma_on);
    $display("schedule: row_preload=%0d merged=%0d chained=%0d idle_start=%0d",
             n_row_preload, n_merged, n_chained, n_idle_start);
    if (n_bs0 == 0)         begin failures++; $display("FAIL no bS=0 line"); end
    if (n_off == 0)         begin failures++; $display("FAIL no line rejected by alpha/beta"); end
    if (n_normal == 0)      begin failures++; $display("FAIL no normal filtering"); end
    if (n_normal_p1 == 0)   begin failures++; $display("FAIL no L1/R1 correction"); end
    if (n_strong_full == 0) begin failures++; $display("FAIL no full strong filtering"); end
    if (n_strong_weak == 0) begin failures++; $display("FAIL no 3-tap strong filtering"); end
    if (n_chroma_on == 0)   begin failures++; $display("FAIL no chroma filtering"); end
    if (n_row_preload == 0) begin failures++; $display("FAIL no overlapped left-block load"); end
    if (n_merged == 0)      begin failures++; $display("FAIL no merged component phase"); end
    if (n_chained == 0)     begin failures++; $display("FAIL no chained macroblock"); end
    if (IDLE_LAST && n_idle_start == 0) begin failures++; $display("FAIL no start from idle"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

