// dbf_top: in-place deblocking filter core for H.264/AVC macroblocks.
//
// The core filters one macroblock (16x16 luma, two 8x8 chroma) together with
// its upper and left neighbour blocks, visiting the 4x4 blocks in raster
// order and, for each block, filtering its left (vertical) edge and then its
// top (horizontal) edge as soon as both sides are available. Intermediate
// data therefore lives only in:
//   - a 4x4 shift buffer (block left of the current vertical edge),
//   - a 4x4 transpose register array (row/column conversion in place),
//   - a 16x32-bit two-port SRAM (the four blocks above the current block row,
//     column major, overwritten in place by the blocks of the current row),
// and a single 8-pixel edge filter handles one line per cycle.
//
// Data interface (all words 32 bits, four pixels of one row, pixel i in
// bits [8*i +: 8], row-major order of every block):
//   in_req_o/in_comp_o/in_blk_o/in_row_o ask for row in_row_o of block
//   in_blk_o; the word must be on in_data_i in the same cycle. Blocks are
//   requested in raster order of the component's (n+1)x(n+1) grid: the n
//   blocks above, then each row's left-neighbour block followed by the
//   macroblock's own blocks (luma 1..24, chroma 1..8).
//   out_valid_o/out_comp_o/out_blk_o/out_row_o/out_data_o return finished rows
//   of the same grid (neighbour blocks included), each block once.
//   prm_req_o/prm_comp_o/prm_dir_o/prm_x_o/prm_y_o/prm_line_o name the line
//   being filtered: the edge on the left (vertical) or top (horizontal) of
//   block (x, y) of the component, line prm_line_o (row for a vertical edge,
//   column for a horizontal one). prm_i must carry alpha, beta, tc0 and bS of
//   that line in the same cycle. Picture edges and disabled edges are
//   signalled with bS = 0; the thresholds are computed outside the core.
//
// Timing: start_i requests a macroblock (one request may wait while busy).
// Back to back a macroblock takes 300 cycles: 180 luma, 60 per chroma
// component; a macroblock started from idle takes 304. The filter is
// combinational, and every memory of the core changes only at the clock
// edge.
// The blocks and their connections follow the reference architecture (shift
// buffer, transpose array, 16x32 two-port SRAM, one 32-bit input and one
// 32-bit output port, 4 pixels per cycle). The tagged request/response
// ports, the per-line parameter port and the start handshake are this
// design's own.
module dbf_top
  import dbf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  output logic        busy_o,
  output logic        mb_start_o,
  output logic        mb_done_o,
  // input port
  output logic        in_req_o,
  output comp_e       in_comp_o,
  output logic [4:0]  in_blk_o,
  output logic [1:0]  in_row_o,
  input  word_t       in_data_i,
  // output port
  output logic        out_valid_o,
  output comp_e       out_comp_o,
  output logic [4:0]  out_blk_o,
  output logic [1:0]  out_row_o,
  output word_t       out_data_o,
  // edge parameters
  output logic        prm_req_o,
  output comp_e       prm_comp_o,
  output edge_dir_e   prm_dir_o,
  output logic [1:0]  prm_x_o,
  output logic [1:0]  prm_y_o,
  output logic [4:0]  prm_edge_o,
  output logic [1:0]  prm_line_o,
  input  line_param_t prm_i,
  // filter status of the current line, for observation
  output logic        filt_on_o,
  output logic        filt_strong_o,
  output logic        filt_strong_full_o,
  output logic        filt_normal_p1_o
);

  ctrl_t      ctrl;
  logic [1:0] cyc;
  logic       tb_dir;
  logic       sram_rd;
  logic [3:0] sram_raddr;

  word_t sr_out, sr_in;
  word_t tb_rd, tb_wr_data;
  word_t sram_rdata, sram_wdata;
  word_t filt_l_in, filt_r_in, filt_l_out, filt_r_out;
  logic  filt_on, filt_strong, filt_strong_full, filt_normal_p1;

  dbf_controller u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_i      (start_i),
    .busy_o       (busy_o),
    .ctrl_o       (ctrl),
    .cyc_o        (cyc),
    .tb_dir_o     (tb_dir),
    .sram_rd_o    (sram_rd),
    .sram_raddr_o (sram_raddr),
    .mb_start_o   (mb_start_o),
    .mb_done_o    (mb_done_o)
  );

  // Edge filter operands: vertical edges take the left block from the shift
  // buffer and the right block from the input port; horizontal edges take
  // the upper block from SRAM and the lower block from the transpose buffer.
  assign filt_l_in = ctrl.filt_horz ? sram_rdata : sr_out;
  assign filt_r_in = ctrl.filt_horz ? tb_rd      : in_data_i;

  dbf_edge_filter u_filter (
    .left_i        (filt_l_in),
    .right_i       (filt_r_in),
    .prm_i         (prm_i),
    .chroma_i      (ctrl.edge_comp != COMP_Y),
    .left_o        (filt_l_out),
    .right_o       (filt_r_out),
    .filtered_o    (filt_on),
    .strong_o      (filt_strong),
    .strong_full_o (filt_strong_full),
    .normal_p1_o   (filt_normal_p1)
  );

  assign sr_in = ctrl.sr_from_filt ? filt_r_out : in_data_i;

  dbf_shift_buffer u_shift (
    .clk     (clk),
    .rst_n   (rst_n),
    .shift_i (ctrl.sr_shift),
    .data_i  (sr_in),
    .data_o  (sr_out)
  );

  always_comb begin
    case (ctrl.tb_src)
      TB_FROM_IN:   tb_wr_data = in_data_i;
      TB_FROM_FILT: tb_wr_data = filt_l_out;
      TB_FROM_SR:   tb_wr_data = sr_out;
      default:      tb_wr_data = sram_rdata;
    endcase
  end

  dbf_transpose_buffer u_transpose (
    .clk       (clk),
    .rst_n     (rst_n),
    .dir_i     (tb_dir),
    .slot_i    (cyc),
    .wr_i      (ctrl.tb_wr),
    .wr_data_i (tb_wr_data),
    .rd_data_o (tb_rd)
  );

  assign sram_wdata = ctrl.sram_from_filt ? filt_r_out : tb_rd;

  dbf_sram_2p u_sram (
    .clk       (clk),
    .rd_en_i   (sram_rd),
    .rd_addr_i (sram_raddr),
    .rd_data_o (sram_rdata),
    .wr_en_i   (ctrl.sram_wr),
    .wr_addr_i ({ctrl.sram_wslot, cyc}),
    .wr_data_i (sram_wdata)
  );

  assign in_req_o    = ctrl.in_en;
  assign in_comp_o   = ctrl.in_comp;
  assign in_blk_o    = ctrl.in_blk;
  assign in_row_o    = cyc;

  assign out_valid_o = ctrl.out_en;
  assign out_comp_o  = ctrl.out_comp;
  assign out_blk_o   = ctrl.out_blk;
  assign out_row_o   = cyc;
  assign out_data_o  = tb_rd;

  assign prm_req_o   = ctrl.filt_en;
  assign prm_comp_o  = ctrl.edge_comp;
  assign prm_dir_o   = ctrl.filt_horz ? DIR_HORZ : DIR_VERT;
  assign prm_x_o     = ctrl.edge_x;
  assign prm_y_o     = ctrl.edge_y;
  assign prm_edge_o  = ctrl.edge_no;
  assign prm_line_o  = cyc;

  assign filt_on_o          = ctrl.filt_en && filt_on;
  assign filt_strong_o      = ctrl.filt_en && filt_strong;
  assign filt_strong_full_o = ctrl.filt_en && filt_strong_full;
  assign filt_normal_p1_o   = ctrl.filt_en && filt_normal_p1;

endmodule
