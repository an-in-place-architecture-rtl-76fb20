// dbf_pkg: types and constants shared by the in-place H.264/AVC deblocking
// filter core.
//
// Pixels are 8 bits. Every datapath word is 32 bits and holds four pixels of
// one line of a 4x4 block, pixel i in bits [8*i +: 8], where pixel 0 is the
// leftmost pixel of a row or the topmost pixel of a column. For the left (p)
// side of an edge this puts L0 (the pixel next to the edge) in bits [31:24];
// for the right (q) side R0 is in bits [7:0].
//
// Block indices follow a (n+1)x(n+1) grid per colour component: row 0 holds
// the n blocks above the macroblock (index 1..n), column 0 the blocks of the
// left macroblock, and grid position (g, x) has index g*(n+1)+x. For luma
// (n = 4) this gives the numbering 1..24 used throughout the design; chroma
// (n = 2) uses 1..8.
package dbf_pkg;

  localparam int unsigned PIX_W  = 8;            // bits per sample
  localparam int unsigned WORD_W = 4 * PIX_W;    // one 4-pixel line
  localparam int unsigned SRAM_DEPTH = 16;       // four 4x4 blocks, column major
  localparam int unsigned SRAM_AW    = 4;

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [WORD_W-1:0] word_t;

  // Colour component of the data being processed.
  typedef enum logic [1:0] {
    COMP_Y  = 2'd0,
    COMP_CB = 2'd1,
    COMP_CR = 2'd2
  } comp_e;

  // Edge direction: vertical edges are filtered horizontally (along rows),
  // horizontal edges vertically (along columns).
  typedef enum logic {
    DIR_VERT = 1'b0,
    DIR_HORZ = 1'b1
  } edge_dir_e;

  // Filter parameters for one line of samples across an edge. alpha and beta
  // are the quantisation dependent thresholds, tc0 the clipping value of the
  // normal filter and bs the boundary strength (0..4) of that line.
  typedef struct packed {
    logic [7:0] alpha;
    logic [4:0] beta;
    logic [4:0] tc0;
    logic [2:0] bs;
  } line_param_t;

  // One line across an edge: l[0] = L0 (next to the edge) .. l[3] = L3,
  // r[0] = R0 .. r[3] = R3, naming as in the filter description.
  typedef struct packed {
    pix_t [3:0] l;
    pix_t [3:0] r;
  } line_t;

  // Split a left-side word (L0 in the top byte) into l[0..3].
  function automatic pix_t [3:0] left_of_word(word_t w);
    pix_t [3:0] l;
    for (int i = 0; i < 4; i++) l[i] = w[PIX_W*(3-i) +: PIX_W];
    return l;
  endfunction

  // Split a right-side word (R0 in the bottom byte) into r[0..3].
  function automatic pix_t [3:0] right_of_word(word_t w);
    pix_t [3:0] r;
    for (int i = 0; i < 4; i++) r[i] = w[PIX_W*i +: PIX_W];
    return r;
  endfunction

  function automatic word_t word_of_left(pix_t [3:0] l);
    word_t w;
    for (int i = 0; i < 4; i++) w[PIX_W*(3-i) +: PIX_W] = l[i];
    return w;
  endfunction

  function automatic word_t word_of_right(pix_t [3:0] r);
    word_t w;
    for (int i = 0; i < 4; i++) w[PIX_W*i +: PIX_W] = r[i];
    return w;
  endfunction

  // Source of a word written into the transpose buffer.
  typedef enum logic [1:0] {
    TB_FROM_IN   = 2'd0,   // input port
    TB_FROM_FILT = 2'd1,   // left/upper output of the edge filter
    TB_FROM_SR   = 2'd2,   // head of the shift buffer
    TB_FROM_SRAM = 2'd3    // SRAM read port
  } tb_src_e;

  // Control word of one cycle, produced by dbf_controller. A schedule phase
  // lasts four cycles; the cycle number within the phase selects the line,
  // the transpose-buffer slot and the word within an SRAM block slot.
  typedef struct packed {
    // input port
    logic       in_en;
    comp_e      in_comp;
    logic [4:0] in_blk;
    logic       in_to_sr;     // input word goes to the shift buffer
    // edge filter
    logic       filt_en;
    logic       filt_horz;    // 0: L = shift buffer, R = input; 1: L = SRAM, R = transpose buffer
    comp_e      edge_comp;
    logic [1:0] edge_x;       // position of the right/lower block in the component
    logic [1:0] edge_y;
    logic [4:0] edge_no;      // processing order of the edge in the component
    // shift buffer
    logic       sr_shift;
    logic       sr_from_filt; // 1: filter right output, 0: input port
    // transpose buffer
    logic       tb_toggle;    // change access direction at the start of this phase
    logic       tb_wr;
    tb_src_e    tb_src;
    // SRAM
    logic       sram_rd;
    logic [1:0] sram_rslot;
    logic       sram_wr;
    logic [1:0] sram_wslot;
    logic       sram_from_filt; // 1: filter right output, 0: transpose buffer
    // output port
    logic       out_en;
    comp_e      out_comp;
    logic [4:0] out_blk;
  } ctrl_t;

  // Clip an intermediate value to the 8-bit sample range.
  function automatic pix_t clip1(int v);
    if (v < 0) return '0;
    if (v > 255) return 8'hFF;
    return pix_t'(v);
  endfunction

endpackage
