// dbf_edge_filter: the 8-pixel parallel-in parallel-out edge filter.
//
// One line of eight samples across an edge enters per cycle as two 32-bit
// words: the left/upper side (L0 next to the edge, in the top byte) and the
// right/lower side (R0 in the bottom byte). The line passes through the
// strong filter and the normal filter in parallel, and the output is chosen
// by the boundary strength: bS = 0 or a failed on/off test passes the line
// through unchanged, bS = 4 takes the strong result, bS 1..3 the normal one.
// The on/off test is the H.264/AVC one: the line is filtered only if
// |R0 - L0| < alpha, |R0 - R1| < beta and |L0 - L1| < beta.
//
// Purely combinational, so a line is filtered in the cycle it is presented;
// the surrounding schedule relies on this to write results back into the
// buffer slot it reads in the same cycle. The status outputs report which
// path was taken, for observation only.
// The structure (two filters in parallel, output chosen by bS and by the
// on/off test) follows the reference architecture; the word packing and the
// per-line parameter bundle are this design's choices.
module dbf_edge_filter
  import dbf_pkg::*;
(
  input  word_t       left_i,
  input  word_t       right_i,
  input  line_param_t prm_i,
  input  logic        chroma_i,
  output word_t       left_o,
  output word_t       right_o,
  output logic        filtered_o,   // line was modified by a filter path
  output logic        strong_o,     // bS = 4 path selected
  output logic        strong_full_o,// bS = 4 with full luma smoothing on a side
  output logic        normal_p1_o   // bS 1..3 with an L1 or R1 correction
);

  line_t      line_in, line_strong, line_normal, line_out;
  logic [1:0] strong_full, normal_side1;
  logic       on;

  function automatic int absdiff(pix_t a, pix_t b);
    return (a > b) ? int'(a) - int'(b) : int'(b) - int'(a);
  endfunction

  assign line_in.l = left_of_word(left_i);
  assign line_in.r = right_of_word(right_i);

  dbf_strong_filter u_strong (
    .line_i   (line_in),
    .alpha_i  (prm_i.alpha),
    .beta_i   (prm_i.beta),
    .chroma_i (chroma_i),
    .line_o   (line_strong),
    .strong_o (strong_full)
  );

  dbf_normal_filter u_normal (
    .line_i   (line_in),
    .beta_i   (prm_i.beta),
    .tc0_i    (prm_i.tc0),
    .chroma_i (chroma_i),
    .line_o   (line_normal),
    .side1_o  (normal_side1)
  );

  always_comb begin
    on = (prm_i.bs != 3'd0)
      && (absdiff(line_in.r[0], line_in.l[0]) < int'(prm_i.alpha))
      && (absdiff(line_in.r[0], line_in.r[1]) < int'(prm_i.beta))
      && (absdiff(line_in.l[0], line_in.l[1]) < int'(prm_i.beta));
    if (!on)                    line_out = line_in;
    else if (prm_i.bs >= 3'd4)  line_out = line_strong;
    else                        line_out = line_normal;
    filtered_o    = on;
    strong_o      = on && (prm_i.bs >= 3'd4);
    strong_full_o = strong_o && (strong_full != 2'b00);
    normal_p1_o   = on && !strong_o && (normal_side1 != 2'b00);
  end

  assign left_o  = word_of_left(line_out.l);
  assign right_o = word_of_right(line_out.r);

endmodule
