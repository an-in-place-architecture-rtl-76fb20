// dbf_strong_filter: the bS = 4 ("strong") filter for one line of eight
// samples across an edge, L3..L0 | R0..R3.
//
// Both sides are computed by the same per-side datapath with the roles of
// the two sides swapped. For luma a side gets the full 3-tap/5-tap smoothing
// of its three samples next to the edge when its own activity is low
// (|X2 - X0| < beta) and the step across the edge is small
// (|L0 - R0| < (alpha >> 2) + 2); otherwise only X0 is replaced by the 3-tap
// average (2*X1 + X0 + Y1 + 2) >> 2. Chroma always takes that 3-tap form.
// The sums follow the bS = 4 equations of the H.264/AVC standard; the
// multi-input additions are written as plain sums and left to synthesis
// (the reference design used carry-save adders for them).
//
// Purely combinational. Whether the line is filtered at all (alpha/beta test
// on L1, L0, R0, R1) and whether bS is 4 are decided by dbf_edge_filter; this
// block only produces the candidate result.
module dbf_strong_filter
  import dbf_pkg::*;
(
  input  line_t      line_i,
  input  logic [7:0] alpha_i,
  input  logic [4:0] beta_i,
  input  logic       chroma_i,   // 1: chroma edge
  output line_t      line_o,
  output logic [1:0] strong_o    // per side (0 = L, 1 = R): full luma smoothing applied
);

  // One side: x[0..3] are the side's own samples (x[0] next to the edge),
  // y0 and y1 the two nearest samples of the other side.
  function automatic pix_t [3:0] side(pix_t [3:0] x, pix_t y0, pix_t y1,
                                      logic full);
    pix_t [3:0] o;
    int s0, s1, s2;
    o = x;
    if (full) begin
      s0 = int'(x[2]) + 2*int'(x[1]) + 2*int'(x[0]) + 2*int'(y0) + int'(y1) + 4;
      s1 = int'(x[2]) + int'(x[1]) + int'(x[0]) + int'(y0) + 2;
      s2 = 2*int'(x[3]) + 3*int'(x[2]) + int'(x[1]) + int'(x[0]) + int'(y0) + 4;
      o[0] = pix_t'(s0 >> 3);
      o[1] = pix_t'(s1 >> 2);
      o[2] = pix_t'(s2 >> 3);
    end else begin
      s0 = 2*int'(x[1]) + int'(x[0]) + int'(y1) + 2;
      o[0] = pix_t'(s0 >> 2);
    end
    return o;
  endfunction

  function automatic int absdiff(pix_t a, pix_t b);
    return (a > b) ? int'(a) - int'(b) : int'(b) - int'(a);
  endfunction

  logic small_step, full_l, full_r;

  always_comb begin
    small_step = absdiff(line_i.l[0], line_i.r[0]) < (int'(alpha_i) / 4 + 2);
    full_l = !chroma_i && small_step && (absdiff(line_i.l[2], line_i.l[0]) < int'(beta_i));
    full_r = !chroma_i && small_step && (absdiff(line_i.r[2], line_i.r[0]) < int'(beta_i));
    line_o.l = side(line_i.l, line_i.r[0], line_i.r[1], full_l);
    line_o.r = side(line_i.r, line_i.l[0], line_i.l[1], full_r);
    strong_o = {full_r, full_l};
  end

endmodule
