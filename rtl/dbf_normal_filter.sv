// dbf_normal_filter: the bS < 4 ("normal") filter for one line of eight
// samples across an edge, L3..L0 | R0..R3.
//
// A single correction delta = clip(-tc, tc, (4*(R0 - L0) + (L1 - R1) + 4) >> 3)
// is added to L0 and subtracted from R0. For luma, tc = tc0 plus one for each
// side whose activity |X2 - X0| is below beta, and such a side also gets its
// X1 moved by clip(-tc0, tc0, (X2 + ((L0 + R0 + 1) >> 1) - 2*X1) >> 1).
// For chroma tc = tc0 + 1 and only L0 and R0 change. These are the bS < 4
// equations of the H.264/AVC standard.
//
// Purely combinational. tc0 comes from outside (it depends on bS and the
// quantiser); the alpha/beta on/off test and the bS selection are made in
// dbf_edge_filter.
module dbf_normal_filter
  import dbf_pkg::*;
(
  input  line_t      line_i,
  input  logic [4:0] beta_i,
  input  logic [4:0] tc0_i,
  input  logic       chroma_i,   // 1: chroma edge
  output line_t      line_o,
  output logic [1:0] side1_o     // per side (0 = L, 1 = R): X1 was corrected
);

  function automatic int absdiff(pix_t a, pix_t b);
    return (a > b) ? int'(a) - int'(b) : int'(b) - int'(a);
  endfunction

  function automatic int clip3(int lo, int hi, int v);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  // Filters one line; side1 reports which X1 samples were corrected.
  function automatic line_t filter(line_t li, logic [4:0] beta, logic [4:0] tc0,
                                   logic chroma, output logic [1:0] side1);
    line_t lo;
    logic  ap_ok, aq_ok;
    int    tc, delta, avg0, dl1, dr1;
    ap_ok = !chroma && (absdiff(li.l[2], li.l[0]) < int'(beta));
    aq_ok = !chroma && (absdiff(li.r[2], li.r[0]) < int'(beta));
    if (chroma) tc = int'(tc0) + 1;
    else        tc = int'(tc0) + int'(ap_ok) + int'(aq_ok);
    delta = clip3(-tc, tc,
                  ((4 * (int'(li.r[0]) - int'(li.l[0]))
                    + (int'(li.l[1]) - int'(li.r[1])) + 4) >>> 3));
    avg0 = (int'(li.l[0]) + int'(li.r[0]) + 1) >> 1;
    dl1  = clip3(-int'(tc0), int'(tc0), (int'(li.l[2]) + avg0 - 2 * int'(li.l[1])) >>> 1);
    dr1  = clip3(-int'(tc0), int'(tc0), (int'(li.r[2]) + avg0 - 2 * int'(li.r[1])) >>> 1);
    lo = li;
    lo.l[0] = clip1(int'(li.l[0]) + delta);
    lo.r[0] = clip1(int'(li.r[0]) - delta);
    if (ap_ok) lo.l[1] = pix_t'(int'(li.l[1]) + dl1);
    if (aq_ok) lo.r[1] = pix_t'(int'(li.r[1]) + dr1);
    side1 = {aq_ok, ap_ok};
    return lo;
  endfunction

  always_comb line_o = filter(line_i, beta_i, tc0_i, chroma_i, side1_o);

endmodule
