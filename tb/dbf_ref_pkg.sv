// dbf_ref_pkg: reference model of the H.264/AVC edge filter for the
// testbenches. Written directly from the filtering equations with integer
// arithmetic, independently of the RTL datapath.
//   p[0..3]: samples on the left/upper side, p[0] next to the edge
//   q[0..3]: samples on the right/lower side, q[0] next to the edge
package dbf_ref_pkg;

  typedef int side_t [4];

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int clip3(int lo, int hi, int v);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  // bS < 4 filter of one line, without the on/off test.
  function automatic void ref_normal(ref side_t p, ref side_t q, input int beta,
                                     input int tc0, input bit chroma);
    int ap, aq, tc, d, p0, p1, p2, q0, q1, q2;
    p0 = p[0]; p1 = p[1]; p2 = p[2];
    q0 = q[0]; q1 = q[1]; q2 = q[2];
    ap = iabs(p2 - p0);
    aq = iabs(q2 - q0);
    tc = chroma ? tc0 + 1 : tc0 + (ap < beta) + (aq < beta);
    d = clip3(-tc, tc, (((q0 - p0) * 4) + (p1 - q1) + 4) >>> 3);
    p[0] = clip3(0, 255, p0 + d);
    q[0] = clip3(0, 255, q0 - d);
    if (!chroma) begin
      if (ap < beta) p[1] = p1 + clip3(-tc0, tc0, (p2 + ((p0 + q0 + 1) >>> 1) - 2 * p1) >>> 1);
      if (aq < beta) q[1] = q1 + clip3(-tc0, tc0, (q2 + ((p0 + q0 + 1) >>> 1) - 2 * q1) >>> 1);
    end
  endfunction

  // bS = 4 filter of one line, without the on/off test.
  function automatic void ref_strong(ref side_t p, ref side_t q, input int alpha,
                                     input int beta, input bit chroma);
    int ap, aq, p0, p1, p2, q0, q1, q2;
    p0 = p[0]; p1 = p[1]; p2 = p[2];
    q0 = q[0]; q1 = q[1]; q2 = q[2];
    ap = iabs(p2 - p0);
    aq = iabs(q2 - q0);
    if (!chroma && ap < beta && iabs(p0 - q0) < ((alpha >>> 2) + 2)) begin
      p[0] = (p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) >>> 3;
      p[1] = (p2 + p1 + p0 + q0 + 2) >>> 2;
      p[2] = (2 * p[3] + 3 * p2 + p1 + p0 + q0 + 4) >>> 3;
    end else begin
      p[0] = (2 * p1 + p0 + q1 + 2) >>> 2;
    end
    if (!chroma && aq < beta && iabs(p0 - q0) < ((alpha >>> 2) + 2)) begin
      q[0] = (q2 + 2 * q1 + 2 * q0 + 2 * p0 + p1 + 4) >>> 3;
      q[1] = (q2 + q1 + q0 + p0 + 2) >>> 2;
      q[2] = (2 * q[3] + 3 * q2 + q1 + q0 + p0 + 4) >>> 3;
    end else begin
      q[0] = (2 * q1 + q0 + p1 + 2) >>> 2;
    end
  endfunction

  // Complete edge filter of one line, in place; returns 1 when filtered.
  function automatic bit ref_filter_line(ref side_t p, ref side_t q, input int bs,
                                         input int alpha, input int beta,
                                         input int tc0, input bit chroma);
    if (bs == 0) return 0;
    if (!(iabs(p[0] - q[0]) < alpha && iabs(p[1] - p[0]) < beta &&
          iabs(q[1] - q[0]) < beta)) return 0;
    if (bs < 4) ref_normal(p, q, beta, tc0, chroma);
    else        ref_strong(p, q, alpha, beta, chroma);
    return 1;
  endfunction

  // Random line with small steps, so that the filters are exercised.
  function automatic void rand_line(ref side_t p, ref side_t q, input int spread);
    int base = int'($urandom_range(0, 255));
    for (int i = 0; i < 4; i++) begin
      p[i] = clip3(0, 255, base + int'($urandom_range(0, 2 * spread)) - spread);
      q[i] = clip3(0, 255, base + int'($urandom_range(0, 2 * spread)) - spread);
    end
  endfunction

endpackage
