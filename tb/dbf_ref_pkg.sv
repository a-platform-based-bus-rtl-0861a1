// dbf_ref_pkg: reference model for the testbenches of the de-blocking
// filter. It filters whole macroblock regions the way the H.264 standard
// orders it (all vertical edges left to right, then all horizontal edges top
// to bottom) and lists the blocks a filtering mode moves, written
// independently of the RTL's slot functions.
//
// A component region is a (4N+4) x (4N+4) pixel array: rows 0..3 are the
// bottom of the upper MB, columns 0..3 the right of the left MB, the current
// MB starts at (4,4). N = 4 for luma, 2 for chroma.
package dbf_ref_pkg;

  typedef int line8_t [8];   // A3 A2 A1 A0 B0 B1 B2 B3 as indices 0..7

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int clip(int lo, int hi, int v);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  // Filter one line in place. Returns 1 when Eq. (1) held.
  function automatic bit ref_filter(ref line8_t l, input int bs, input int alpha,
                                    input int beta, input int tc0, input bit luma);
    int p0, p1, p2, p3, q0, q1, q2, q3, tc, d;
    bit ap, aq;
    p3 = l[0]; p2 = l[1]; p1 = l[2]; p0 = l[3];
    q0 = l[4]; q1 = l[5]; q2 = l[6]; q3 = l[7];
    if (bs == 0) return 0;
    if (!(iabs(p0 - q0) < alpha && iabs(p1 - p0) < beta && iabs(q1 - q0) < beta)) return 0;
    ap = iabs(p2 - p0) < beta;
    aq = iabs(q2 - q0) < beta;
    if (bs == 4) begin
      if (luma && ap && iabs(p0 - q0) < (alpha / 4 + 2)) begin
        l[3] = (p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) / 8;
        l[2] = (p2 + p1 + p0 + q0 + 2) / 4;
        l[1] = (2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) / 8;
      end else l[3] = (2 * p1 + p0 + q1 + 2) / 4;
      if (luma && aq && iabs(p0 - q0) < (alpha / 4 + 2)) begin
        l[4] = (p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) / 8;
        l[5] = (p0 + q0 + q1 + q2 + 2) / 4;
        l[6] = (2 * q3 + 3 * q2 + q1 + q0 + p0 + 4) / 8;
      end else l[4] = (2 * q1 + q0 + p1 + 2) / 4;
    end else begin
      tc = luma ? tc0 + int'(ap) + int'(aq) : tc0 + 1;
      // floor division of a possibly negative sum by 8
      d = 4 * (q0 - p0) + (p1 - q1) + 4;
      d = (d >= 0) ? d / 8 : -((-d + 7) / 8);
      d = clip(-tc, tc, d);
      l[3] = clip(0, 255, p0 + d);
      l[4] = clip(0, 255, q0 - d);
      if (luma && ap) l[2] = p1 + clip(-tc0, tc0, fdiv2(p2 + (p0 + q0 + 1) / 2 - 2 * p1));
      if (luma && aq) l[5] = q1 + clip(-tc0, tc0, fdiv2(q2 + (p0 + q0 + 1) / 2 - 2 * q1));
    end
    return 1;
  endfunction

  function automatic int fdiv2(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  // Block list of a mode in stream order. kind: 0 upper, 1 left, 2 current.
  typedef struct { int comp; int kind; int r; int c; } blk_t;

  function automatic bit cur_needed(bit l, bit u, bit cu, int r, int c);
    return cu || (u && r == 0) || (l && c == 0);
  endfunction

  function automatic void block_list(bit vert, bit l, bit u, bit cu, ref blk_t q[$]);
    int n;
    q.delete();
    for (int comp = 0; comp < 3; comp++) begin
      n = (comp == 0) ? 4 : 2;
      if (!vert) begin
        for (int r = 0; r < n; r++) begin
          if (l) q.push_back('{comp, 1, r, 0});
          for (int c = 0; c < n; c++) if (cur_needed(l, u, cu, r, c)) q.push_back('{comp, 2, r, c});
        end
        if (u) for (int c = 0; c < n; c++) q.push_back('{comp, 0, 0, c});
      end else begin
        if (l) for (int r = 0; r < n; r++) q.push_back('{comp, 1, r, 0});
        for (int c = 0; c < n; c++) begin
          if (u) q.push_back('{comp, 0, 0, c});
          for (int r = 0; r < n; r++) if (cur_needed(l, u, cu, r, c)) q.push_back('{comp, 2, r, c});
        end
      end
    end
  endfunction

  // Pixel origin (y, x) of a block in its component region.
  function automatic void blk_origin(blk_t b, output int y0, output int x0);
    case (b.kind)
      0: begin y0 = 0;           x0 = 4 + 4 * b.c; end
      1: begin y0 = 4 + 4 * b.r; x0 = 0;           end
      default: begin y0 = 4 + 4 * b.r; x0 = 4 + 4 * b.c; end
    endcase
  endfunction

endpackage
