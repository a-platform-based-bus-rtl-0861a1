// dbf_fir: one-dimensional adaptive de-blocking filter for one line of eight
// pixels across a 4x4 block edge.
//
// Inputs are two 32-bit words: a_word is the line of the block before the
// edge (left or upper block), b_word the line of the block after it. Pixel k
// of a word sits in bits [8k+7:8k], so A0 (next to the edge) is a_word[31:24]
// and B0 is b_word[7:0]. The outputs have the same packing: a_out is the final
// line of the earlier block, b_out the intermediate line of the later block,
// which is filtered again at its far edge.
//
// The decision flow follows Fig. 3 of the method: the line is filtered when
// bS != 0, |A0-B0| < alpha, |A1-A0| < beta and |B1-B0| < beta. For bS < 4 a
// clipped 4-tap correction updates A0/B0 and, for luma only and when
// |A0-A2| (|B0-B2|) < beta, also A1 (B1). For bS = 4 the 5/4/5-tap strong
// filter updates A0..A2 (B0..B2) of luma where |A0-A2| < beta and A0/B0 are
// close enough, otherwise the 3-tap filter updates A0 (B0) only. The exact
// tap weights, the clipping with tc0 and the strong-filter threshold
// (alpha/4 + 2) are those of the H.264 standard, which the method implements.
//
// Purely combinational: one line per clock in the surrounding datapath.
module dbf_fir
  import dbf_pkg::*;
(
  input  word_t      a_word,
  input  word_t      b_word,
  input  bs_t        bs,
  input  logic [7:0] alpha,
  input  logic [7:0] beta,
  input  logic [4:0] tc0,
  input  logic       luma,
  output word_t      a_out,
  output word_t      b_out,
  output logic       filtered    // the line met Eq. (1) and was changed
);

  typedef logic signed [11:0] s_t;

  function automatic s_t absd(s_t x, s_t y);
    return (x > y) ? x - y : y - x;
  endfunction

  function automatic s_t clip3(s_t lo, s_t hi, s_t v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic pix_t clip1(s_t v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : v[7:0];
  endfunction

  s_t p0, p1, p2, p3, q0, q1, q2, q3;
  s_t al, be, tc0s, tc, delta, dp1, dq1;
  logic flt, ap_ok, aq_ok, strong_p, strong_q;
  pix_t np0, np1, np2, nq0, nq1, nq2;

  always_comb begin
    p0 = s_t'({4'd0, a_word[31:24]});
    p1 = s_t'({4'd0, a_word[23:16]});
    p2 = s_t'({4'd0, a_word[15:8]});
    p3 = s_t'({4'd0, a_word[7:0]});
    q0 = s_t'({4'd0, b_word[7:0]});
    q1 = s_t'({4'd0, b_word[15:8]});
    q2 = s_t'({4'd0, b_word[23:16]});
    q3 = s_t'({4'd0, b_word[31:24]});
    al   = s_t'({4'd0, alpha});
    be   = s_t'({4'd0, beta});
    tc0s = s_t'({7'd0, tc0});

    // Eq. (1)
    flt   = (bs != 3'd0) && (absd(p0, q0) < al) && (absd(p1, p0) < be) && (absd(q1, q0) < be);
    ap_ok = absd(p2, p0) < be;
    aq_ok = absd(q2, q0) < be;
    strong_p = luma && ap_ok && (absd(p0, q0) < ((al >>> 2) + 12'sd2));
    strong_q = luma && aq_ok && (absd(p0, q0) < ((al >>> 2) + 12'sd2));

    np0 = p0[7:0]; np1 = p1[7:0]; np2 = p2[7:0];
    nq0 = q0[7:0]; nq1 = q1[7:0]; nq2 = q2[7:0];
    tc = '0; delta = '0; dp1 = '0; dq1 = '0;

    if (flt) begin
      if (bs == 3'd4) begin
        if (strong_p) begin
          np0 = 8'((p2 + 12'sd2*p1 + 12'sd2*p0 + 12'sd2*q0 + q1 + 12'sd4) >>> 3);
          np1 = 8'((p2 + p1 + p0 + q0 + 12'sd2) >>> 2);
          np2 = 8'((12'sd2*p3 + 12'sd3*p2 + p1 + p0 + q0 + 12'sd4) >>> 3);
        end else begin
          np0 = 8'((12'sd2*p1 + p0 + q1 + 12'sd2) >>> 2);
        end
        if (strong_q) begin
          nq0 = 8'((p1 + 12'sd2*p0 + 12'sd2*q0 + 12'sd2*q1 + q2 + 12'sd4) >>> 3);
          nq1 = 8'((p0 + q0 + q1 + q2 + 12'sd2) >>> 2);
          nq2 = 8'((12'sd2*q3 + 12'sd3*q2 + q1 + q0 + p0 + 12'sd4) >>> 3);
        end else begin
          nq0 = 8'((12'sd2*q1 + q0 + p1 + 12'sd2) >>> 2);
        end
      end else begin
        tc    = luma ? tc0s + s_t'(ap_ok) + s_t'(aq_ok) : tc0s + 12'sd1;
        delta = clip3(-tc, tc, (((q0 - p0) <<< 2) + (p1 - q1) + 12'sd4) >>> 3);
        np0   = clip1(p0 + delta);
        nq0   = clip1(q0 - delta);
        if (luma && ap_ok) begin
          dp1 = clip3(-tc0s, tc0s, (p2 + ((p0 + q0 + 12'sd1) >>> 1) - (p1 <<< 1)) >>> 1);
          np1 = 8'(p1 + dp1);
        end
        if (luma && aq_ok) begin
          dq1 = clip3(-tc0s, tc0s, (q2 + ((p0 + q0 + 12'sd1) >>> 1) - (q1 <<< 1)) >>> 1);
          nq1 = 8'(q1 + dq1);
        end
      end
    end

    a_out    = {np0, np1, np2, p3[7:0]};
    b_out    = {q3[7:0], nq2, nq1, nq0};
    filtered = flt;
  end

endmodule
