// deblock_edge: one application of the deblocking filter to a line of eight
// samples across a block edge, p3 p2 p1 p0 | q0 q1 q2 q3.
//
// The threshold test filters only when |p0-q0| < alpha, |p1-p0| < beta and
// |q1-q0| < beta, with alpha and beta looked up from indexA / indexB (the
// average QP of the two blocks plus the slice's filter offsets). Then:
//  * bS 1..3: p0/q0 move by a delta clipped to +-tc; for luma p1/q1 also
//    move when the inner samples on that side are smooth (ap/aq < beta);
//  * bS 4 (macroblock edge of an intra macroblock): luma sides that are
//    smooth enough get the strong 3-sample smoothing, others and chroma get
//    the weak p0/q0 filter.
// Alpha, beta and tc0 are the H.264 tables (Tables 8-16, 8-17) written as
// case statements. Purely combinational; `filtered` tells whether the test
// passed.
module deblock_edge (
  input  logic [3:0][7:0] p,        // p[0] is next to the edge
  input  logic [3:0][7:0] q,
  input  logic [2:0]      bs,
  input  logic [5:0]      index_a,
  input  logic [5:0]      index_b,
  input  logic            chroma,
  output logic [3:0][7:0] p_out,
  output logic [3:0][7:0] q_out,
  output logic            filtered
);
  function automatic int alpha_tab(input logic [5:0] i);
    int t [36] = '{4, 4, 5, 6, 7, 8, 9, 10, 12, 13, 15, 17, 20, 22, 25, 28, 32, 36, 40, 45,
                   50, 56, 63, 71, 80, 90, 101, 113, 127, 144, 162, 182, 203, 226, 255, 255};
    return (i < 16) ? 0 : (i > 51) ? 255 : t[i - 16];
  endfunction
  function automatic int beta_tab(input logic [5:0] i);
    int t [36] = '{2, 2, 2, 3, 3, 3, 3, 4, 4, 4, 6, 6, 7, 7, 8, 8, 9, 9, 10, 10,
                   11, 11, 12, 12, 13, 13, 14, 14, 15, 15, 16, 16, 17, 17, 18, 18};
    return (i < 16) ? 0 : (i > 51) ? 18 : t[i - 16];
  endfunction
  function automatic int tc0_tab(input logic [5:0] i, input logic [1:0] b);
    // columns bS = 1, 2, 3 for indexA 17..51 (0 below 17)
    int t [35][3] = '{'{0,0,1}, '{0,0,1}, '{0,0,1}, '{0,0,1}, '{0,1,1}, '{0,1,1}, '{1,1,1},
                      '{1,1,1}, '{1,1,1}, '{1,1,1}, '{1,1,2}, '{1,1,2}, '{1,1,2}, '{1,1,2},
                      '{1,2,3}, '{1,2,3}, '{2,2,3}, '{2,2,4}, '{2,3,4}, '{2,3,4}, '{3,3,5},
                      '{3,4,6}, '{3,4,6}, '{4,5,7}, '{4,5,8}, '{4,6,9}, '{5,7,10}, '{6,8,11},
                      '{6,8,13}, '{7,10,14}, '{8,11,16}, '{9,12,18}, '{10,13,20}, '{11,15,23}, '{13,17,25}};
    return (i < 17) ? 0 : (i > 51) ? t[34][b-1] : t[i - 17][b-1];
  endfunction

  function automatic int iabs(input int v); return (v < 0) ? -v : v; endfunction
  function automatic int clip3(input int lo, input int hi, input int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  always_comb begin
    logic signed [31:0] p0, p1, p2, p3, q0, q1, q2, q3, alpha, beta, ap, aq, tc0, tc, delta;
    p0 = int'(p[0]); p1 = int'(p[1]); p2 = int'(p[2]); p3 = int'(p[3]);
    q0 = int'(q[0]); q1 = int'(q[1]); q2 = int'(q[2]); q3 = int'(q[3]);
    alpha = alpha_tab(index_a);
    beta  = beta_tab(index_b);
    ap = iabs(p2 - p0);
    aq = iabs(q2 - q0);
    p_out = p;
    q_out = q;
    tc0 = 0; tc = 0; delta = 0;
    filtered = (bs != 0) && iabs(p0 - q0) < alpha && iabs(p1 - p0) < beta && iabs(q1 - q0) < beta;
    if (filtered && bs < 3'd4) begin
      tc0 = tc0_tab(index_a, bs[1:0]);
      tc  = chroma ? tc0 + 1 : tc0 + ((ap < beta) ? 1 : 0) + ((aq < beta) ? 1 : 0);
      delta = clip3(-tc, tc, ((((q0 - p0) <<< 2) + (p1 - q1) + 4) >>> 3));
      p_out[0] = 8'(clip3(0, 255, p0 + delta));
      q_out[0] = 8'(clip3(0, 255, q0 - delta));
      if (!chroma && ap < beta) p_out[1] = 8'(p1 + clip3(-tc0, tc0, (p2 + ((p0 + q0 + 1) >>> 1) - (p1 <<< 1)) >>> 1));
      if (!chroma && aq < beta) q_out[1] = 8'(q1 + clip3(-tc0, tc0, (q2 + ((p0 + q0 + 1) >>> 1) - (q1 <<< 1)) >>> 1));
    end else if (filtered) begin
      if (!chroma && ap < beta && iabs(p0 - q0) < ((alpha >>> 2) + 2)) begin
        p_out[0] = 8'((p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) >>> 3);
        p_out[1] = 8'((p2 + p1 + p0 + q0 + 2) >>> 2);
        p_out[2] = 8'((2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) >>> 3);
      end else begin
        p_out[0] = 8'((2 * p1 + p0 + q1 + 2) >>> 2);
      end
      if (!chroma && aq < beta && iabs(p0 - q0) < ((alpha >>> 2) + 2)) begin
        q_out[0] = 8'((p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) >>> 3);
        q_out[1] = 8'((p0 + q0 + q1 + q2 + 2) >>> 2);
        q_out[2] = 8'((2 * q3 + 3 * q2 + q1 + q0 + p0 + 4) >>> 3);
      end else begin
        q_out[0] = 8'((2 * q1 + q0 + p1 + 2) >>> 2);
      end
    end
  end
endmodule
