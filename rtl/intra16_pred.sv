// intra16_pred: whole-macroblock intra prediction, 16x16 luma or 8x8 chroma.
//
// Four modes, numbered as in the bitstream: for luma (CHROMA = 0)
// 0 vertical, 1 horizontal, 2 DC, 3 plane; for chroma (CHROMA = 1,
// intra_chroma_pred_mode) 0 DC, 1 horizontal, 2 vertical, 3 plane.
// It uses the N samples above (top), the N to the left (left) and the one
// above-left (corner), with their availability. One call gives four
// horizontally adjacent predicted samples, row y, columns 4*quad..4*quad+3,
// which is the unit the prediction module consumes each cycle.
//  * luma DC averages the 32 (or 16) available neighbours, else 128;
//  * chroma DC is worked out per 4x4 chroma block, with the H.264 rule of
//    which side each block prefers;
//  * plane fits a gradient: H and V are weighted differences across the
//    edges, b = (5H + 32) >> 6 (luma) or (34H + 32) >> 6 (chroma), and
//    pred = clip((a + b(x - c0) + c(y - c0) + 16) >> 5).
// Purely combinational.
module intra16_pred #(
  parameter bit CHROMA = 1'b0,
  localparam int N = CHROMA ? 8 : 16
) (
  input  logic [1:0]         mode,
  input  logic [N-1:0][7:0]  top,
  input  logic [N-1:0][7:0]  left,
  input  logic [7:0]         corner,
  input  logic               top_av,
  input  logic               left_av,
  input  logic [3:0]         y,
  input  logic [1:0]         quad,
  output logic [3:0][7:0]    pred
);
  logic [1:0] m;   // normalised: 0 vertical, 1 horizontal, 2 DC, 3 plane
  always_comb begin
    unique case (mode)
      2'd0: m = CHROMA ? 2'd2 : 2'd0;
      2'd2: m = CHROMA ? 2'd0 : 2'd2;
      default: m = mode;
    endcase
  end

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  always_comb begin
    logic signed [31:0] h, vv, a, b, c, sum_t, sum_l, dc, x, half, bx, by, st4, sl4;
    half = N / 2;
    h = 0; vv = 0;
    for (int i = 0; i < half; i++) begin
      h  += (i + 1) * (int'(top[half + i])  - ((half - 2 - i) < 0 ? int'(corner) : int'(top[half - 2 - i])));
      vv += (i + 1) * (int'(left[half + i]) - ((half - 2 - i) < 0 ? int'(corner) : int'(left[half - 2 - i])));
    end
    a = 16 * (int'(left[N-1]) + int'(top[N-1]));
    if (CHROMA) begin b = (34 * h + 32) >>> 6; c = (34 * vv + 32) >>> 6; end
    else        begin b = (5 * h + 32) >>> 6;  c = (5 * vv + 32) >>> 6;  end
    sum_t = 0; sum_l = 0;
    for (int i = 0; i < N; i++) begin sum_t += int'(top[i]); sum_l += int'(left[i]); end
    // luma DC over the whole macroblock
    if (top_av && left_av) dc = (sum_t + sum_l + N) >> (CHROMA ? 4 : 5);
    else if (left_av)      dc = (sum_l + N / 2) >> (CHROMA ? 3 : 4);
    else if (top_av)       dc = (sum_t + N / 2) >> (CHROMA ? 3 : 4);
    else                   dc = 128;
    // chroma DC per 4x4 block
    if (CHROMA) begin
      bx = int'(quad); by = int'(y) / 4;
      st4 = 0; sl4 = 0;
      for (int i = 0; i < 4; i++) begin
        st4 += int'(top[4*bx + i]);
        sl4 += int'(left[4*by + i]);
      end
      if ((bx == 0 && by == 0) || (bx == 1 && by == 1)) begin
        if (top_av && left_av) dc = (st4 + sl4 + 4) >> 3;
        else if (left_av)      dc = (sl4 + 2) >> 2;
        else if (top_av)       dc = (st4 + 2) >> 2;
        else                   dc = 128;
      end else if (bx == 1) begin            // top-right block prefers the top
        if (top_av)            dc = (st4 + 2) >> 2;
        else if (left_av)      dc = (sl4 + 2) >> 2;
        else                   dc = 128;
      end else begin                         // bottom-left block prefers the left
        if (left_av)           dc = (sl4 + 2) >> 2;
        else if (top_av)       dc = (st4 + 2) >> 2;
        else                   dc = 128;
      end
    end
    for (int i = 0; i < 4; i++) begin
      x = 4 * int'(quad) + i;
      unique case (m)
        2'd0: pred[i] = top[x];
        2'd1: pred[i] = left[y];
        2'd2: pred[i] = 8'(dc);
        default: pred[i] = 8'(clip((a + b * (x - (half - 1)) + c * (int'(y) - (half - 1)) + 16) >>> 5));
      endcase
    end
  end
endmodule
