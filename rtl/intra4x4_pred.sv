// intra4x4_pred: the nine 4x4 luma intra prediction modes.
//
// Inputs are the neighbouring decoded samples of the block (before
// deblocking): top[0..7] is the row above (A..H, the last four from the
// block above-right), left[0..3] the column to the left (I..L), corner the
// sample above-left (M), with their availability. The 16 predicted samples
// come out combinationally, raster order (pred[4*y + x]).
//   0 vertical, 1 horizontal, 2 DC, 3 diagonal down-left, 4 diagonal
//   down-right, 5 vertical-right, 6 horizontal-down, 7 vertical-left,
//   8 horizontal-up; formulas of H.264 8.3.1.2.
// When the above-right samples are missing but the row above exists, E..H
// repeat D. DC falls back to the available side, or 128 with neither.
module intra4x4_pred (
  input  logic [3:0]       mode,
  input  logic [7:0][7:0]  top,
  input  logic [3:0][7:0]  left,
  input  logic [7:0]       corner,
  input  logic             top_av,
  input  logic             topright_av,
  input  logic             left_av,
  output logic [15:0][7:0] pred
);
  // p(x, y) with x, y in -1..7: the neighbour samples
  function automatic int pt(input logic [7:0][7:0] t, input logic tr, input int x);
    if (x < 0) return -1;
    if (x >= 4 && !tr) return int'(t[3]);
    return int'(t[x]);
  endfunction

  always_comb begin
    logic signed [31:0] T [-1:7];
    logic signed [31:0] L [-1:3];
    logic signed [31:0] v, zvr, zhd, zhu, sum;
    pred = '0;
    T[-1] = int'(corner); L[-1] = int'(corner);
    for (int i = 0; i < 8; i++) T[i] = pt(top, topright_av, i);
    for (int i = 0; i < 4; i++) L[i] = int'(left[i]);
    for (int y = 0; y < 4; y++) begin
      for (int x = 0; x < 4; x++) begin
        v = 0; zvr = 0; zhd = 0; zhu = 0; sum = 0;
        unique case (mode)
          4'd0: v = T[x];
          4'd1: v = L[y];
          4'd2: begin
            sum = 0;
            if (top_av && left_av) begin
              for (int i = 0; i < 4; i++) sum += T[i] + L[i];
              v = (sum + 4) >> 3;
            end else if (left_av) begin
              for (int i = 0; i < 4; i++) sum += L[i];
              v = (sum + 2) >> 2;
            end else if (top_av) begin
              for (int i = 0; i < 4; i++) sum += T[i];
              v = (sum + 2) >> 2;
            end else v = 128;
          end
          4'd3: begin
            if (x == 3 && y == 3) v = (T[6] + 3 * T[7] + 2) >> 2;
            else                  v = (T[x+y] + 2 * T[x+y+1] + T[x+y+2] + 2) >> 2;
          end
          4'd4: begin
            if (x > y)      v = (T[x-y-2] + 2 * T[x-y-1] + T[x-y] + 2) >> 2;
            else if (x < y) v = (L[y-x-2] + 2 * L[y-x-1] + L[y-x] + 2) >> 2;
            else            v = (T[0] + 2 * T[-1] + L[0] + 2) >> 2;
          end
          4'd5: begin
            zvr = 2 * x - y;
            if (zvr >= 0 && zvr % 2 == 0) v = (T[x-(y>>1)-1] + T[x-(y>>1)] + 1) >> 1;
            else if (zvr > 0)             v = (T[x-(y>>1)-2] + 2 * T[x-(y>>1)-1] + T[x-(y>>1)] + 2) >> 2;
            else if (zvr == -1)           v = (L[0] + 2 * L[-1] + T[0] + 2) >> 2;
            else                          v = (L[y-1] + 2 * L[y-2] + L[y-3] + 2) >> 2;
          end
          4'd6: begin
            zhd = 2 * y - x;
            if (zhd >= 0 && zhd % 2 == 0) v = (L[y-(x>>1)-1] + L[y-(x>>1)] + 1) >> 1;
            else if (zhd > 0)             v = (L[y-(x>>1)-2] + 2 * L[y-(x>>1)-1] + L[y-(x>>1)] + 2) >> 2;
            else if (zhd == -1)           v = (L[0] + 2 * L[-1] + T[0] + 2) >> 2;
            else                          v = (T[x-1] + 2 * T[x-2] + T[x-3] + 2) >> 2;
          end
          4'd7: begin
            if (y % 2 == 0) v = (T[x+(y>>1)] + T[x+(y>>1)+1] + 1) >> 1;
            else            v = (T[x+(y>>1)] + 2 * T[x+(y>>1)+1] + T[x+(y>>1)+2] + 2) >> 2;
          end
          default: begin
            zhu = x + 2 * y;
            if (zhu > 5)             v = L[3];
            else if (zhu == 5)       v = (L[2] + 3 * L[3] + 2) >> 2;
            else if (zhu % 2 == 0)   v = (L[y+(x>>1)] + L[y+(x>>1)+1] + 1) >> 1;
            else                     v = (L[y+(x>>1)] + 2 * L[y+(x>>1)+1] + L[y+(x>>1)+2] + 2) >> 2;
          end
        endcase
        pred[4*y+x] = 8'(v);
      end
    end
  end
endmodule
