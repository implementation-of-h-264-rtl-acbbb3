// inverse_trans: inverse quantisation and inverse transform of residuals.
//
// It sits between the entropy decoder and the prediction module and works
// on one process at a time as a small state machine:
//  passing   items other than coefficient data go straight through; a
//            macroblock header (P_MB) starts the residual sequence of the
//            macroblock unless it is I_PCM;
//  loading   a coefficient block (P_BLOCK, then P_COEF / P_ZEROS runs in
//            zig-zag order) is placed in workVector;
//  DC        Intra16x16 luma DC (4x4 Hadamard) and chroma DC (2x2) blocks
//            are transformed and scaled into storeVector, to be spread over
//            the 4x4 blocks they belong to;
//  scaling   each coefficient is multiplied by LevelScale (flat scaling
//            matrices: 16 * normAdjust) and shifted by qP/6;
//  transform the 4x4 integer inverse transform (rows then columns, the
//            H.264 butterfly with the 1/2 factors done as shifts), then
//            (x + 32) >> 6;
//  output    the 4x4 residual leaves as four P_RES items, one row each.
// Every non-PCM macroblock yields 24 residual blocks: 16 luma in z-scan
// order, then Cb 0..3 and Cr 0..3; blocks that the coded_block_pattern
// leaves uncoded come out as zeros (plus the DC term where there is one).
// Cost per 4x4 block: loading (one cycle per input item), one cycle scale,
// one cycle transform, four cycles output.
module inverse_trans
  import h264_pkg::*;
#(
  parameter int unsigned OUT_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  pipe_item_t in_item,
  output logic       out_valid,
  input  logic       out_ready,
  output pipe_item_t out_item
);
  typedef enum logic [2:0] {S_PASS, S_NEXT, S_LOAD, S_SCALE, S_TRANS, S_OUT} st_e;
  st_e st;

  logic signed [15:0] work [16];        // raster order
  logic signed [15:0] res  [16];
  logic signed [15:0] store_y [16];     // luma DC, per blkIdx raster position
  logic signed [15:0] store_c [2][4];   // chroma DC, [plane][blk]
  logic [4:0]  job;                     // 0 luma DC, 1..16 luma, 17..18 chroma DC, 19..26 chroma AC
  logic [4:0]  pos;                     // zig-zag position being loaded
  logic [4:0]  pos_end;
  logic [1:0]  orow;
  mb_kind_e    mb_kind;
  logic [5:0]  cbp, qp;
  logic signed [4:0] cqp_off;

  // output register feeding the FIFO
  logic       emit_valid, enq_ready;
  pipe_item_t emit_item;
  fifo #(.T(pipe_item_t), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .enq_valid(emit_valid), .enq_ready(enq_ready), .enq_data(emit_item),
    .deq_valid(out_valid), .deq_ready(out_ready), .deq_data(out_item)
  );
  wire out_free = !emit_valid || enq_ready;

  function automatic logic [3:0] zigzag(input logic [3:0] i);
    logic [3:0] t [16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};
    return t[i];
  endfunction

  // normAdjust4x4 (H.264 8.5.9): v[m][0] both even, v[m][1] both odd, v[m][2] mixed
  function automatic int norm_adjust(input logic [2:0] m, input logic [1:0] r);
    int v [6][3] = '{'{10, 16, 13}, '{11, 18, 14}, '{13, 20, 16},
                     '{14, 23, 18}, '{16, 25, 20}, '{18, 29, 23}};
    return v[m][r];
  endfunction
  function automatic int pos_class(input int p);
    int x = p % 4, y = p / 4;
    if ((x % 2 == 0) && (y % 2 == 0)) return 0;
    if ((x % 2 == 1) && (y % 2 == 1)) return 1;
    return 2;
  endfunction

  // ---- job description ----
  logic       is_luma_blk, is_cdc, is_cac, job_coded, job_has_dc;
  logic [3:0] blk;              // blkIdx within its plane
  logic       cplane;
  logic [5:0] job_qp;
  always_comb begin
    is_luma_blk = (job >= 5'd1 && job <= 5'd16);
    is_cdc      = (job == 5'd17 || job == 5'd18);
    is_cac      = (job >= 5'd19);
    blk         = is_luma_blk ? 4'(job - 5'd1) : is_cac ? {2'b00, 2'(job - 5'd19)} : 4'd0;
    cplane      = is_cdc ? (job == 5'd18) : (job >= 5'd23);
    job_has_dc  = (is_luma_blk && mb_kind == MB_I16x16) || is_cac;
    if (job == 5'd0)      job_coded = (mb_kind == MB_I16x16);
    else if (is_luma_blk) job_coded = (mb_kind == MB_I16x16) ? (cbp[3:0] != 0) : cbp[{1'b0, blk[3:2]}];
    else if (is_cdc)      job_coded = (cbp[5:4] != 0);
    else                  job_coded = (cbp[5:4] == 2'd2);
    job_qp = (is_cdc || is_cac) ? chroma_qp(qp, cqp_off) : qp;
  end

  // ---- combinational scaling and transforms ----
  logic signed [15:0] scaled [16];
  logic signed [15:0] trans  [16];
  logic signed [15:0] dcy    [16];
  logic signed [15:0] dcc    [4];
  always_comb begin
    logic signed [31:0] q6, qm, t[16], u[16], e, f, g, h, ls;
    q6 = int'(job_qp) / 6;
    qm = int'(job_qp) % 6;
    // AC scaling (DC position taken from storeVector where it applies)
    for (int i = 0; i < 16; i++)
      scaled[i] = 16'((int'(work[i]) * norm_adjust(3'(qm), 2'(pos_class(i)))) <<< q6);
    if (job_has_dc)
      scaled[0] = is_cac ? store_c[cplane][blk[1:0]] : store_y[{blk[3], blk[1], blk[2], blk[0]}];
    // 4x4 inverse transform on work (already scaled): rows, then columns
    for (int r = 0; r < 4; r++) begin
      e = int'(work[4*r]) + int'(work[4*r+2]);
      f = int'(work[4*r]) - int'(work[4*r+2]);
      g = (int'(work[4*r+1]) >>> 1) - int'(work[4*r+3]);
      h = int'(work[4*r+1]) + (int'(work[4*r+3]) >>> 1);
      t[4*r] = e + h; t[4*r+1] = f + g; t[4*r+2] = f - g; t[4*r+3] = e - h;
    end
    for (int c = 0; c < 4; c++) begin
      e = t[c] + t[8+c];
      f = t[c] - t[8+c];
      g = (t[4+c] >>> 1) - t[12+c];
      h = t[4+c] + (t[12+c] >>> 1);
      u[c] = e + h; u[4+c] = f + g; u[8+c] = f - g; u[12+c] = e - h;
    end
    for (int i = 0; i < 16; i++) trans[i] = 16'((u[i] + 32) >>> 6);
    // luma DC: 4x4 Hadamard, then scale
    for (int r = 0; r < 4; r++) begin
      e = int'(work[4*r]) + int'(work[4*r+1]); f = int'(work[4*r]) - int'(work[4*r+1]);
      g = int'(work[4*r+2]) + int'(work[4*r+3]); h = int'(work[4*r+2]) - int'(work[4*r+3]);
      t[4*r] = e + g; t[4*r+1] = f + h; t[4*r+2] = f - h; t[4*r+3] = e - g;
    end
    for (int c = 0; c < 4; c++) begin
      e = t[c] + t[4+c]; f = t[c] - t[4+c];
      g = t[8+c] + t[12+c]; h = t[8+c] - t[12+c];
      u[c] = e + g; u[4+c] = f + h; u[8+c] = f - h; u[12+c] = e - g;
    end
    ls = 16 * norm_adjust(3'(qm), 2'd0);
    for (int i = 0; i < 16; i++)
      if (q6 >= 6) dcy[i] = 16'((u[i] * ls) <<< (q6 - 6));
      else         dcy[i] = 16'((u[i] * ls + (1 <<< (5 - q6))) >>> (6 - q6));
    // chroma DC: 2x2 Hadamard, then scale
    e = int'(work[0]) + int'(work[1]); f = int'(work[0]) - int'(work[1]);
    g = int'(work[2]) + int'(work[3]); h = int'(work[2]) - int'(work[3]);
    dcc[0] = 16'((((e + g) * ls) <<< q6) >>> 5);
    dcc[1] = 16'((((f + h) * ls) <<< q6) >>> 5);
    dcc[2] = 16'((((e - g) * ls) <<< q6) >>> 5);
    dcc[3] = 16'((((f - h) * ls) <<< q6) >>> 5);
  end

  wire in_take = in_valid && out_free;
  assign in_ready = (out_free && st == S_PASS) || st == S_LOAD;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_PASS; job <= '0; pos <= '0; pos_end <= '0; orow <= '0;
      mb_kind <= MB_I4x4; cbp <= '0; qp <= '0; cqp_off <= '0;
      emit_valid <= 1'b0; emit_item <= '0;
      for (int i = 0; i < 16; i++) begin work[i] <= '0; res[i] <= '0; store_y[i] <= '0; end
      for (int p = 0; p < 2; p++) for (int i = 0; i < 4; i++) store_c[p][i] <= '0;
    end else begin
      if (emit_valid && enq_ready) emit_valid <= 1'b0;
      unique case (st)
        S_PASS: if (in_take) begin
          emit_valid <= 1'b1;
          emit_item  <= in_item;
          if (in_item.tag == P_SLICE) cqp_off <= in_item.chroma_qp_off;
          if (in_item.tag == P_MB) begin
            mb_kind <= in_item.mb_kind;
            cbp     <= in_item.cbp;
            qp      <= in_item.qp;
            job     <= (in_item.mb_kind == MB_I16x16) ? 5'd0 : 5'd1;
            for (int p = 0; p < 2; p++) for (int i = 0; i < 4; i++) store_c[p][i] <= '0;
            if (in_item.mb_kind != MB_IPCM) st <= S_NEXT;
          end
        end
        S_NEXT: begin
          for (int i = 0; i < 16; i++) work[i] <= '0;
          if (is_cdc && !job_coded) begin
            job <= 5'd19;                                // no chroma DC: straight to chroma AC
          end else if (job_coded) begin
            pos     <= (job_has_dc) ? 5'd1 : 5'd0;
            pos_end <= is_cdc ? 5'd4 : 5'd16;
            st      <= S_LOAD;
          end else st <= S_SCALE;
        end
        S_LOAD: if (in_valid) begin
          unique case (in_item.tag)
            P_BLOCK: ;
            P_COEF: begin
              if (is_cdc) work[pos[3:0]] <= in_item.coef;
              else        work[zigzag(pos[3:0])] <= in_item.coef;
              pos <= pos + 1'b1;
              if (pos + 1'b1 >= pos_end) st <= S_SCALE;
            end
            P_ZEROS: begin
              pos <= pos + in_item.count;
              if (pos + in_item.count >= pos_end) st <= S_SCALE;
            end
            default: ;
          endcase
        end
        S_SCALE: begin
          if (job == 5'd0) begin
            for (int i = 0; i < 16; i++) store_y[i] <= dcy[i];
            job <= 5'd1; st <= S_NEXT;
          end else if (is_cdc) begin
            for (int i = 0; i < 4; i++) store_c[cplane][i] <= dcc[i];
            job <= job + 1'b1; st <= S_NEXT;
          end else begin
            for (int i = 0; i < 16; i++) work[i] <= scaled[i];
            st <= S_TRANS;
          end
        end
        S_TRANS: begin
          for (int i = 0; i < 16; i++) res[i] <= trans[i];
          orow <= '0;
          st <= S_OUT;
        end
        S_OUT: if (out_free) begin
          emit_valid <= 1'b1;
          emit_item  <= '0;
          emit_item.tag <= P_RES;
          for (int c = 0; c < 4; c++) emit_item.s[c] <= res[4*orow + c];
          orow <= orow + 1'b1;
          if (orow == 2'd3) begin
            if (job == 5'd26) st <= S_PASS;
            else begin job <= job + 1'b1; st <= S_NEXT; end
          end
        end
        default: ;
      endcase
    end
  end
endmodule
