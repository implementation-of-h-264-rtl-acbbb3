// prediction: intra prediction of each macroblock and reconstruction
// (prediction + residual), feeding the deblocking filter.
//
// Flow for one macroblock (rules of the original design in brackets):
//  1. A P_MB header arrives [passing]; it is forwarded to the deblocking
//     filter as D_MB. If there is a macroblock row above, its bottom samples
//     and 4x4 modes (17 words) and the first four samples of the macroblock
//     above-right (2 words) are read from the row memory [intraSendReq,
//     intraReceiveResp]. Neighbours to the left are kept in registers.
//  2. The residual (96 P_RES items: 16 luma 4x4 blocks in z-scan order, then
//     4 Cb and 4 Cr blocks, one row of four samples per item) or the raw
//     I_PCM samples (96 P_PCM items, raster order per plane) are consumed one
//     item per cycle [passing + intraProcessStep]. For each item four
//     prediction samples are formed, added to the residual and clipped; the
//     result is written to the reconstruction registers (which later 4x4
//     blocks predict from) and sent on as one D_SAMP item.
//       Intra_4x4: the block's mode is derived when its first row is handled
//       [intraPredTypeStep]: the smaller of the left and upper blocks' modes
//       (2 when either is missing or not 4x4-coded), replaced by the coded
//       rem_intra4x4_pred_mode unless prev_intra4x4_pred_mode_flag is set.
//       Intra_16x16 and chroma: whole-macroblock modes (intra16_pred).
//  3. The bottom row (16 luma, 8 Cb, 8 Cr samples, packed two per 16-bit
//     word) and the bottom 4x4 modes are written back to the row memory, and
//     the right column moves into the left-neighbour registers.
// Row memory layout: 17 words per macroblock column, 2176 words (4.25 KiB)
// for 128 columns. Timing: about 19 cycles of loading, 96 of processing and
// 17 of storing per macroblock.
// Inter prediction (motion vectors, interpolation, frame-buffer reads) is
// not part of this module.
module prediction
  import h264_pkg::*;
#(
  parameter int unsigned OUT_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  pipe_item_t  in_item,
  output logic        out_valid,
  input  logic        out_ready,
  output dbk_item_t   out_item,
  // row memory client (memP_intra)
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output mem_op_e     mem_req_op,
  output logic [11:0] mem_req_addr,
  output logic [15:0] mem_req_data,
  input  logic        mem_resp_valid,
  output logic        mem_resp_ready,
  input  logic [15:0] mem_resp_data
);
  typedef enum logic [1:0] {S_PASS, S_LOAD, S_RUN, S_STORE} st_e;
  st_e st;

  logic [MBW_W-1:0] w_mbs, mb_x, mb_y;
  mb_kind_e   mb_kind;
  logic [1:0] i16_mode, chroma_mode;
  logic [63:0] i4_syntax;
  logic [6:0] cnt;
  logic [4:0] req_i, resp_i;

  logic [7:0] rec_y  [16][16];          // [y][x]
  logic [7:0] rec_c  [2][8][8];         // [plane][y][x]
  logic [3:0] cur_modes [4][4];         // [by][bx]
  logic [15:0][7:0] top_y, left_y;
  logic [1:0][7:0][7:0] top_c, left_c;  // [plane][i]
  logic [3:0][7:0] tr_y;
  logic [7:0] tl_y;
  logic [1:0][7:0] tl_c;
  logic [3:0][3:0] top_modes, left_modes;

  wire top_av  = (mb_y != 0);
  wire left_av = (mb_x != 0);
  wire tr_mb_av = top_av && (mb_x != w_mbs - 1'b1);

  // output register feeding the FIFO
  logic      emit_valid, enq_ready;
  dbk_item_t emit_item;
  fifo #(.T(dbk_item_t), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .enq_valid(emit_valid), .enq_ready(enq_ready), .enq_data(emit_item),
    .deq_valid(out_valid), .deq_ready(out_ready), .deq_data(out_item)
  );
  wire out_free = !emit_valid || enq_ready;

  // ---------------- where the current item lands ----------------
  logic [1:0] plane;     // 0 Y, 1 Cb, 2 Cr
  logic [3:0] y;
  logic [1:0] quad;
  logic [3:0] blk;       // luma blkIdx (z-scan)
  logic [1:0] bx, by, r;
  always_comb begin
    logic [6:0] c;
    plane = (cnt < 7'd64) ? 2'd0 : (cnt < 7'd80) ? 2'd1 : 2'd2;
    c     = (cnt < 7'd64) ? cnt : (cnt < 7'd80) ? cnt - 7'd64 : cnt - 7'd80;
    blk   = c[5:2];
    r     = c[1:0];
    bx    = {blk[2], blk[0]};
    by    = {blk[3], blk[1]};
    if (mb_kind == MB_IPCM) begin
      if (plane == 0) begin y = c[5:2]; quad = c[1:0]; end
      else begin y = {1'b0, c[3:1]}; quad = {1'b0, c[0]}; end
    end else if (plane == 0) begin
      y = {by, r}; quad = bx;
    end else begin
      y = {1'b0, c[3], r}; quad = {1'b0, c[2]};
    end
  end

  // ---------------- Intra_4x4 neighbours and mode ----------------
  logic [7:0][7:0] n_top;
  logic [3:0][7:0] n_left;
  logic [7:0]      n_corner;
  logic            n_top_av, n_tr_av, n_left_av;
  logic [3:0]      mode_a, mode_b, pred_mode, blk_mode;
  logic            a_av, b_av;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      n_top[i]  = (by != 0) ? rec_y[4*by-1][4*bx+i] : top_y[4*bx+i];
      n_left[i] = (bx != 0) ? rec_y[4*by+i][4*bx-1] : left_y[4*by+i];
      if (bx == 2'd3)     n_top[4+i] = (by == 0) ? tr_y[i] : 8'd0;
      else if (by != 0)   n_top[4+i] = rec_y[4*by-1][4*bx+4+i];
      else                n_top[4+i] = top_y[4*bx+4+i];
    end
    if (bx != 0 && by != 0) n_corner = rec_y[4*by-1][4*bx-1];
    else if (bx != 0)       n_corner = top_y[4*bx-1];
    else if (by != 0)       n_corner = left_y[4*by-1];
    else                    n_corner = tl_y;
    n_top_av  = (by != 0) || top_av;
    n_left_av = (bx != 0) || left_av;
    unique case (blk)
      4'd3, 4'd7, 4'd11, 4'd13, 4'd15: n_tr_av = 1'b0;
      4'd5:                            n_tr_av = tr_mb_av;
      4'd0, 4'd1, 4'd4:                n_tr_av = top_av;
      default:                         n_tr_av = 1'b1;
    endcase
    a_av   = n_left_av;
    b_av   = n_top_av;
    mode_a = (bx != 0) ? cur_modes[by][bx-1] : left_modes[by];
    mode_b = (by != 0) ? cur_modes[by-1][bx] : top_modes[bx];
    if (!a_av || !b_av)       pred_mode = 4'd2;
    else                      pred_mode = (mode_a < mode_b) ? mode_a : mode_b;
    if (i4_syntax[4*blk+3])   blk_mode = pred_mode;
    else if ({1'b0, i4_syntax[4*blk +: 3]} < pred_mode) blk_mode = {1'b0, i4_syntax[4*blk +: 3]};
    else                      blk_mode = {1'b0, i4_syntax[4*blk +: 3]} + 4'd1;
  end

  logic [15:0][7:0] p4;
  intra4x4_pred u_i4 (
    .mode(blk_mode), .top(n_top), .left(n_left), .corner(n_corner),
    .top_av(n_top_av), .topright_av(n_tr_av), .left_av(n_left_av), .pred(p4)
  );

  logic [3:0][7:0] p16, pc;
  intra16_pred #(.CHROMA(1'b0)) u_i16 (
    .mode(i16_mode), .top(top_y), .left(left_y), .corner(tl_y),
    .top_av(top_av), .left_av(left_av), .y(y), .quad(quad), .pred(p16)
  );
  wire cp = (plane == 2'd2);
  intra16_pred #(.CHROMA(1'b1)) u_ic (
    .mode(chroma_mode), .top(top_c[cp]), .left(left_c[cp]), .corner(tl_c[cp]),
    .top_av(top_av), .left_av(left_av), .y(y), .quad(quad), .pred(pc)
  );

  // reconstructed samples of this item
  logic [3:0][7:0] recon;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      logic [7:0] p;
      if (plane != 0)               p = pc[i];
      else if (mb_kind == MB_I4x4)  p = p4[4*r+i];
      else                          p = p16[i];
      if (mb_kind == MB_IPCM) recon[i] = in_item.s[i][7:0];
      else recon[i] = clip1(18'(signed'({10'd0, p})) + 18'(signed'(in_item.s[i])));
    end
  end

  // ---------------- row memory requests ----------------
  // load list: 0..16 the macroblock above, 17..18 the two first words above-right
  wire        load_en   = (req_i <= 5'd16) ? top_av : tr_mb_av;
  wire [11:0] load_addr = (req_i <= 5'd16) ? 12'(mb_x * 17 + req_i) : 12'((mb_x + 1) * 17 + (req_i - 5'd17));
  logic [15:0] store_word;
  always_comb begin
    if (req_i < 5'd8)       store_word = {rec_y[15][2*req_i+1], rec_y[15][2*req_i]};
    else if (req_i < 5'd12) store_word = {rec_c[0][7][2*(req_i-8)+1], rec_c[0][7][2*(req_i-8)]};
    else if (req_i < 5'd16) store_word = {rec_c[1][7][2*(req_i-12)+1], rec_c[1][7][2*(req_i-12)]};
    else                    store_word = {cur_modes[3][3], cur_modes[3][2], cur_modes[3][1], cur_modes[3][0]};
  end
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_op    = MEM_LOAD;
    mem_req_addr  = load_addr;
    mem_req_data  = store_word;
    if (st == S_LOAD && req_i <= 5'd18 && load_en) mem_req_valid = 1'b1;
    if (st == S_STORE) begin
      mem_req_valid = 1'b1;
      mem_req_op    = MEM_STORE;
      mem_req_addr  = 12'(mb_x * 17 + req_i);
    end
  end
  assign mem_resp_ready = (st == S_LOAD);
  wire resp_en = (resp_i <= 5'd16) ? top_av : tr_mb_av;

  assign in_ready = out_free && (st == S_PASS || st == S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_PASS; w_mbs <= 8'd1; mb_x <= '0; mb_y <= '0;
      mb_kind <= MB_I4x4; i16_mode <= '0; chroma_mode <= '0; i4_syntax <= '0;
      cnt <= '0; req_i <= '0; resp_i <= '0;
      emit_valid <= 1'b0; emit_item <= '0;
      top_y <= '0; left_y <= '0; top_c <= '0; left_c <= '0; tr_y <= '0; tl_y <= '0; tl_c <= '0;
      top_modes <= '0; left_modes <= '0;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) cur_modes[i][j] <= 4'd2;
    end else begin
      if (emit_valid && enq_ready) emit_valid <= 1'b0;
      unique case (st)
        S_PASS: if (in_valid && out_free) begin
          emit_valid <= 1'b1;
          emit_item  <= '0;
          unique case (in_item.tag)
            P_PIC: begin
              emit_item.tag <= D_PIC; emit_item.w_mbs <= in_item.w_mbs; emit_item.h_mbs <= in_item.h_mbs;
              emit_item.nal_ref <= in_item.nal_ref; emit_item.idr <= in_item.idr;
              w_mbs <= in_item.w_mbs; mb_x <= '0; mb_y <= '0;
            end
            P_SLICE: begin
              emit_item.tag <= D_SLICE; emit_item.dbk_idc <= in_item.dbk_idc;
              emit_item.alpha_off <= in_item.alpha_off; emit_item.beta_off <= in_item.beta_off;
              emit_item.chroma_qp_off <= in_item.chroma_qp_off;
            end
            P_MB: begin
              emit_item.tag <= D_MB; emit_item.qp <= in_item.qp; emit_item.pcm <= (in_item.mb_kind == MB_IPCM);
              mb_kind <= in_item.mb_kind; i16_mode <= in_item.i16_mode;
              chroma_mode <= in_item.chroma_mode; i4_syntax <= in_item.i4_syntax;
              req_i <= '0; resp_i <= '0; cnt <= '0;
              for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) cur_modes[i][j] <= 4'd2;
              st <= S_LOAD;
            end
            P_END_PIC: emit_item.tag <= D_END_PIC;
            P_EOF:     emit_item.tag <= D_EOF;
            default:   emit_valid <= 1'b0;          // nothing else is expected here
          endcase
        end
        S_LOAD: begin
          if (req_i <= 5'd18 && (!load_en || mem_req_ready)) req_i <= req_i + 1'b1;
          if (resp_i <= 5'd18 && !resp_en) resp_i <= resp_i + 1'b1;
          else if (resp_i <= 5'd18 && mem_resp_valid) begin
            if (resp_i < 5'd8)       {top_y[2*resp_i+1], top_y[2*resp_i]} <= mem_resp_data;
            else if (resp_i < 5'd12) {top_c[0][2*(resp_i-8)+1], top_c[0][2*(resp_i-8)]} <= mem_resp_data;
            else if (resp_i < 5'd16) {top_c[1][2*(resp_i-12)+1], top_c[1][2*(resp_i-12)]} <= mem_resp_data;
            else if (resp_i == 5'd16) top_modes <= mem_resp_data;
            else {tr_y[2*(resp_i-17)+1], tr_y[2*(resp_i-17)]} <= mem_resp_data;
            resp_i <= resp_i + 1'b1;
          end
          if (resp_i == 5'd19) st <= S_RUN;
        end
        S_RUN: if (in_valid && out_free) begin
          emit_valid <= 1'b1;
          emit_item  <= '0;
          emit_item.tag <= D_SAMP; emit_item.plane <= plane; emit_item.row <= y; emit_item.quad <= quad;
          emit_item.s <= recon;
          for (int i = 0; i < 4; i++) begin
            if (plane == 0) rec_y[y][4*quad+i] <= recon[i];
            else            rec_c[cp][y[2:0]][4*quad[0]+i] <= recon[i];
          end
          if (plane == 0 && mb_kind == MB_I4x4 && r == 2'd0) cur_modes[by][bx] <= blk_mode;
          cnt <= cnt + 1'b1;
          if (cnt == 7'd95) begin st <= S_STORE; req_i <= '0; end
        end
        S_STORE: if (mem_req_ready) begin
          req_i <= req_i + 1'b1;
          if (req_i == 5'd16) begin
            for (int i = 0; i < 16; i++) left_y[i] <= rec_y[i][15];
            for (int p = 0; p < 2; p++) for (int i = 0; i < 8; i++) left_c[p][i] <= rec_c[p][i][7];
            for (int i = 0; i < 4; i++) left_modes[i] <= cur_modes[i][3];
            tl_y <= top_y[15]; tl_c[0] <= top_c[0][7]; tl_c[1] <= top_c[1][7];
            if (mb_x == w_mbs - 1'b1) begin mb_x <= '0; mb_y <= mb_y + 1'b1; end
            else mb_x <= mb_x + 1'b1;
            st <= S_PASS;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
