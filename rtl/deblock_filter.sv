// deblock_filter: macroblock deblocking filter.
//
// Per macroblock it works on a window of registers holding the new
// macroblock plus a 4-sample margin above it and to its left (workVector,
// topVector, leftVector): 20x20 luma and 12x12 per chroma plane.
//  passing/initialize  D_MB gives QP and I_PCM; the 96 D_SAMP items fill the
//            macroblock area. Meanwhile the bottom 4 rows of the macroblock
//            above (32 words, after all the filtering that can touch them
//            from their own row) and its QP are loaded from two memory
//            modules [dataSendReq, dataReceiveResp].
//  horizontal  vertical edges, left to right, one line of 8 samples per
//            cycle (deblock_edge): 4 luma edges x 16 lines, then for each
//            chroma plane 2 edges x 8 lines.
//  vertical  horizontal edges, top to bottom, the same way.
//  outputing 4x4 blocks that no later macroblock can change leave as B_BLK
//            items: the bottom blocks of the macroblock above, the right
//            column of the macroblock to the left, and the current interior.
//            Blocks on the current bottom row go to the row memory instead
//            (the macroblock below will filter across them); at the end of
//            a row the right column is flushed too [cleanup: in the last
//            macroblock row the bottom blocks are output, not stored].
//            The right 4 columns of the window become the left margin of
//            the next macroblock.
// Boundary strength: every macroblock reaching this module is intra coded,
// so bS = 4 on macroblock edges and 3 inside. disable_deblocking_filter_idc
// = 1 turns filtering off; the left/top macroblock edges are not filtered at
// picture borders. QP of an edge is the rounded average of both sides
// (chroma QP derived per side); I_PCM counts as QP 0.
// Cost: about 96 + 192 + 40..110 cycles per macroblock.
module deblock_filter
  import h264_pkg::*;
#(
  parameter int unsigned OUT_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  dbk_item_t   in_item,
  output logic        out_valid,
  input  logic        out_ready,
  output blk_item_t   out_item,
  // row memory for samples (memD_data): 32 words of 32 bits per column
  output logic        dmem_req_valid,
  input  logic        dmem_req_ready,
  output mem_op_e     dmem_req_op,
  output logic [11:0] dmem_req_addr,
  output logic [31:0] dmem_req_data,
  input  logic        dmem_resp_valid,
  output logic        dmem_resp_ready,
  input  logic [31:0] dmem_resp_data,
  // row memory for parameters (memD_parameter): QP per column
  output logic        pmem_req_valid,
  input  logic        pmem_req_ready,
  output mem_op_e     pmem_req_op,
  output logic [6:0]  pmem_req_addr,
  output logic [7:0]  pmem_req_data,
  input  logic        pmem_resp_valid,
  output logic        pmem_resp_ready,
  input  logic [7:0]  pmem_resp_data,
  // activity counters for tests
  output logic [31:0] lines_filtered
);
  typedef enum logic [2:0] {S_PASS, S_FILL, S_WAIT, S_FILTER, S_OUT} st_e;
  st_e st;

  logic [7:0] wy [20][20];             // luma window [y][x]
  logic [7:0] wc [2][12][12];          // chroma windows [plane][y][x]

  logic [MBW_W-1:0] w_mbs, h_mbs, mb_x, mb_y;
  logic [1:0]        idc;
  logic signed [4:0] a_off, b_off, cqp_off;
  logic [5:0]        cur_qp, left_qp, top_qp;
  logic [6:0]        cnt;
  logic [5:0]        req_i, resp_i;
  logic              ploaded;

  // ---------------- output register ----------------
  logic      emit_valid, enq_ready;
  blk_item_t emit_item;
  fifo #(.T(blk_item_t), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .enq_valid(emit_valid), .enq_ready(enq_ready), .enq_data(emit_item),
    .deq_valid(out_valid), .deq_ready(out_ready), .deq_data(out_item)
  );
  wire out_free = !emit_valid || enq_ready;

  wire top_av    = (mb_y != 0);
  wire left_av   = (mb_x != 0);
  wire last_col  = (mb_x == w_mbs - 1'b1);
  wire last_row  = (mb_y == h_mbs - 1'b1);

  // ---------------- filter sequencing ----------------
  // fstep: 0..63 luma vertical edges, 64..127 luma horizontal edges,
  // 128..191 chroma: plane = bit 5, direction = bit 4, edge = bit 3, line = bits 2:0
  logic [7:0] fstep;
  logic       f_chroma, f_horiz, f_plane;
  logic [1:0] f_edge;
  logic [3:0] f_line;
  logic [3:0][7:0] fp, fq, fp_o, fq_o;
  logic [2:0] f_bs;
  logic [5:0] f_ia, f_ib;
  logic       f_en, f_done;
  logic signed [31:0] qpp, qpq, qav;
  always_comb begin
    f_chroma = fstep[7];
    if (!f_chroma) begin
      f_horiz = fstep[6]; f_plane = 1'b0; f_edge = fstep[5:4]; f_line = fstep[3:0];
    end else begin
      f_plane = fstep[5]; f_horiz = fstep[4]; f_edge = {1'b0, fstep[3]}; f_line = {1'b0, fstep[2:0]};
    end
    for (int k = 0; k < 4; k++) begin
      if (!f_chroma) begin
        if (!f_horiz) begin
          fp[k] = wy[4+f_line][4+4*f_edge-1-k]; fq[k] = wy[4+f_line][4+4*f_edge+k];
        end else begin
          fp[k] = wy[4+4*f_edge-1-k][4+f_line]; fq[k] = wy[4+4*f_edge+k][4+f_line];
        end
      end else begin
        if (!f_horiz) begin
          fp[k] = wc[f_plane][4+f_line][4+4*f_edge-1-k]; fq[k] = wc[f_plane][4+f_line][4+4*f_edge+k];
        end else begin
          fp[k] = wc[f_plane][4+4*f_edge-1-k][4+f_line]; fq[k] = wc[f_plane][4+4*f_edge+k][4+f_line];
        end
      end
    end
    // which edges are filtered and how strongly
    if (idc == 2'd1)       f_en = 1'b0;
    else if (f_edge == 0)  f_en = f_horiz ? top_av : left_av;
    else                   f_en = 1'b1;
    f_bs = (f_edge == 0) ? 3'd4 : 3'd3;
    qpp = (f_edge != 0) ? int'(cur_qp) : f_horiz ? int'(top_qp) : int'(left_qp);
    qpq = int'(cur_qp);
    if (f_chroma) begin
      qpp = int'(chroma_qp(6'(qpp), cqp_off));
      qpq = int'(chroma_qp(6'(qpq), cqp_off));
    end
    qav  = (qpp + qpq + 1) >> 1;
    f_ia = 6'((qav + int'(a_off) < 0) ? 0 : (qav + int'(a_off) > 51) ? 51 : qav + int'(a_off));
    f_ib = 6'((qav + int'(b_off) < 0) ? 0 : (qav + int'(b_off) > 51) ? 51 : qav + int'(b_off));
    f_done = (fstep == 8'd191);
  end

  logic f_hit;
  deblock_edge u_edge (
    .p(fp), .q(fq), .bs(f_en ? f_bs : 3'd0), .index_a(f_ia), .index_b(f_ib), .chroma(f_chroma),
    .p_out(fp_o), .q_out(fq_o), .filtered(f_hit)
  );

  // ---------------- output / store job list ----------------
  // job 0..23 luma, 24..31 Cb, 32..39 Cr
  typedef struct packed {
    logic       en;
    logic       store;      // to the row memory instead of the output
    logic [2:0] wx, wy;     // 4x4 block position in the window
  } job_t;
  logic [5:0] job;
  logic [1:0] srow;          // row being stored
  job_t       jd;
  logic [1:0] j_plane;
  always_comb begin
    logic [4:0] k;
    j_plane = (job < 6'd24) ? 2'd0 : (job < 6'd32) ? 2'd1 : 2'd2;
    k  = (job < 6'd24) ? job[4:0] : (job < 6'd32) ? 5'(job - 6'd24) : 5'(job - 6'd32);
    jd = '0;
    if (j_plane == 0) begin
      if (k < 4)        jd = '{en: top_av, store: 1'b0, wx: 3'(1 + k), wy: 3'd0};
      else if (k < 7)   jd = '{en: left_av, store: 1'b0, wx: 3'd0, wy: 3'(k - 3)};
      else if (k == 7)  jd = '{en: left_av, store: !last_row, wx: 3'd0, wy: 3'd4};
      else if (k < 17)  jd = '{en: 1'b1, store: 1'b0, wx: 3'(1 + (k - 8) % 3), wy: 3'(1 + (k - 8) / 3)};
      else if (k < 20)  jd = '{en: 1'b1, store: !last_row, wx: 3'(k - 16), wy: 3'd4};
      else if (k < 23)  jd = '{en: last_col, store: 1'b0, wx: 3'd4, wy: 3'(k - 19)};
      else              jd = '{en: last_col, store: !last_row, wx: 3'd4, wy: 3'd4};
    end else begin
      if (k < 2)        jd = '{en: top_av, store: 1'b0, wx: 3'(1 + k), wy: 3'd0};
      else if (k == 2)  jd = '{en: left_av, store: 1'b0, wx: 3'd0, wy: 3'd1};
      else if (k == 3)  jd = '{en: left_av, store: !last_row, wx: 3'd0, wy: 3'd2};
      else if (k == 4)  jd = '{en: 1'b1, store: 1'b0, wx: 3'd1, wy: 3'd1};
      else if (k == 5)  jd = '{en: 1'b1, store: !last_row, wx: 3'd1, wy: 3'd2};
      else if (k == 6)  jd = '{en: last_col, store: 1'b0, wx: 3'd2, wy: 3'd1};
      else              jd = '{en: last_col, store: !last_row, wx: 3'd2, wy: 3'd2};
    end
  end
  logic [15:0][7:0] jblk;
  always_comb begin
    for (int yy = 0; yy < 4; yy++)
      for (int xx = 0; xx < 4; xx++)
        jblk[4*yy+xx] = (j_plane == 0) ? wy[4*jd.wy+yy][4*jd.wx+xx]
                                       : wc[j_plane == 2][4*jd.wy+yy][4*jd.wx+xx];
  end
  // row-memory word address of a stored block row: column, then plane/row/x-word
  logic [MBW_W-1:0] j_col;
  logic [4:0]       j_word;
  always_comb begin
    j_col  = (jd.wx == 0) ? mb_x - 1'b1 : mb_x;
    if (j_plane == 0) j_word = 5'(4 * srow) + 5'((jd.wx == 0) ? 3 : jd.wx - 1);
    else              j_word = 5'(16 + 8 * (j_plane - 1) + 2 * srow) + 5'((jd.wx == 0) ? 1 : jd.wx - 1);
  end

  // ---------------- memories ----------------
  always_comb begin
    dmem_req_valid = 1'b0;
    dmem_req_op    = MEM_LOAD;
    dmem_req_addr  = 12'({mb_x, 5'(req_i)});
    dmem_req_data  = {jblk[4*srow+3], jblk[4*srow+2], jblk[4*srow+1], jblk[4*srow]};
    if ((st == S_FILL || st == S_WAIT) && top_av && req_i < 6'd32) dmem_req_valid = 1'b1;
    if (st == S_OUT && job <= 6'd39 && jd.en && jd.store) begin
      dmem_req_valid = 1'b1;
      dmem_req_op    = MEM_STORE;
      dmem_req_addr  = 12'({j_col, j_word});
    end
  end
  assign dmem_resp_ready = (st == S_FILL || st == S_WAIT);
  always_comb begin
    pmem_req_valid = 1'b0;
    pmem_req_op    = MEM_LOAD;
    pmem_req_addr  = mb_x[6:0];
    pmem_req_data  = {2'b00, cur_qp};
    if ((st == S_FILL || st == S_WAIT) && top_av && !ploaded) pmem_req_valid = 1'b1;
    if (st == S_OUT && job == 6'd40 && !last_row) begin pmem_req_valid = 1'b1; pmem_req_op = MEM_STORE; end
  end
  assign pmem_resp_ready = 1'b1;

  // placement of an incoming D_SAMP in the window
  assign in_ready = out_free && (st == S_PASS || st == S_FILL);

  logic preq_sent;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_PASS; w_mbs <= 8'd1; h_mbs <= 8'd1; mb_x <= '0; mb_y <= '0;
      idc <= '0; a_off <= '0; b_off <= '0; cqp_off <= '0;
      cur_qp <= '0; left_qp <= '0; top_qp <= '0; cnt <= '0; req_i <= '0; resp_i <= '0;
      ploaded <= 1'b0; preq_sent <= 1'b0; fstep <= '0; job <= '0; srow <= '0;
      emit_valid <= 1'b0; emit_item <= '0; lines_filtered <= '0;
      for (int i = 0; i < 20; i++) for (int j = 0; j < 20; j++) wy[i][j] <= '0;
      for (int p = 0; p < 2; p++) for (int i = 0; i < 12; i++) for (int j = 0; j < 12; j++) wc[p][i][j] <= '0;
    end else begin
      if (emit_valid && enq_ready) emit_valid <= 1'b0;

      // loading the macroblock above (runs alongside S_FILL)
      if (st == S_FILL || st == S_WAIT) begin
        if (dmem_req_valid && dmem_req_ready) req_i <= req_i + 1'b1;
        if (pmem_req_valid && pmem_req_ready) begin preq_sent <= 1'b1; ploaded <= 1'b1; end
        if (preq_sent && pmem_resp_valid) begin top_qp <= pmem_resp_data[5:0]; preq_sent <= 1'b0; end
        if (dmem_resp_valid) begin
          for (int i = 0; i < 4; i++) begin
            if (resp_i < 6'd16) wy[resp_i[3:2]][4 + 4*resp_i[1:0] + i] <= dmem_resp_data[8*i +: 8];
            else wc[resp_i >= 6'd24][resp_i[2:1]][4 + 4*resp_i[0] + i] <= dmem_resp_data[8*i +: 8];
          end
          resp_i <= resp_i + 1'b1;
        end
      end

      unique case (st)
        S_PASS: if (in_valid && out_free) begin
          emit_item <= '0;
          unique case (in_item.tag)
            D_PIC: begin
              emit_valid <= 1'b1; emit_item.tag <= B_PIC;
              emit_item.w_mbs <= in_item.w_mbs; emit_item.h_mbs <= in_item.h_mbs;
              emit_item.nal_ref <= in_item.nal_ref; emit_item.idr <= in_item.idr;
              w_mbs <= in_item.w_mbs; h_mbs <= in_item.h_mbs; mb_x <= '0; mb_y <= '0;
            end
            D_SLICE: begin
              idc <= in_item.dbk_idc; a_off <= in_item.alpha_off; b_off <= in_item.beta_off;
              cqp_off <= in_item.chroma_qp_off;
            end
            D_MB: begin
              cur_qp <= in_item.pcm ? 6'd0 : in_item.qp;
              cnt <= '0; req_i <= '0; resp_i <= '0; ploaded <= 1'b0; preq_sent <= 1'b0;
              st <= S_FILL;
            end
            D_END_PIC: begin emit_valid <= 1'b1; emit_item.tag <= B_END_PIC; end
            D_EOF:     begin emit_valid <= 1'b1; emit_item.tag <= B_EOF; end
            default: ;
          endcase
        end
        S_FILL: if (in_valid) begin
          for (int i = 0; i < 4; i++) begin
            if (in_item.plane == 0) wy[4 + in_item.row][4 + 4*in_item.quad + i] <= in_item.s[i];
            else wc[in_item.plane == 2][4 + in_item.row[2:0]][4 + 4*in_item.quad[0] + i] <= in_item.s[i];
          end
          cnt <= cnt + 1'b1;
          if (cnt == 7'd95) st <= S_WAIT;
        end
        S_WAIT: begin
          if (!top_av || (resp_i == 6'd32 && ploaded && !preq_sent)) begin
            fstep <= '0;
            st <= S_FILTER;
          end
        end
        S_FILTER: begin
          for (int k = 0; k < 4; k++) begin
            if (!f_chroma) begin
              if (!f_horiz) begin
                wy[4+f_line][4+4*f_edge-1-k] <= fp_o[k]; wy[4+f_line][4+4*f_edge+k] <= fq_o[k];
              end else begin
                wy[4+4*f_edge-1-k][4+f_line] <= fp_o[k]; wy[4+4*f_edge+k][4+f_line] <= fq_o[k];
              end
            end else begin
              if (!f_horiz) begin
                wc[f_plane][4+f_line][4+4*f_edge-1-k] <= fp_o[k]; wc[f_plane][4+f_line][4+4*f_edge+k] <= fq_o[k];
              end else begin
                wc[f_plane][4+4*f_edge-1-k][4+f_line] <= fp_o[k]; wc[f_plane][4+4*f_edge+k][4+f_line] <= fq_o[k];
              end
            end
          end
          if (f_hit && f_en) lines_filtered <= lines_filtered + 1'b1;
          fstep <= fstep + 1'b1;
          if (f_done) begin st <= S_OUT; job <= '0; srow <= '0; end
        end
        S_OUT: begin
          if (job <= 6'd39) begin
            if (!jd.en) job <= job + 1'b1;
            else if (jd.store) begin
              if (dmem_req_ready) begin
                srow <= srow + 1'b1;
                if (srow == 2'd3) job <= job + 1'b1;
              end
            end else if (out_free) begin
              emit_valid <= 1'b1;
              emit_item  <= '0;
              emit_item.tag   <= B_BLK;
              emit_item.plane <= j_plane;
              emit_item.s     <= jblk;
              if (j_plane == 0) begin
                emit_item.bx <= 10'(4 * mb_x + jd.wx) - 10'd1;
                emit_item.by <= 10'(4 * mb_y + jd.wy) - 10'd1;
              end else begin
                emit_item.bx <= 10'(2 * mb_x + jd.wx) - 10'd1;
                emit_item.by <= 10'(2 * mb_y + jd.wy) - 10'd1;
              end
              job <= job + 1'b1;
            end
          end else if (job == 6'd40) begin
            if (last_row || pmem_req_ready) job <= job + 1'b1;
          end else begin
            // the right margin becomes the left margin of the next macroblock
            for (int i = 4; i < 20; i++) for (int j = 0; j < 4; j++) wy[i][j] <= wy[i][16+j];
            for (int p = 0; p < 2; p++) for (int i = 4; i < 12; i++) for (int j = 0; j < 4; j++) wc[p][i][j] <= wc[p][i][8+j];
            left_qp <= cur_qp;
            if (last_col) begin mb_x <= '0; mb_y <= mb_y + 1'b1; end
            else mb_x <= mb_x + 1'b1;
            st <= S_PASS;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
