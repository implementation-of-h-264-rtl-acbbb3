// entropy_dec: parser and entropy decoder.
//
// It consumes the unwrapped NAL units, reads the one-byte NAL header, and
// parses sequence parameter sets, picture parameter sets and coded slices of
// I pictures down to macroblock level. Parsed parameters and data go out as
// one ordered stream of pipe_item_t (P_PIC, P_SLICE, P_MB, P_PCM, P_BLOCK,
// P_ZEROS, P_END_PIC, P_EOF). Other NAL unit types (SEI, delimiters, filler)
// are skipped.
//
// Structure, as in a rule-based design with one action per cycle:
//  * a 64-bit bit buffer, first bit in bit 63, with a bit count; the fill
//    action appends one byte when at least 8 bits are free;
//  * the parser action (when fill cannot act) decodes one syntax element with
//    the Exp-Golomb decoder or a fixed-length read, shifts the used bits out
//    and moves the state machine; it may emit one output item;
//  * calc_nc keeps the neighbouring total_coeff counts (row above in an
//    external memory module) and gives nC for the coeff_token table choice.
//
// Coverage of the macroblock layer: I_PCM, and I_4x4 / I_16x16 macroblocks
// whose residual blocks have no non-zero coefficients (coeff_token with
// TotalCoeff = 0, decoded for every nC class and chroma DC). A coeff_token
// announcing coefficients, a P/B slice, CABAC, slice groups or picture order
// type 1 raise `error` and halt parsing. Zero coefficients leave as a run
// (P_ZEROS) rather than one by one. Syntax elements are limited to 16-bit
// values, decoded in one cycle.
module entropy_dec
  import h264_pkg::*;
#(
  parameter int unsigned OUT_DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  nal_item_t        in_item,
  output logic             out_valid,
  input  logic             out_ready,
  output pipe_item_t       out_item,
  output logic             error,
  // memory client for calc_nc (row above)
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output mem_op_e          mem_req_op,
  output logic [6:0]       mem_req_addr,
  output logic [39:0]      mem_req_data,
  input  logic             mem_resp_valid,
  output logic             mem_resp_ready,
  input  logic [39:0]      mem_resp_data
);
  typedef enum logic [4:0] {
    ST_START, ST_NEWUNIT, ST_SPS, ST_PPS, ST_SLICE_HDR, ST_MB_START, ST_MB_TYPE,
    ST_I4_MODES, ST_CHROMA_MODE, ST_CBP, ST_QP_DELTA, ST_EMIT_MB, ST_PCM_ALIGN,
    ST_PCM, ST_RESIDUAL, ST_MB_END, ST_DONE, ST_ERROR
  } state_e;

  state_e      state;
  logic [63:0] buffer;
  logic [6:0]  bufcount;
  logic [4:0]  step;

  // sequence / picture parameters
  logic [4:0]        log2_max_frame_num, log2_max_poc_lsb;
  logic [1:0]        poc_type;
  logic [MBW_W-1:0]  w_mbs, h_mbs;
  logic              pic_order_present, dbk_ctrl_present, redundant_present;
  logic signed [6:0] pic_init_qp;
  logic signed [4:0] chroma_qp_off;
  // slice
  logic [1:0]        nal_ref_idc;
  logic              idr;
  logic [5:0]        qp;
  logic [1:0]        dbk_idc;
  logic signed [4:0] alpha_off, beta_off;
  // macroblock
  logic [MBW_W-1:0]  mb_x, mb_y;
  logic [15:0]       mb_left;
  mb_kind_e          mb_kind;
  logic [1:0]        i16_mode, chroma_mode;
  logic [5:0]        cbp;
  logic [63:0]       i4_syntax;
  logic [6:0]        cnt;           // PCM word / residual slot counter
  logic              sub;           // second cycle of a two-item emission

  // ---------------- output register and FIFO ----------------
  logic       emit_valid, enq_ready;
  pipe_item_t emit_item;
  fifo #(.T(pipe_item_t), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .enq_valid(emit_valid), .enq_ready(enq_ready), .enq_data(emit_item),
    .deq_valid(out_valid), .deq_ready(out_ready), .deq_data(out_item)
  );
  wire out_free = !emit_valid || enq_ready;

  // ---------------- Exp-Golomb and fixed reads ----------------
  logic               eg_ok;
  logic [5:0]         eg_len;
  logic [15:0]        ue;
  logic signed [16:0] se;
  exp_golomb u_eg (.bits(buffer[63:31]), .ok(eg_ok), .len(eg_len), .code_num(ue), .se_val(se));

  // ---------------- nC context ----------------
  logic       nc_start, nc_ready, nc_set, nc_finish, nc_busy;
  logic [4:0] nc_set_blk, nc_set_count, nc_query, nc;
  calc_nc u_nc (
    .clk, .rst_n, .start(nc_start), .mb_x(mb_x), .mb_y(mb_y), .ready(nc_ready),
    .set(nc_set), .set_blk(nc_set_blk), .set_count(nc_set_count),
    .query_blk(nc_query), .nc(nc), .finish(nc_finish), .busy(nc_busy),
    .mem_req_valid, .mem_req_ready, .mem_req_op, .mem_req_addr, .mem_req_data,
    .mem_resp_valid, .mem_resp_ready, .mem_resp_data
  );

  // intra coded_block_pattern mapping, codeNum -> cbp (H.264 Table 9-4, intra column)
  function automatic logic [5:0] intra_cbp(input logic [5:0] k);
    logic [5:0] t [48] = '{47,31,15,0,23,27,29,30,7,11,13,14,39,43,45,46,16,3,5,10,12,19,21,26,
                           28,35,37,42,44,1,2,4,8,17,18,20,24,6,9,22,25,32,33,34,36,40,38,41};
    return (k < 48) ? t[k] : 6'd0;
  endfunction

  // ---------------- residual slot decoding ----------------
  // slot 0: Intra16x16 DC; 1..16: luma 4x4 (blkIdx slot-1); 17,18: chroma DC
  // Cb, Cr; 19..26: chroma AC (Cb 0..3, Cr 0..3).
  logic       slot_coded, slot_is_luma_blk, slot_is_chroma_ac, slot_is_cdc;
  blk_kind_e  slot_kind;
  logic [4:0] slot_ncount;
  always_comb begin
    slot_is_luma_blk  = (cnt >= 7'd1 && cnt <= 7'd16);
    slot_is_chroma_ac = (cnt >= 7'd19 && cnt <= 7'd26);
    slot_is_cdc       = (cnt == 7'd17 || cnt == 7'd18);
    slot_coded  = 1'b0;
    slot_kind   = BLK_LUMA4x4;
    slot_ncount = 5'd16;
    nc_query    = 5'd0;
    if (cnt == 7'd0) begin
      slot_coded = (mb_kind == MB_I16x16);
      slot_kind  = BLK_LUMA_DC;
    end else if (slot_is_luma_blk) begin
      nc_query = 5'(cnt - 7'd1);
      if (mb_kind == MB_I16x16) begin
        slot_coded  = (cbp[3:0] != 0);
        slot_kind   = BLK_LUMA_AC;
        slot_ncount = 5'd15;
      end else begin
        slot_coded = cbp[{1'b0, nc_query[3:2]}];
      end
    end else if (slot_is_cdc) begin
      slot_coded  = (cbp[5:4] != 0);
      slot_kind   = BLK_CHROMA_DC;
      slot_ncount = 5'd4;
    end else begin
      nc_query    = 5'(cnt - 7'd3);
      slot_coded  = (cbp[5:4] == 2'd2);
      slot_kind   = BLK_CHROMA_AC;
      slot_ncount = 5'd15;
    end
  end

  // coeff_token meaning TotalCoeff = 0, TrailingOnes = 0, per nC class
  logic       tok_zero;
  logic [2:0] tok_len;
  always_comb begin
    if (slot_is_cdc)          begin tok_len = 3'd2; tok_zero = buffer[63:62] == 2'b01;       end
    else if (nc < 5'd2)       begin tok_len = 3'd1; tok_zero = buffer[63];                   end
    else if (nc < 5'd4)       begin tok_len = 3'd2; tok_zero = buffer[63:62] == 2'b11;       end
    else if (nc < 5'd8)       begin tok_len = 3'd4; tok_zero = buffer[63:60] == 4'b1111;     end
    else                      begin tok_len = 3'd6; tok_zero = buffer[63:58] == 6'b000011;   end
  end

  // ---------------- action selection ----------------
  wire in_byte   = in_valid && in_item.tag == NAL_RBSP_BYTE;
  wire in_parse  = !(state inside {ST_START, ST_NEWUNIT, ST_DONE, ST_ERROR});
  wire do_fill   = (in_parse || state == ST_NEWUNIT) && in_byte && bufcount <= 7'd56;
  wire have_bits = bufcount >= 7'd33 || (in_valid && in_item.tag != NAL_RBSP_BYTE);
  wire do_parse  = in_parse && !do_fill && have_bits && out_free;

  // the start rule consumes whatever is left of the previous unit
  wire start_deq = state == ST_START && in_valid && out_free && in_item.tag != NAL_END_OF_FILE;
  assign in_ready = do_fill || start_deq;
  assign error    = (state == ST_ERROR);

  function automatic pipe_item_t blank();
    pipe_item_t it = '0;
    return it;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_START; buffer <= '0; bufcount <= '0; step <= '0;
      log2_max_frame_num <= 5'd4; log2_max_poc_lsb <= 5'd4; poc_type <= '0;
      w_mbs <= '0; h_mbs <= '0; pic_order_present <= 1'b0; dbk_ctrl_present <= 1'b0;
      redundant_present <= 1'b0; pic_init_qp <= 7'sd26; chroma_qp_off <= '0;
      nal_ref_idc <= '0; idr <= 1'b0; qp <= 6'd26; dbk_idc <= '0; alpha_off <= '0; beta_off <= '0;
      mb_x <= '0; mb_y <= '0; mb_left <= '0; mb_kind <= MB_I4x4; i16_mode <= '0; chroma_mode <= '0;
      cbp <= '0; i4_syntax <= '0; cnt <= '0; sub <= 1'b0;
      emit_valid <= 1'b0; emit_item <= '0;
      nc_start <= 1'b0; nc_set <= 1'b0; nc_finish <= 1'b0; nc_set_blk <= '0; nc_set_count <= '0;
    end else begin
      nc_start  <= 1'b0;
      nc_set    <= 1'b0;
      nc_finish <= 1'b0;
      if (emit_valid && enq_ready) emit_valid <= 1'b0;

      if (do_fill) begin
        buffer   <= buffer | ({56'd0, in_item.data} << (7'd56 - bufcount));
        bufcount <= bufcount + 7'd8;
      end

      // ---- startup: skip the rest of the last unit, catch the next one ----
      if (state == ST_START && in_valid && out_free) begin
        if (in_item.tag == NAL_END_OF_FILE) begin
          emit_valid <= 1'b1; emit_item <= blank(); emit_item.tag <= P_EOF;
          state <= ST_DONE;
        end else if (in_item.tag == NAL_NEW_UNIT) begin
          buffer <= '0; bufcount <= '0; state <= ST_NEWUNIT;
        end
      end

      // ---- NAL header: needs the first byte, fills it directly ----
      if (state == ST_NEWUNIT) begin
        if (bufcount >= 7'd8 && !do_fill) begin
          nal_ref_idc <= buffer[62:61];
          buffer   <= buffer << 8;
          bufcount <= bufcount - 7'd8;
          step     <= '0;
          unique case (buffer[60:56])
            5'd7:       state <= ST_SPS;
            5'd8:       state <= ST_PPS;
            5'd1, 5'd5: begin state <= ST_SLICE_HDR; idr <= (buffer[60:56] == 5'd5); end
            default:    state <= ST_START;     // SEI, delimiters, end of sequence/stream, filler
          endcase
        end
      end

      if (do_parse) begin : parse
        logic [6:0] used;
        used = '0;
        unique case (state)
          // ------------------------------------------------ SPS
          ST_SPS: begin
            step <= step + 1'b1;
            unique case (step)
              0, 1, 2: used = 7'd8;                         // profile, constraints, level
              3: used = 7'(eg_len);                         // seq_parameter_set_id
              4: begin used = 7'(eg_len); log2_max_frame_num <= 5'(ue + 16'd4); end
              5: begin used = 7'(eg_len); poc_type <= ue[1:0];
                       if (ue == 16'd1) state <= ST_ERROR; end
              6: begin if (poc_type == 2'd0) begin used = 7'(eg_len); log2_max_poc_lsb <= 5'(ue + 16'd4); end end
              7: used = 7'(eg_len);                         // num_ref_frames
              8: used = 7'd1;                               // gaps_in_frame_num_allowed
              9: begin used = 7'(eg_len); w_mbs <= MBW_W'(ue + 16'd1); end
              10: begin used = 7'(eg_len); h_mbs <= MBW_W'(ue + 16'd1); end
              11: used = 7'd1;                              // frame_mbs_only (1 assumed)
              12: used = 7'd1;                              // direct_8x8_inference
              default: state <= ST_START;                   // cropping and VUI are not used
            endcase
          end
          // ------------------------------------------------ PPS
          ST_PPS: begin
            step <= step + 1'b1;
            unique case (step)
              0, 1: used = 7'(eg_len);                      // pps id, sps id
              2: begin used = 7'd1; if (buffer[63]) state <= ST_ERROR; end   // CABAC
              3: begin used = 7'd1; pic_order_present <= buffer[63]; end
              4: begin used = 7'(eg_len); if (ue != 0) state <= ST_ERROR; end // slice groups
              5, 6: used = 7'(eg_len);                      // num_ref_idx_l0/l1_active_minus1
              7: used = 7'd1;                               // weighted_pred_flag
              8: used = 7'd2;                               // weighted_bipred_idc
              9: begin used = 7'(eg_len); pic_init_qp <= 7'(se + 17'sd26); end
              10: used = 7'(eg_len);                        // pic_init_qs
              11: begin used = 7'(eg_len); chroma_qp_off <= 5'(se); end
              12: begin used = 7'd1; dbk_ctrl_present <= buffer[63]; end
              13: used = 7'd1;                              // constrained_intra_pred
              14: begin used = 7'd1; redundant_present <= buffer[63]; end
              default: state <= ST_START;
            endcase
          end
          // ------------------------------------------------ slice header
          ST_SLICE_HDR: begin
            step <= step + 1'b1;
            unique case (step)
              0: begin used = 7'(eg_len); mb_left <= 16'(w_mbs) * 16'(h_mbs) - ue;
                       mb_x <= MBW_W'(ue % 16'(w_mbs)); mb_y <= MBW_W'(ue / 16'(w_mbs)); end
              1: begin used = 7'(eg_len); if (ue != 16'd2 && ue != 16'd7) state <= ST_ERROR; end
              2: used = 7'(eg_len);                         // pic_parameter_set_id
              3: used = 7'(log2_max_frame_num);             // frame_num
              4: if (idr) used = 7'(eg_len);                // idr_pic_id
              5: if (poc_type == 2'd0) used = 7'(log2_max_poc_lsb);
              6: if (poc_type == 2'd0 && pic_order_present) used = 7'(eg_len);
              7: if (redundant_present) used = 7'(eg_len);
              8: if (nal_ref_idc != 0) begin               // dec_ref_pic_marking
                   if (idr) used = 7'd2;
                   else begin used = 7'd1; if (buffer[63]) state <= ST_ERROR; end
                 end
              9: begin used = 7'(eg_len); qp <= 6'(7'(pic_init_qp) + 7'(se)); end
              10: begin dbk_idc <= '0; alpha_off <= '0; beta_off <= '0;
                        if (dbk_ctrl_present) begin used = 7'(eg_len); dbk_idc <= ue[1:0]; end end
              11: if (dbk_ctrl_present && dbk_idc != 2'd1) begin used = 7'(eg_len); alpha_off <= 5'(se <<< 1); end
              12: if (dbk_ctrl_present && dbk_idc != 2'd1) begin used = 7'(eg_len); beta_off <= 5'(se <<< 1); end
              13: begin
                emit_valid <= 1'b1; emit_item <= blank();
                emit_item.tag <= P_PIC; emit_item.w_mbs <= w_mbs; emit_item.h_mbs <= h_mbs;
                emit_item.nal_ref <= (nal_ref_idc != 0); emit_item.idr <= idr;
              end
              default: begin
                emit_valid <= 1'b1; emit_item <= blank();
                emit_item.tag <= P_SLICE; emit_item.dbk_idc <= dbk_idc;
                emit_item.alpha_off <= alpha_off; emit_item.beta_off <= beta_off;
                emit_item.chroma_qp_off <= chroma_qp_off; emit_item.qp <= qp;
                state <= ST_MB_START;
              end
            endcase
          end
          // ------------------------------------------------ macroblock layer
          ST_MB_START: if (!nc_busy) begin
            nc_start <= 1'b1;
            state    <= ST_MB_TYPE;
          end
          ST_MB_TYPE: begin
            used = 7'(eg_len);
            cbp <= '0; cnt <= '0; sub <= 1'b0; step <= '0;
            if (ue == 16'd0) begin
              mb_kind <= MB_I4x4; state <= ST_I4_MODES;
            end else if (ue <= 16'd24) begin
              mb_kind     <= MB_I16x16;
              i16_mode    <= 2'((ue - 16'd1) % 16'd4);
              cbp[5:4]    <= 2'(((ue - 16'd1) / 16'd4) % 16'd3);
              cbp[3:0]    <= (ue >= 16'd13) ? 4'hf : 4'h0;
              state       <= ST_CHROMA_MODE;
            end else if (ue == 16'd25) begin
              mb_kind <= MB_IPCM; state <= ST_EMIT_MB;
            end else state <= ST_ERROR;
          end
          ST_I4_MODES: begin
            // prev_intra4x4_pred_mode_flag, then rem_intra4x4_pred_mode if 0
            used = buffer[63] ? 7'd1 : 7'd4;
            i4_syntax[4*step +: 4] <= buffer[63] ? 4'b1000 : {1'b0, buffer[62:60]};
            step <= step + 1'b1;
            if (step == 5'd15) state <= ST_CHROMA_MODE;
          end
          ST_CHROMA_MODE: begin
            used = 7'(eg_len);
            chroma_mode <= ue[1:0];
            state <= (mb_kind == MB_I4x4) ? ST_CBP : ST_QP_DELTA;
          end
          ST_CBP: begin
            used = 7'(eg_len);
            cbp   <= intra_cbp(ue[5:0]);
            state <= (intra_cbp(ue[5:0]) != 0) ? ST_QP_DELTA : ST_EMIT_MB;
          end
          ST_QP_DELTA: begin
            used  = 7'(eg_len);
            qp    <= 6'((8'(qp) + 8'(se) + 8'd52) % 8'd52);
            state <= ST_EMIT_MB;
          end
          ST_EMIT_MB: begin
            emit_valid <= 1'b1; emit_item <= blank();
            emit_item.tag <= P_MB; emit_item.mb_kind <= mb_kind; emit_item.i16_mode <= i16_mode;
            emit_item.chroma_mode <= chroma_mode; emit_item.cbp <= cbp;
            emit_item.qp <= (mb_kind == MB_IPCM) ? 6'd0 : qp;   // an I_PCM macroblock filters with qp 0
            emit_item.i4_syntax <= i4_syntax;
            state <= (mb_kind == MB_IPCM) ? ST_PCM_ALIGN : ST_RESIDUAL;
          end
          ST_PCM_ALIGN: begin
            used = {4'd0, bufcount[2:0]};                   // pcm_alignment_zero_bits
            state <= ST_PCM;
          end
          ST_PCM: begin
            used = 7'd32;
            emit_valid <= 1'b1; emit_item <= blank();
            emit_item.tag <= P_PCM;
            for (int i = 0; i < 4; i++) emit_item.s[i] <= {8'd0, buffer[63-8*i -: 8]};
            if (cnt < 7'd24) begin nc_set <= 1'b1; nc_set_blk <= cnt[4:0]; nc_set_count <= 5'd16; end
            cnt <= cnt + 1'b1;
            if (cnt == 7'd95) state <= ST_MB_END;
          end
          ST_RESIDUAL: if (nc_ready) begin
            if (!slot_coded) begin
              if (slot_is_luma_blk || slot_is_chroma_ac) begin
                nc_set <= 1'b1; nc_set_blk <= nc_query; nc_set_count <= '0;
              end
              cnt <= cnt + 1'b1;
              if (cnt == 7'd26) state <= ST_MB_END;
            end else if (!sub) begin
              if (!tok_zero) state <= ST_ERROR;            // coefficients present
              else begin
                used = 7'(tok_len);
                emit_valid <= 1'b1; emit_item <= blank();
                emit_item.tag <= P_BLOCK; emit_item.blk_kind <= slot_kind; emit_item.count <= slot_ncount;
                if (slot_is_luma_blk || slot_is_chroma_ac) begin
                  nc_set <= 1'b1; nc_set_blk <= nc_query; nc_set_count <= '0;
                end
                sub <= 1'b1;
              end
            end else begin
              emit_valid <= 1'b1; emit_item <= blank();
              emit_item.tag <= P_ZEROS; emit_item.count <= slot_ncount;
              sub <= 1'b0;
              cnt <= cnt + 1'b1;
              if (cnt == 7'd26) state <= ST_MB_END;
            end
          end
          ST_MB_END: begin
            nc_finish <= 1'b1;
            mb_left   <= mb_left - 1'b1;
            if (mb_x == w_mbs - 1'b1) begin mb_x <= '0; mb_y <= mb_y + 1'b1; end
            else mb_x <= mb_x + 1'b1;
            if (mb_left == 16'd1) begin
              emit_valid <= 1'b1; emit_item <= blank(); emit_item.tag <= P_END_PIC;
              state <= ST_START;
            end else state <= ST_MB_START;
          end
          default: ;
        endcase
        buffer   <= buffer << used;
        bufcount <= bufcount - used;
      end
    end
  end
endmodule
