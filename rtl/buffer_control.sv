// buffer_control: owns the frame buffer. It writes decoded pictures into
// it, reads finished pictures out to the decoder output, keeps the
// reference picture lists and maps the interpolator's reference-sample
// requests onto frame-buffer addresses.
//
// The frame buffer is split into NUM_SLOTS slots of 2^SLOT_W words; a slot
// holds one picture: the luma plane, then Cb, then Cr, each raster ordered,
// four samples per word. freeSlots is a bit mask of unused slots.
//  inputing   B_PIC takes a free slot for the new picture; each B_BLK (one
//             4x4 block) becomes four word writes; B_END_PIC starts the
//             output and then the reference marking.
//  output     the whole picture is read through load port 1 in raster
//             order, Y then Cb then Cr, one word per cycle, the last word
//             flagged.
//  marking    a reference picture enters the short-term list (sliding
//             window: the oldest entry leaves and frees its slot once
//             NUM_SLOTS-1 references are held; an IDR picture empties the
//             list first). A non-reference picture frees its slot.
//  refPicList initialisation orders the short-term list newest first.
//  interReq   a request (ref_idx, plane, word column, row) is looked up in
//             refPicList and sent to load port 2; its answer is returned
//             unchanged [interLumaReq, interChromaReq, interResp].
// The long-term list and reordering commands are not handled. Input stalls
// while a picture is being output.
module buffer_control
  import h264_pkg::*;
#(
  parameter int unsigned FB_ADDR_W = 22,
  parameter int unsigned SLOT_W    = 20,
  localparam int unsigned NUM_SLOTS = 2**(FB_ADDR_W - SLOT_W)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  blk_item_t            in_item,
  // frame buffer store
  output logic                 st_valid,
  input  logic                 st_ready,
  output logic [FB_ADDR_W-1:0] st_addr,
  output logic [31:0]          st_data,
  // frame buffer load 1 (output)
  output logic                 ld1_req_valid,
  input  logic                 ld1_req_ready,
  output logic [FB_ADDR_W-1:0] ld1_addr,
  input  logic                 ld1_resp_valid,
  output logic                 ld1_resp_ready,
  input  logic [31:0]          ld1_resp_data,
  // frame buffer load 2 (reference samples)
  output logic                 ld2_req_valid,
  input  logic                 ld2_req_ready,
  output logic [FB_ADDR_W-1:0] ld2_addr,
  input  logic                 ld2_resp_valid,
  output logic                 ld2_resp_ready,
  input  logic [31:0]          ld2_resp_data,
  // inter-prediction requests
  input  logic                 ireq_valid,
  output logic                 ireq_ready,
  input  logic [1:0]           ireq_ref_idx,
  input  logic [1:0]           ireq_plane,
  input  logic [8:0]           ireq_xw,
  input  logic [10:0]          ireq_y,
  output logic                 ires_valid,
  input  logic                 ires_ready,
  output logic [31:0]          ires_data,
  // decoded output
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [31:0]          out_data,
  output logic                 out_last,
  output logic                 out_eof,
  // state, for observation
  output logic [2:0]           num_short_term
);
  localparam int unsigned SLOT_IDX_W = (NUM_SLOTS > 1) ? $clog2(NUM_SLOTS) : 1;
  localparam int unsigned MAX_REF    = NUM_SLOTS - 1;

  typedef enum logic [2:0] {S_IN, S_STORE, S_OUTPUT, S_MARK, S_INIT_LIST, S_EOF} st_e;
  st_e st;

  logic [MBW_W-1:0]      w_mbs, h_mbs;
  logic                  nal_ref, idr;
  logic [NUM_SLOTS-1:0]  free_slots;
  logic [SLOT_IDX_W-1:0] cur_slot;
  logic [SLOT_IDX_W-1:0] short_list [MAX_REF];   // [0] is the oldest
  logic [2:0]            short_cnt;
  logic [SLOT_IDX_W-1:0] ref_list [MAX_REF];     // refPicList0, newest first
  logic [1:0]            wrow;
  blk_item_t             blk;
  logic [SLOT_W-1:0]     rd_ptr, rd_end;
  logic [SLOT_W-1:0]     resp_left;

  // picture geometry in words
  wire [SLOT_W-1:0] y_w     = SLOT_W'(w_mbs) * 4;    // words per luma row
  wire [SLOT_W-1:0] c_w     = SLOT_W'(w_mbs) * 2;    // words per chroma row
  wire [SLOT_W-1:0] y_size  = y_w * (SLOT_W'(h_mbs) * 16);
  wire [SLOT_W-1:0] c_size  = c_w * (SLOT_W'(h_mbs) * 8);

  function automatic logic [SLOT_W-1:0] plane_addr(input logic [1:0] pl, input logic [8:0] xw, input logic [10:0] yy,
                                                   input logic [SLOT_W-1:0] yw, input logic [SLOT_W-1:0] cw,
                                                   input logic [SLOT_W-1:0] ys, input logic [SLOT_W-1:0] cs);
    if (pl == 2'd0) return SLOT_W'(yy) * yw + SLOT_W'(xw);
    else if (pl == 2'd1) return ys + SLOT_W'(yy) * cw + SLOT_W'(xw);
    else return ys + cs + SLOT_W'(yy) * cw + SLOT_W'(xw);
  endfunction

  // lowest free slot
  logic [SLOT_IDX_W-1:0] first_free;
  always_comb begin
    first_free = '0;
    for (int i = NUM_SLOTS - 1; i >= 0; i--) if (free_slots[i]) first_free = SLOT_IDX_W'(i);
  end

  // ---- block stores ----
  assign st_valid = (st == S_STORE);
  assign st_addr  = {cur_slot, plane_addr(blk.plane, 9'(blk.bx), 11'(4 * blk.by + 10'(wrow)), y_w, c_w, y_size, c_size)};
  assign st_data  = {blk.s[4*wrow+3], blk.s[4*wrow+2], blk.s[4*wrow+1], blk.s[4*wrow]};
  assign in_ready = (st == S_IN);

  // ---- picture output through load port 1 ----
  assign ld1_req_valid  = (st == S_OUTPUT) && (rd_ptr != rd_end);
  assign ld1_addr       = {cur_slot, rd_ptr};
  assign out_valid      = ld1_resp_valid;
  assign out_data       = ld1_resp_data;
  assign out_last       = (resp_left == 1);
  assign ld1_resp_ready = out_ready;
  assign out_eof        = (st == S_EOF);

  // ---- inter requests through load port 2 ----
  assign ld2_req_valid  = ireq_valid;
  assign ireq_ready     = ld2_req_ready;
  assign ld2_addr       = {ref_list[ireq_ref_idx < 2'(MAX_REF) ? ireq_ref_idx : 2'd0],
                           plane_addr(ireq_plane, ireq_xw, ireq_y, y_w, c_w, y_size, c_size)};
  assign ires_valid     = ld2_resp_valid;
  assign ires_data      = ld2_resp_data;
  assign ld2_resp_ready = ires_ready;

  assign num_short_term = short_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_IN; w_mbs <= 8'd1; h_mbs <= 8'd1; nal_ref <= 1'b0; idr <= 1'b0;
      free_slots <= '1; cur_slot <= '0; short_cnt <= '0; wrow <= '0; blk <= '0;
      rd_ptr <= '0; rd_end <= '0; resp_left <= '0;
      for (int i = 0; i < MAX_REF; i++) begin short_list[i] <= '0; ref_list[i] <= '0; end
    end else begin
      unique case (st)
        S_IN: if (in_valid) begin
          unique case (in_item.tag)
            B_PIC: begin
              w_mbs <= in_item.w_mbs; h_mbs <= in_item.h_mbs;
              nal_ref <= in_item.nal_ref; idr <= in_item.idr;
              cur_slot <= first_free;
              free_slots[first_free] <= 1'b0;
            end
            B_BLK: begin blk <= in_item; wrow <= '0; st <= S_STORE; end
            B_END_PIC: begin
              rd_ptr <= '0; rd_end <= y_size + 2 * c_size; resp_left <= y_size + 2 * c_size;
              st <= S_OUTPUT;
            end
            default: st <= S_EOF;
          endcase
        end
        S_STORE: if (st_ready) begin
          wrow <= wrow + 1'b1;
          if (wrow == 2'd3) st <= S_IN;
        end
        S_OUTPUT: begin
          if (ld1_req_valid && ld1_req_ready) rd_ptr <= rd_ptr + 1'b1;
          if (ld1_resp_valid && out_ready) begin
            resp_left <= resp_left - 1'b1;
            if (resp_left == 1) st <= S_MARK;
          end
        end
        S_MARK: begin
          if (!nal_ref) free_slots[cur_slot] <= 1'b1;
          else if (idr) begin
            // every other slot becomes free, the list holds only this picture
            free_slots <= '1;
            free_slots[cur_slot] <= 1'b0;
            short_list[0] <= cur_slot;
            short_cnt <= 3'd1;
          end else if (short_cnt == 3'(MAX_REF)) begin
            free_slots[short_list[0]] <= 1'b1;
            for (int i = 0; i < MAX_REF - 1; i++) short_list[i] <= short_list[i+1];
            short_list[MAX_REF-1] <= cur_slot;
          end else begin
            short_list[2'(short_cnt)] <= cur_slot;
            short_cnt <= short_cnt + 1'b1;
          end
          st <= S_INIT_LIST;
        end
        S_INIT_LIST: begin
          // default refPicList0 of a P slice: short-term pictures, newest first
          for (int i = 0; i < MAX_REF; i++)
            ref_list[i] <= (3'(i) < short_cnt) ? short_list[2'(short_cnt - 3'(i) - 3'd1)] : short_list[0];
          st <= S_IN;
        end
        default: ;
      endcase
    end
  end
endmodule
