// h264_pkg: types and constants shared by the decoder pipeline.
//
// Every stage of the decoder talks to the next one through a FIFO carrying
// a tagged item: a tag enum plus the fields that tag uses (unused fields are
// zero). This mirrors the single ordered stream of parameters and data that
// runs from the NAL unwrapper to the buffer control, so the parsing order of
// all parameters is preserved down the pipeline.
//
//   nal_item_t   NAL unwrapper   -> entropy decoder
//   pipe_item_t  entropy decoder -> inverse transform -> prediction
//   dbk_item_t   prediction      -> deblocking filter
//   blk_item_t   deblocking      -> buffer control
//
// Samples travel four per item (32 bits), the width of one frame-buffer word.
// The maximum frame width of 2048 samples (128 macroblocks) sizes the row
// memories; this follows the memory sizes quoted for each memory module.
package h264_pkg;

  localparam int unsigned MAX_MBW    = 128;   // 2048 samples wide
  localparam int unsigned MAX_MBH    = 68;    // 1088 lines high
  localparam int unsigned MBW_W      = 8;     // bits of a macroblock column/row index

  // ---------------- NAL unwrapper output ----------------
  typedef enum logic [1:0] {NAL_NEW_UNIT, NAL_RBSP_BYTE, NAL_END_OF_FILE} nal_tag_e;
  typedef struct packed {
    nal_tag_e   tag;
    logic [7:0] data;
  } nal_item_t;

  // ---------------- entropy decoder / inverse transform output ----------------
  typedef enum logic [1:0] {MB_I4x4, MB_I16x16, MB_IPCM} mb_kind_e;

  // residual block kinds coming out of CAVLC
  typedef enum logic [2:0] {BLK_LUMA4x4, BLK_LUMA_DC, BLK_LUMA_AC, BLK_CHROMA_DC, BLK_CHROMA_AC} blk_kind_e;

  typedef enum logic [3:0] {
    P_PIC,       // w_mbs, h_mbs, nal_ref, idr
    P_SLICE,     // slice parameters for prediction and deblocking
    P_MB,        // macroblock header
    P_PCM,       // four raw PCM samples
    P_BLOCK,     // start of a coefficient block (blk_kind, coeff count)
    P_COEF,      // one coefficient, in zig-zag order
    P_ZEROS,     // a run of zero coefficients (count)
    P_RES,       // four residual samples (one row of a 4x4 block)
    P_END_PIC,   // last macroblock of a picture has been sent
    P_EOF        // end of the stream
  } pipe_tag_e;

  typedef struct packed {
    pipe_tag_e          tag;
    // P_PIC
    logic [MBW_W-1:0]   w_mbs;
    logic [MBW_W-1:0]   h_mbs;
    logic               nal_ref;
    logic               idr;
    // P_SLICE
    logic [1:0]         dbk_idc;        // disable_deblocking_filter_idc
    logic signed [4:0]  alpha_off;      // FilterOffsetA
    logic signed [4:0]  beta_off;       // FilterOffsetB
    logic signed [4:0]  chroma_qp_off;
    // P_MB
    mb_kind_e           mb_kind;
    logic [1:0]         i16_mode;       // Intra16x16PredMode
    logic [1:0]         chroma_mode;    // intra_chroma_pred_mode
    logic [5:0]         cbp;            // {chroma[1:0], luma[3:0]}
    logic [5:0]         qp;             // QP_Y of the macroblock
    logic [63:0]        i4_syntax;      // per 4x4 block: {prev_flag, rem[2:0]}
    // P_BLOCK / P_COEF / P_ZEROS
    blk_kind_e          blk_kind;
    logic [4:0]         count;
    logic signed [15:0] coef;
    // P_PCM / P_RES: four samples (PCM: unsigned 8 bit; RES: signed 16 bit)
    logic [3:0][15:0]   s;
  } pipe_item_t;

  // ---------------- prediction -> deblocking ----------------
  typedef enum logic [2:0] {D_PIC, D_SLICE, D_MB, D_SAMP, D_END_PIC, D_EOF} dbk_tag_e;
  typedef struct packed {
    dbk_tag_e           tag;
    logic [MBW_W-1:0]   w_mbs;
    logic [MBW_W-1:0]   h_mbs;
    logic               nal_ref;
    logic               idr;
    logic [1:0]         dbk_idc;
    logic signed [4:0]  alpha_off;
    logic signed [4:0]  beta_off;
    logic signed [4:0]  chroma_qp_off;
    logic [5:0]         qp;             // D_MB
    logic               pcm;            // D_MB
    logic [1:0]         plane;          // D_SAMP: 0 Y, 1 Cb, 2 Cr
    logic [3:0]         row;            // D_SAMP: row in the macroblock plane
    logic [1:0]         quad;           // D_SAMP: which 4 columns
    logic [3:0][7:0]    s;
  } dbk_item_t;

  // ---------------- deblocking -> buffer control ----------------
  typedef enum logic [1:0] {B_PIC, B_BLK, B_END_PIC, B_EOF} blk_tag_e;
  typedef struct packed {
    blk_tag_e           tag;
    logic [MBW_W-1:0]   w_mbs;          // B_PIC
    logic [MBW_W-1:0]   h_mbs;
    logic               nal_ref;
    logic               idr;
    logic [1:0]         plane;          // B_BLK
    logic [9:0]         bx;             // 4x4 block column in the plane
    logic [9:0]         by;             // 4x4 block row in the plane
    logic [15:0][7:0]   s;              // raster order inside the block
  } blk_item_t;

  // ---------------- memory module client-server ----------------
  typedef enum logic {MEM_LOAD, MEM_STORE} mem_op_e;

  function automatic logic [7:0] clip1(input logic signed [17:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  // chroma QP from QP_Y and the chroma offset (H.264 Table 8-15)
  function automatic logic [5:0] chroma_qp(input logic [5:0] qpy, input logic signed [4:0] off);
    int qpi;
    qpi = int'(qpy) + int'(off);
    if (qpi < 0) qpi = 0;
    if (qpi > 51) qpi = 51;
    if (qpi < 30) return 6'(qpi);
    case (qpi)
      30: return 29; 31: return 30; 32: return 31; 33: return 32; 34: return 32;
      35: return 33; 36: return 34; 37: return 34; 38: return 35; 39: return 35;
      40: return 36; 41: return 36; 42: return 37; 43: return 37; 44: return 37;
      45: return 38; 46: return 38; 47: return 38; default: return 39;
    endcase
  endfunction

endpackage
