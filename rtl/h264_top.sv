// h264_top: the decoder pipeline.
//
//   byte stream -> nal_unwrap -> entropy_dec -> inverse_trans -> prediction
//               -> deblock_filter -> buffer_control -> decoded pictures
//
// Every stage is joined to the next by a FIFO inside the producing stage
// and a valid/ready handshake, so the stages run concurrently and any stage
// may stall its neighbours. The memories sit outside the stages as separate
// client-server memory modules, as in the original design:
//   memED           nC context of the row above (entropy_dec), 40 bits x 128
//   memP_intra      bottom samples and 4x4 modes of the row above
//                   (prediction), 16 bits x 2176
//   memD_data       bottom 4x4 blocks of the row above (deblock_filter),
//                   32 bits x 4096
//   memD_parameter  qp of the row above (deblock_filter), 8 bits x 128
//   frame buffer    decoded pictures (buffer_control), 32 bits x 4M
// Input: one byte per handshake; in_eof with the handshake marks the end of
// the stream (no byte is taken with it). Output: each decoded picture is sent
// in display raster order, luma plane then Cb then Cr, four samples per
// 32-bit word (first sample in the low byte), out_last on the last word of
// a picture; out_eof rises once the stream has ended and everything is out.
// The inter-prediction path of buffer_control (reference-sample requests)
// has no client here because motion vector prediction and the interpolator
// are not built, so it is brought out as the ireq/ires ports.
module h264_top
  import h264_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_eof,
  input  logic [7:0]  in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_last,
  output logic        out_eof,
  input  logic        ireq_valid,
  output logic        ireq_ready,
  input  logic [1:0]  ireq_ref_idx,
  input  logic [1:0]  ireq_plane,
  input  logic [8:0]  ireq_xw,
  input  logic [10:0] ireq_y,
  output logic        ires_valid,
  input  logic        ires_ready,
  output logic [31:0] ires_data,
  output logic        error,
  output logic [31:0] lines_filtered,
  output logic [2:0]  num_short_term
);
  // stage links
  logic       nal_valid, nal_ready;   nal_item_t  nal_item;
  logic       ent_valid, ent_ready;   pipe_item_t ent_item;
  logic       it_valid,  it_ready;    pipe_item_t it_item;
  logic       pr_valid,  pr_ready;    dbk_item_t  pr_item;
  logic       df_valid,  df_ready;    blk_item_t  df_item;

  // memory ports
  logic        ed_req_valid, ed_req_ready, ed_resp_valid, ed_resp_ready;
  mem_op_e     ed_req_op;   logic [6:0]  ed_req_addr;  logic [39:0] ed_req_data, ed_resp_data;
  logic        pi_req_valid, pi_req_ready, pi_resp_valid, pi_resp_ready;
  mem_op_e     pi_req_op;   logic [11:0] pi_req_addr;  logic [15:0] pi_req_data, pi_resp_data;
  logic        dd_req_valid, dd_req_ready, dd_resp_valid, dd_resp_ready;
  mem_op_e     dd_req_op;   logic [11:0] dd_req_addr;  logic [31:0] dd_req_data, dd_resp_data;
  logic        dp_req_valid, dp_req_ready, dp_resp_valid, dp_resp_ready;
  mem_op_e     dp_req_op;   logic [6:0]  dp_req_addr;  logic [7:0]  dp_req_data, dp_resp_data;
  logic        st_valid, st_ready;  logic [21:0] st_addr;  logic [31:0] st_data;
  logic        l1_req_valid, l1_req_ready, l1_resp_valid, l1_resp_ready;
  logic [21:0] l1_addr;     logic [31:0] l1_resp_data;
  logic        l2_req_valid, l2_req_ready, l2_resp_valid, l2_resp_ready;
  logic [21:0] l2_addr;     logic [31:0] l2_resp_data;

  nal_unwrap u_nal_unwrap (
    .clk, .rst_n, .in_valid, .in_ready, .in_eof, .in_data,
    .out_valid(nal_valid), .out_ready(nal_ready), .out_item(nal_item));

  entropy_dec u_entropy_dec (
    .clk, .rst_n, .in_valid(nal_valid), .in_ready(nal_ready), .in_item(nal_item),
    .out_valid(ent_valid), .out_ready(ent_ready), .out_item(ent_item), .error,
    .mem_req_valid(ed_req_valid), .mem_req_ready(ed_req_ready), .mem_req_op(ed_req_op),
    .mem_req_addr(ed_req_addr), .mem_req_data(ed_req_data), .mem_resp_valid(ed_resp_valid),
    .mem_resp_ready(ed_resp_ready), .mem_resp_data(ed_resp_data));

  mem_module #(.ADDR_W(7), .DATA_W(40)) u_mem_ed (
    .clk, .rst_n, .req_valid(ed_req_valid), .req_ready(ed_req_ready), .req_op(ed_req_op),
    .req_addr(ed_req_addr), .req_data(ed_req_data), .resp_valid(ed_resp_valid),
    .resp_ready(ed_resp_ready), .resp_data(ed_resp_data));

  inverse_trans u_inverse_trans (
    .clk, .rst_n, .in_valid(ent_valid), .in_ready(ent_ready), .in_item(ent_item),
    .out_valid(it_valid), .out_ready(it_ready), .out_item(it_item));

  prediction u_prediction (
    .clk, .rst_n, .in_valid(it_valid), .in_ready(it_ready), .in_item(it_item),
    .out_valid(pr_valid), .out_ready(pr_ready), .out_item(pr_item),
    .mem_req_valid(pi_req_valid), .mem_req_ready(pi_req_ready), .mem_req_op(pi_req_op),
    .mem_req_addr(pi_req_addr), .mem_req_data(pi_req_data), .mem_resp_valid(pi_resp_valid),
    .mem_resp_ready(pi_resp_ready), .mem_resp_data(pi_resp_data));

  mem_module #(.ADDR_W(12), .DATA_W(16), .DEPTH(2176)) u_mem_p_intra (
    .clk, .rst_n, .req_valid(pi_req_valid), .req_ready(pi_req_ready), .req_op(pi_req_op),
    .req_addr(pi_req_addr), .req_data(pi_req_data), .resp_valid(pi_resp_valid),
    .resp_ready(pi_resp_ready), .resp_data(pi_resp_data));

  deblock_filter u_deblock_filter (
    .clk, .rst_n, .in_valid(pr_valid), .in_ready(pr_ready), .in_item(pr_item),
    .out_valid(df_valid), .out_ready(df_ready), .out_item(df_item),
    .dmem_req_valid(dd_req_valid), .dmem_req_ready(dd_req_ready), .dmem_req_op(dd_req_op),
    .dmem_req_addr(dd_req_addr), .dmem_req_data(dd_req_data), .dmem_resp_valid(dd_resp_valid),
    .dmem_resp_ready(dd_resp_ready), .dmem_resp_data(dd_resp_data),
    .pmem_req_valid(dp_req_valid), .pmem_req_ready(dp_req_ready), .pmem_req_op(dp_req_op),
    .pmem_req_addr(dp_req_addr), .pmem_req_data(dp_req_data), .pmem_resp_valid(dp_resp_valid),
    .pmem_resp_ready(dp_resp_ready), .pmem_resp_data(dp_resp_data),
    .lines_filtered);

  mem_module #(.ADDR_W(12), .DATA_W(32)) u_mem_d_data (
    .clk, .rst_n, .req_valid(dd_req_valid), .req_ready(dd_req_ready), .req_op(dd_req_op),
    .req_addr(dd_req_addr), .req_data(dd_req_data), .resp_valid(dd_resp_valid),
    .resp_ready(dd_resp_ready), .resp_data(dd_resp_data));

  mem_module #(.ADDR_W(7), .DATA_W(8)) u_mem_d_parameter (
    .clk, .rst_n, .req_valid(dp_req_valid), .req_ready(dp_req_ready), .req_op(dp_req_op),
    .req_addr(dp_req_addr), .req_data(dp_req_data), .resp_valid(dp_resp_valid),
    .resp_ready(dp_resp_ready), .resp_data(dp_resp_data));

  buffer_control u_buffer_control (
    .clk, .rst_n, .in_valid(df_valid), .in_ready(df_ready), .in_item(df_item),
    .st_valid, .st_ready, .st_addr, .st_data,
    .ld1_req_valid(l1_req_valid), .ld1_req_ready(l1_req_ready), .ld1_addr(l1_addr),
    .ld1_resp_valid(l1_resp_valid), .ld1_resp_ready(l1_resp_ready), .ld1_resp_data(l1_resp_data),
    .ld2_req_valid(l2_req_valid), .ld2_req_ready(l2_req_ready), .ld2_addr(l2_addr),
    .ld2_resp_valid(l2_resp_valid), .ld2_resp_ready(l2_resp_ready), .ld2_resp_data(l2_resp_data),
    .ireq_valid, .ireq_ready, .ireq_ref_idx, .ireq_plane, .ireq_xw, .ireq_y,
    .ires_valid, .ires_ready, .ires_data,
    .out_valid, .out_ready, .out_data, .out_last, .out_eof, .num_short_term);

  frame_buffer u_frame_buffer (
    .clk, .rst_n, .st_valid, .st_ready, .st_addr, .st_data,
    .ld1_req_valid(l1_req_valid), .ld1_req_ready(l1_req_ready), .ld1_addr(l1_addr),
    .ld1_resp_valid(l1_resp_valid), .ld1_resp_ready(l1_resp_ready), .ld1_resp_data(l1_resp_data),
    .ld2_req_valid(l2_req_valid), .ld2_req_ready(l2_req_ready), .ld2_addr(l2_addr),
    .ld2_resp_valid(l2_resp_valid), .ld2_resp_ready(l2_resp_ready), .ld2_resp_data(l2_resp_data));
endmodule
