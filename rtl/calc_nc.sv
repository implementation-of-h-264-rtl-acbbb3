// calc_nc: CAVLC context (nC) for coeff_token tables, after Calc_nC.
//
// nC of a block is derived from the total_coeff of the 4x4 block to its left
// (nA) and above (nB): both available -> (nA + nB + 1) >> 1, one available ->
// that one, none -> 0. Chroma DC blocks use nC = -1 (handled by the parser).
// The left neighbours of the current macroblock sit in registers; the bottom
// row of the macroblock above comes from a memory module through a
// request/response client (one 40-bit word per macroblock column: four luma
// and two+two chroma counts of 5 bits). The current macroblock's counts are
// kept in registers and, when the macroblock ends, its bottom row is stored
// to the memory and its right column moves to the left-neighbour registers.
//
// Interface: pulse `start` with the macroblock position; `ready` rises once
// the row-above word has arrived (at once in the top row). `set` records the
// count of luma block (blk = 0..15, z-scan) or chroma block (16..19 Cb,
// 20..23 Cr, z-scan in each 2x2). `query_blk` gives nC combinationally.
// `finish` stores the bottom row (one memory request) and shifts left.
module calc_nc
  import h264_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [MBW_W-1:0] mb_x,
  input  logic [MBW_W-1:0] mb_y,
  output logic             ready,
  input  logic             set,
  input  logic [4:0]       set_blk,
  input  logic [4:0]       set_count,
  input  logic [4:0]       query_blk,
  output logic [4:0]       nc,
  input  logic             finish,
  output logic             busy,
  // memory client
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output mem_op_e          mem_req_op,
  output logic [6:0]       mem_req_addr,
  output logic [39:0]      mem_req_data,
  input  logic             mem_resp_valid,
  output logic             mem_resp_ready,
  input  logic [39:0]      mem_resp_data
);
  // counts of the current macroblock in raster 4x4 positions
  logic [3:0][3:0][4:0] cur;      // [y][x] luma
  logic [1:0][1:0][1:0][4:0] cur_c; // [plane][y][x] chroma
  logic [3:0][4:0]      left_l;   // right column of the left macroblock
  logic [1:0][1:0][4:0] left_c;   // [plane][y]
  logic [3:0][4:0]      top_l;    // bottom row of the macroblock above
  logic [1:0][1:0][4:0] top_c;    // [plane][x]
  logic                 left_av, top_av;
  logic [MBW_W-1:0]     cur_x;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_READY} st_e;
  st_e st;
  logic store_pending;
  logic [6:0]  store_addr;
  logic [39:0] store_data;

  // z-scan index -> x, y of a luma 4x4 block
  function automatic logic [1:0] zx(input logic [3:0] b); return {b[2], b[0]}; endfunction
  function automatic logic [1:0] zy(input logic [3:0] b); return {b[3], b[1]}; endfunction

  // combinational nC of query_blk
  always_comb begin
    logic [4:0] na, nb;
    logic       a_av, b_av;
    logic [1:0] x, y;
    logic       p;
    p = 1'b0;
    if (query_blk < 5'd16) begin
      x = zx(query_blk[3:0]); y = zy(query_blk[3:0]);
      a_av = (x != 0) || left_av;
      b_av = (y != 0) || top_av;
      na = (x != 0) ? cur[y][x-1] : left_l[y];
      nb = (y != 0) ? cur[y-1][x] : top_l[x];
    end else begin
      p = (query_blk >= 5'd20);
      x = {1'b0, query_blk[0]}; y = {1'b0, query_blk[1]};
      a_av = (x != 0) || left_av;
      b_av = (y != 0) || top_av;
      na = (x != 0) ? cur_c[p][y[0]][0] : left_c[p][y[0]];
      nb = (y != 0) ? cur_c[p][0][x[0]] : top_c[p][x[0]];
    end
    if (a_av && b_av)  nc = 5'((6'(na) + 6'(nb) + 6'd1) >> 1);
    else if (a_av)     nc = na;
    else if (b_av)     nc = nb;
    else               nc = 5'd0;
  end

  assign ready = (st == S_READY);
  assign busy  = store_pending || st == S_REQ || st == S_WAIT;

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_op    = MEM_LOAD;
    mem_req_addr  = cur_x[6:0];
    mem_req_data  = store_data;
    if (store_pending) begin
      mem_req_valid = 1'b1;
      mem_req_op    = MEM_STORE;
      mem_req_addr  = store_addr;
    end else if (st == S_REQ) begin
      mem_req_valid = 1'b1;
    end
  end
  assign mem_resp_ready = (st == S_WAIT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_IDLE;
      store_pending <= 1'b0;
      store_addr <= '0;
      store_data <= '0;
      left_av <= 1'b0;
      top_av  <= 1'b0;
      cur_x   <= '0;
      cur     <= '0;
      cur_c   <= '0;
      left_l  <= '0;
      left_c  <= '0;
      top_l   <= '0;
      top_c   <= '0;
    end else begin
      if (store_pending && mem_req_ready) store_pending <= 1'b0;
      unique case (st)
        S_IDLE, S_READY: if (start) begin
          left_av <= (mb_x != 0);
          top_av  <= (mb_y != 0);
          cur_x   <= mb_x;
          st      <= (mb_y != 0) ? S_REQ : S_READY;
        end
        S_REQ:  if (!store_pending && mem_req_ready) st <= S_WAIT;
        S_WAIT: if (mem_resp_valid) begin
          {top_c[1][1], top_c[1][0], top_c[0][1], top_c[0][0],
           top_l[3], top_l[2], top_l[1], top_l[0]} <= mem_resp_data;
          st <= S_READY;
        end
        default: ;
      endcase
      if (set) begin
        if (set_blk < 5'd16) cur[zy(set_blk[3:0])][zx(set_blk[3:0])] <= set_count;
        else cur_c[set_blk >= 5'd20][set_blk[1]][set_blk[0]] <= set_count;
      end
      if (finish) begin
        store_pending <= 1'b1;
        store_addr    <= cur_x[6:0];
        store_data    <= {cur_c[1][1][1], cur_c[1][1][0], cur_c[0][1][1], cur_c[0][1][0],
                          cur[3][3], cur[3][2], cur[3][1], cur[3][0]};
        for (int i = 0; i < 4; i++) left_l[i] <= cur[i][3];
        for (int p = 0; p < 2; p++) for (int i = 0; i < 2; i++) left_c[p][i] <= cur_c[p][i][1];
        st <= S_IDLE;
      end
    end
  end
endmodule
