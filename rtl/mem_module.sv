// mem_module: the parameterised memory used by the entropy decoder (nC
// context), the prediction module (row above, intra and inter) and the
// deblocking filter (samples and parameters of the row above).
//
// A client talks to it through a request/response pair in the FIFO
// client-server style: a request is {op, addr, data}; a load returns one
// response word, a store returns nothing. The memory is a plain array with a
// registered read, so a load answers one cycle after it is accepted, and
// DEPTH words of DATA_W bits; back-to-back loads run at one per cycle as long as the client takes the
// responses. A load is held off (req_ready low) while an unread response is
// waiting and the client does not take it. Only the width and depth differ
// between instances; the request/response protocol hides the timing of the
// memory from its client, so another implementation can be swapped in.
module mem_module
  import h264_pkg::*;
#(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 2**ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  mem_op_e           req_op,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_data,
  output logic              resp_valid,
  input  logic              resp_ready,
  output logic [DATA_W-1:0] resp_data
);
  logic [DATA_W-1:0] mem [DEPTH];

  assign req_ready = (req_op == MEM_STORE) || !resp_valid || resp_ready;

  always_ff @(posedge clk) begin
    if (req_valid && req_ready && req_op == MEM_STORE) mem[req_addr] <= req_data;
    if (req_valid && req_ready && req_op == MEM_LOAD)  resp_data <= mem[req_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) resp_valid <= 1'b0;
    else if (req_valid && req_ready && req_op == MEM_LOAD) resp_valid <= 1'b1;
    else if (resp_ready) resp_valid <= 1'b0;
  end
endmodule
