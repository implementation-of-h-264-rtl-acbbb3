// frame_buffer: storage for decoded pictures, reference and output alike.
//
// Each 32-bit word holds four horizontally neighbouring samples. It has three
// client-server ports, as the buffer control module uses them: a store port
// (write, no response) and two load ports, load1 for the final output and
// load2 for the interpolator's reference-sample requests. Each load port
// answers one cycle after it accepts a request and holds off new requests
// while its previous answer has not been taken.
// The default of 2^22 words (16 MiB) holds four 2048x1088 4:2:0 pictures.
module frame_buffer #(
  parameter int unsigned ADDR_W = 22
) (
  input  logic              clk,
  input  logic              rst_n,
  // store
  input  logic              st_valid,
  output logic              st_ready,
  input  logic [ADDR_W-1:0] st_addr,
  input  logic [31:0]       st_data,
  // load1
  input  logic              ld1_req_valid,
  output logic              ld1_req_ready,
  input  logic [ADDR_W-1:0] ld1_addr,
  output logic              ld1_resp_valid,
  input  logic              ld1_resp_ready,
  output logic [31:0]       ld1_resp_data,
  // load2
  input  logic              ld2_req_valid,
  output logic              ld2_req_ready,
  input  logic [ADDR_W-1:0] ld2_addr,
  output logic              ld2_resp_valid,
  input  logic              ld2_resp_ready,
  output logic [31:0]       ld2_resp_data
);
  logic [31:0] mem [2**ADDR_W];

  assign st_ready      = 1'b1;
  assign ld1_req_ready = !ld1_resp_valid || ld1_resp_ready;
  assign ld2_req_ready = !ld2_resp_valid || ld2_resp_ready;

  always_ff @(posedge clk) begin
    if (st_valid) mem[st_addr] <= st_data;
  end

  always_ff @(posedge clk) begin
    if (ld1_req_valid && ld1_req_ready) ld1_resp_data <= mem[ld1_addr];
    if (ld2_req_valid && ld2_req_ready) ld2_resp_data <= mem[ld2_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ld1_resp_valid <= 1'b0;
      ld2_resp_valid <= 1'b0;
    end else begin
      if (ld1_req_valid && ld1_req_ready) ld1_resp_valid <= 1'b1;
      else if (ld1_resp_ready)            ld1_resp_valid <= 1'b0;
      if (ld2_req_valid && ld2_req_ready) ld2_resp_valid <= 1'b1;
      else if (ld2_resp_ready)            ld2_resp_valid <= 1'b0;
    end
  end
endmodule
