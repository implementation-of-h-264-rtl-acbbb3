// nal_unwrap: NAL unit unwrapper for the H.264 byte-stream format.
//
// It turns the compressed byte stream into the raw payload of each NAL unit:
//  * the three-byte start code 00 00 01 is replaced by a NAL_NEW_UNIT item;
//  * an emulation-prevention byte (the 03 of 00 00 03 0x with x <= 3) is
//    dropped;
//  * zero bytes are held back in a counter and only emitted when a later
//    non-zero byte shows they are payload, so zero bytes trailing a NAL unit
//    (and leading zeros of a start code) disappear;
//  * the end of the input gives NAL_END_OF_FILE.
// The trailing-bits pattern (a 1 then 0 bits) is left in place for the parser.
//
// Structure: a three-byte window buf[0..2] with a fill count, and a count of
// held-back zero bytes. One action happens per cycle, in the order of the
// document's rules: fill the window, recognise a start code, remove an
// emulation byte (looking one byte ahead into the input), normal operation
// (drop/hold a zero or emit one byte), and at end of input flush the window.
// The output goes through a small FIFO (out_*), the input is a valid/ready
// stream of bytes with an end-of-file flag on a final, data-less item.
// Throughput is one input byte per cycle at best; an emitted byte costs one
// cycle, refilling the window another.
module nal_unwrap
  import h264_pkg::*;
#(
  parameter int unsigned OUT_DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic       in_eof,
  input  logic [7:0] in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output nal_item_t  out_item
);
  logic [2:0][7:0] buffer;      // buffer[0] is the oldest byte
  logic [1:0]      bufcount;
  logic [15:0]     zerocount;
  logic            eof_seen;
  logic            done;

  logic            enq_valid, enq_ready;
  nal_item_t       enq_item;

  fifo #(.T(nal_item_t), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .enq_valid(enq_valid), .enq_ready(enq_ready), .enq_data(enq_item),
    .deq_valid(out_valid), .deq_ready(out_ready), .deq_data(out_item)
  );

  typedef enum logic [2:0] {A_NONE, A_FILL, A_NEWUNIT, A_REMOVE3, A_NORMAL, A_ENDFILE} act_e;
  act_e act;

  wire full       = (bufcount == 2'd3);
  wire start_code = full && buffer[0] == 8'h00 && buffer[1] == 8'h00 && buffer[2] == 8'h01;
  wire emul3      = full && buffer[0] == 8'h00 && buffer[1] == 8'h00 && buffer[2] == 8'h03
                    && in_valid && !in_eof && in_data <= 8'h03;

  // choose the one action of this cycle and what it puts in the output FIFO
  always_comb begin
    act       = A_NONE;
    enq_valid = 1'b0;
    enq_item  = '{tag: NAL_RBSP_BYTE, data: 8'h00};
    in_ready  = 1'b0;
    if (done) begin
      act = A_NONE;
    end else if (!eof_seen && !full) begin
      act      = A_FILL;
      in_ready = 1'b1;
    end else if (!eof_seen && start_code) begin
      act           = A_NEWUNIT;
      enq_valid     = 1'b1;
      enq_item.tag  = NAL_NEW_UNIT;
    end else if (!eof_seen && emul3) begin
      act = A_REMOVE3;
    end else if (!eof_seen && full && buffer[0] == 8'h00 && buffer[1] == 8'h00 && buffer[2] == 8'h03
                 && !in_valid) begin
      act = A_NONE;                            // wait for the byte after 00 00 03
    end else if (!eof_seen) begin
      act = A_NORMAL;
      if (buffer[0] != 8'h00) begin
        enq_valid     = 1'b1;
        enq_item.data = (zerocount == 0) ? buffer[0] : 8'h00;
      end
    end else begin
      act = A_ENDFILE;
      if (bufcount != 0 && buffer[0] != 8'h00) begin
        enq_valid     = 1'b1;
        enq_item.data = (zerocount == 0) ? buffer[0] : 8'h00;
      end else if (bufcount == 0) begin
        enq_valid    = 1'b1;
        enq_item.tag = NAL_END_OF_FILE;
      end
    end
  end

  wire stall = enq_valid && !enq_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buffer    <= '0;
      bufcount  <= '0;
      zerocount <= '0;
      eof_seen  <= 1'b0;
      done      <= 1'b0;
    end else if (!stall) begin
      unique case (act)
        A_FILL: if (in_valid) begin
          if (in_eof) eof_seen <= 1'b1;
          else begin
            buffer[bufcount] <= in_data;
            bufcount         <= bufcount + 1'b1;
          end
        end
        A_NEWUNIT: begin
          bufcount  <= '0;
          zerocount <= '0;
        end
        A_REMOVE3: begin
          bufcount  <= '0;
          zerocount <= zerocount + 16'd2;
        end
        A_NORMAL, A_ENDFILE: begin
          if (bufcount == 0) done <= 1'b1;       // end of file emitted
          else if (buffer[0] == 8'h00) begin
            zerocount <= zerocount + 1'b1;
            buffer    <= {8'h00, buffer[2:1]};
            bufcount  <= bufcount - 1'b1;
          end else if (zerocount == 0) begin
            buffer    <= {8'h00, buffer[2:1]};
            bufcount  <= bufcount - 1'b1;
          end else begin
            zerocount <= zerocount - 1'b1;
          end
        end
        default: ;
      endcase
      // trailing zeros at the end of the stream are padding: drop them
      if (act == A_ENDFILE && bufcount == 0) zerocount <= '0;
    end
  end
endmodule
