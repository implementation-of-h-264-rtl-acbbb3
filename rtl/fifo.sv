// fifo: synchronous FIFO used for every link between decoder stages.
//
// It behaves like the guarded FIFO of a rule-based design: the producer may
// enqueue only while enq_ready (not full) is high, the consumer may dequeue
// only while deq_valid (not empty) is high. Enqueue and dequeue can happen in
// the same cycle, even when the FIFO is full. Data appears at deq_data one
// cycle after it was enqueued (registered storage, no fall-through).
// DEPTH and the element type T are parameters so a link can be lengthened
// to absorb rate mismatches between stages.
module fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enq_valid,
  output logic enq_ready,
  input  T     enq_data,
  output logic deq_valid,
  input  logic deq_ready,
  output T     deq_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                 mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic [AW:0]      count;
  logic             do_enq, do_deq;

  assign deq_valid = (count != 0);
  assign enq_ready = (count != (AW+1)'(DEPTH)) || deq_ready;
  assign do_deq    = deq_valid && deq_ready;
  assign do_enq    = enq_valid && enq_ready;
  assign deq_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_enq) wr_ptr <= inc(wr_ptr);
      if (do_deq) rd_ptr <= inc(rd_ptr);
      count <= count + (AW+1)'(do_enq) - (AW+1)'(do_deq);
    end
  end

  always_ff @(posedge clk) if (do_enq) mem[wr_ptr] <= enq_data;

  // a full FIFO only accepts data when it is dequeued in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
