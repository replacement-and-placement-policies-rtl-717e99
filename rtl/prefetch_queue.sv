// prefetch_queue: FIFO of pending prefetch requests (eight entries by default).
//
// Requests enter at the tail and the head is offered to the second-level memory
// whenever the bus is free. A request that arrives when the queue is full is dropped
// (prefetches are hints), and so is one whose block is already waiting in the queue;
// both are this design's choices. Push and pop may happen in the same cycle.
// Synchronous, active-low reset empties the queue.
module prefetch_queue #(
  parameter int unsigned DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               push_i,
  input  cache_pkg::pf_req_t req_i,
  input  logic               pop_i,
  output logic               head_valid_o,
  output cache_pkg::pf_req_t head_o,
  output logic               full_o,
  output logic               dropped_o     // a push was dropped this cycle
);
  import cache_pkg::*;

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pf_req_t             q [DEPTH];
  logic [PW-1:0]       rd_ptr, wr_ptr;
  logic [PW:0]         count;
  logic                dup, do_push, do_pop;

  always_comb begin
    dup = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      int unsigned off;
      off = (i >= 32'(rd_ptr)) ? i - 32'(rd_ptr) : i + DEPTH - 32'(rd_ptr);
      if (off < 32'(count) && q[i].blk == req_i.blk) dup = 1'b1;
    end
  end

  assign head_valid_o = (count != '0);
  assign head_o       = q[rd_ptr];
  assign full_o       = (count == (PW+1)'(DEPTH));
  assign do_pop       = pop_i && head_valid_o;
  assign do_push      = push_i && !dup && (!full_o || do_pop);
  assign dropped_o    = push_i && !do_push;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) begin
        q[wr_ptr] <= req_i;
        wr_ptr    <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (do_pop)
        rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  // The head must never be popped from an empty queue by a well-behaved user.
  assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> head_valid_o)
    else $error("prefetch_queue: pop while empty");

endmodule
