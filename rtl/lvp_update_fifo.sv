// lvp_update_fifo: the per-bank queue of predictor updates.
//
// Completed loads push their update here; the bank pops one entry per cycle
// whenever the queue is not empty and the bank is idle (no prediction in
// that cycle).  A push that finds the queue full is dropped, and the drop is
// signalled on `dropped`; the predictor then simply misses that update.
// DEPTH is 16 entries as in the design.
//
// Interface and timing: push/push_data in any cycle; the head is visible on
// pop_data while not_empty is high and leaves at the clock edge when pop is
// high.  Fullness is judged before this cycle's pop, so a push to a full
// queue is dropped even if an entry leaves in the same cycle; a pushed entry
// can be popped from the next cycle on.  Both rules are this design's choice.
module lvp_update_fifo
  import lvp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     push,
  input  upd_req_t push_data,
  output logic     dropped,
  output logic     not_empty,
  input  logic     pop,
  output upd_req_t pop_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = $clog2(DEPTH);
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  upd_req_t         mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic             full, do_push, do_pop;

  assign full      = (32'(count) == DEPTH);
  assign not_empty = (count != '0);
  assign do_push   = push && !full;
  assign do_pop    = pop && not_empty;
  assign dropped   = push && full;
  assign pop_data  = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= (32'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (32'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + CNT_W'(do_push) - CNT_W'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  // a pop is only issued on a non-empty queue
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> not_empty);

endmodule
