// sort_queue: one FIFO of the sorting engine.
//
// Holds renamed instructions in arrival order together with the timestamp at
// which each may leave (its release time).  Only the head can leave, and it is
// reported due once the free-running timestamp has reached its release time.
// An instruction behind a head that is not yet due waits even if its own time
// has come; this is what makes the queues cheap, and why instructions are
// sorted into queues by waiting time in the first place.
//
// Interface and timing: push writes at the clock edge (ignored when full);
// head, head_valid and head_due are combinational from the stored state; pop
// removes the head at the clock edge.  Push and pop may happen in the same
// cycle, also when the queue is full.  count is the number of entries held.
module sort_queue
  import sched_pkg::*;
#(
  parameter int unsigned DEPTH = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ts_t   now,
  input  logic  push,
  input  uop_t  push_uop,
  input  ts_t   push_rel,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic  head_valid,
  output logic  head_due,
  output uop_t  head_uop,
  input  logic  pop
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  uop_t             mem_uop [DEPTH];
  ts_t              mem_rel [DEPTH];
  logic [PTR_W-1:0] rd_q, wr_q;
  logic [CNT_W-1:0] cnt_q;

  function automatic logic [PTR_W-1:0] nxt(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH-1)) ? '0 : p + PTR_W'(1);
  endfunction

  logic do_pop, do_push;
  assign head_valid = (cnt_q != '0);
  assign full       = (cnt_q == CNT_W'(DEPTH));
  assign count      = cnt_q;
  assign head_uop   = mem_uop[rd_q];
  assign head_due   = head_valid && ts_reached(now, mem_rel[rd_q]);
  assign do_pop     = pop && head_valid;
  assign do_push    = push && (!full || do_pop);

  always_ff @(posedge clk) begin
    if (do_push) begin
      mem_uop[wr_q] <= push_uop;
      mem_rel[wr_q] <= push_rel;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_pop)  rd_q <= nxt(rd_q);
      if (do_push) wr_q <= nxt(wr_q);
      cnt_q <= cnt_q + CNT_W'(do_push) - CNT_W'(do_pop);
    end
  end

  // A pop from an empty queue is a caller error
  a_no_empty_pop: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);
endmodule
