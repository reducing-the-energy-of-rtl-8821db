// pib: preissue buffer.
//
// A plain 64-entry FIFO between the sorting engine and the issue queue.  When
// the issue queue is full, instructions released by the sorting queues wait
// here instead of backing up into the sorting queues, which would delay every
// instruction behind them.  Nothing issues from the preissue buffer: its head
// moves into the issue queue when that has a free entry.  The depth (64) and
// the rule that instructions pass through the issue queue follow the design;
// one instruction in and one out per cycle is this implementation's choice.
//
// Interface and timing: valid-ready on both sides.  An instruction written in
// cycle t can leave in cycle t+1.  in_ready is low only when the buffer is
// full (a pop in the same cycle does not make room), count is the occupancy.
module pib
  import sched_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  uop_t in_uop,
  output logic out_valid,
  input  logic out_ready,
  output uop_t out_uop,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PTR_W = $clog2(DEPTH);
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  uop_t             mem_q [DEPTH];
  logic [PTR_W-1:0] rd_q, wr_q;
  logic [CNT_W-1:0] cnt_q;
  logic             do_push, do_pop;

  assign in_ready  = (cnt_q != CNT_W'(DEPTH));
  assign out_valid = (cnt_q != '0);
  assign out_uop   = mem_q[rd_q];
  assign count     = cnt_q;
  assign do_push   = in_valid && in_ready;
  assign do_pop    = out_valid && out_ready;

  always_ff @(posedge clk)
    if (do_push) mem_q[wr_q] <= in_uop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= (wr_q == PTR_W'(DEPTH-1)) ? '0 : wr_q + PTR_W'(1);
      if (do_pop)  rd_q <= (rd_q == PTR_W'(DEPTH-1)) ? '0 : rd_q + PTR_W'(1);
      cnt_q <= cnt_q + CNT_W'(do_push) - CNT_W'(do_pop);
    end
  end
endmodule
