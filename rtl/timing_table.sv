// timing_table: rename map extended with expected completion times.
//
// For every architectural register the table keeps the physical register of
// its newest producer, a 10-bit count of the cycles until that producer's
// result is expected, and the producer's dispatch sequence number.  An
// instruction reads its sources' entries: the largest remaining count is its
// waiting time, i.e. how long it must wait for its operands.  Its own result
// is then expected after waiting time + its execution latency (the predicted
// latency for a load, the fixed unit latency otherwise), and that count is
// written into its destination's entry.  Every count decreases by one per
// cycle and stops at zero, so the entry always says how far in the future the
// value is.  Keeping completion times in the rename table, 10 bits per entry,
// follows the design; storing them as down-counters instead of absolute
// times, and handing the producer's sequence number on for the sorting
// queues' locking, are this implementation's choices.
//
// Interface and timing: in_instr/in_pred_lat are read combinationally and the
// renamed, timed out_uop is valid in the same cycle; the table is written,
// and the sequence number advanced, on a cycle with in_fire.  The physical
// destination comes with the instruction (the free list is outside).  Reset
// maps architectural register i to physical register i with nothing pending.
module timing_table
  import sched_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  ts_t    now,
  input  logic   in_fire,
  input  instr_t in_instr,
  input  lat_t   in_pred_lat,
  output uop_t   out_uop
);
  typedef struct packed {
    preg_t ptag;
    lat_t  cnt;      // cycles until the value is expected
    logic  prod_v;   // a producer has been dispatched since reset
    seq_t  prod_seq;
  } tt_entry_t;

  tt_entry_t tt_q [NUM_AREGS];
  seq_t      seq_q;

  lat_t w1, w2, wmax, lat;
  logic [LAT_W:0] done_at;

  always_comb begin
    w1   = in_instr.src1_v ? tt_q[in_instr.src1].cnt : '0;
    w2   = in_instr.src2_v ? tt_q[in_instr.src2].cnt : '0;
    wmax = (w1 > w2) ? w1 : w2;
    lat  = (in_instr.op == OP_LOAD) ? in_pred_lat : op_latency(in_instr.op);
    done_at = {1'b0, wmax} + {1'b0, lat};

    out_uop         = '0;
    out_uop.seq     = seq_q;
    out_uop.pc      = in_instr.pc;
    out_uop.op      = in_instr.op;
    out_uop.dst_v   = in_instr.dst_v;
    out_uop.pdst    = in_instr.pdst;
    out_uop.ps1_v   = in_instr.src1_v;
    out_uop.ps1     = tt_q[in_instr.src1].ptag;
    out_uop.ps2_v   = in_instr.src2_v;
    out_uop.ps2     = tt_q[in_instr.src2].ptag;
    out_uop.lat     = lat;
    out_uop.addr    = in_instr.addr;
    out_uop.wait_t  = wmax;
    out_uop.disp_ts = now;
    out_uop.lk1_v   = in_instr.src1_v && tt_q[in_instr.src1].prod_v;
    out_uop.lk1     = tt_q[in_instr.src1].prod_seq;
    out_uop.lk2_v   = in_instr.src2_v && tt_q[in_instr.src2].prod_v;
    out_uop.lk2     = tt_q[in_instr.src2].prod_seq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_q <= '0;
      for (int i = 0; i < NUM_AREGS; i++) begin
        tt_q[i].ptag     <= preg_t'(i);
        tt_q[i].cnt      <= '0;
        tt_q[i].prod_v   <= 1'b0;
        tt_q[i].prod_seq <= '0;
      end
    end else begin
      for (int i = 0; i < NUM_AREGS; i++)
        if (tt_q[i].cnt != '0) tt_q[i].cnt <= tt_q[i].cnt - lat_t'(1);
      if (in_fire) begin
        seq_q <= seq_q + seq_t'(1);
        if (in_instr.dst_v) begin
          tt_q[in_instr.dst].ptag     <= in_instr.pdst;
          // one cycle of the count has passed by the time the entry is read
          tt_q[in_instr.dst].cnt      <= done_at[LAT_W] ? lat_t'(MAX_LAT) : done_at[LAT_W-1:0] - lat_t'(1);
          tt_q[in_instr.dst].prod_v   <= 1'b1;
          tt_q[in_instr.dst].prod_seq <= seq_q;
        end
      end
    end
  end
endmodule
