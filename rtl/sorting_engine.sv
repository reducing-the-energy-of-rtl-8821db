// sorting_engine: out-of-order entry into the scheduling window.
//
// Instructions arrive in program order with a predicted waiting time (cycles
// until their operands are expected).  Each is given a release time, its
// dispatch time + waiting time - LEAD (LEAD covers the cycles it still needs to
// pass the preissue buffer, the issue queue and the schedule-to-execute
// pipeline), and is placed in one of eight FIFOs.  The FIFOs have lengths
// 1,1,1,5,5,10,20 and 150 (three of length 1, two of length 5, one each of
// 10, 20 and 150), as the design specifies.  An instruction whose remaining
// delay d = release - now fits a queue length L (d <= L) goes into the
// shortest such class, the longest queue taking everything else; within a
// class the least-occupied queue that is not full is chosen.  If no queue of
// its class has room the input stalls.  The mapping from waiting time to
// queue class is this implementation's reading of "long waiting times into the
// long queues, short into the short ones".
//
// Locking: an instruction may not leave while one of its producers is still
// in the sorting engine, so no instruction reaches the issue queue before its
// parents.  The engine tracks its occupants by sequence number in a table of
// SLOTS slots (slot = low bits of the sequence number, which must exceed the
// total FIFO capacity); an arriving instruction is held off while its slot is
// still taken.  The design requires the lock but does not describe it; this
// table is this implementation's.
//
// Interface and timing: in_valid/in_ready/in_uop is a valid-ready handshake,
// in_uop.wait_t and in_uop.disp_ts give the timing.  One instruction leaves
// per cycle through out_valid/out_ready/out_uop, chosen round-robin among the
// queue heads that are due and unlocked.  An instruction can leave at the
// earliest the cycle after it arrived.  occupancy counts all instructions
// held; lock_stall pulses when a due head is held back by its lock.
module sorting_engine
  import sched_pkg::*;
#(
  parameter int unsigned NUM_Q = 8,
  parameter int unsigned Q_DEPTH [NUM_Q] = '{1, 1, 1, 5, 5, 10, 20, 150},
  parameter int unsigned LEAD  = 9,
  parameter int unsigned SLOT_W = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  ts_t  now,
  input  logic in_valid,
  output logic in_ready,
  input  uop_t in_uop,
  output logic out_valid,
  input  logic out_ready,
  output uop_t out_uop,
  output logic [15:0] occupancy,
  output logic lock_stall
);
  localparam int unsigned SLOTS = 1 << SLOT_W;
  localparam int unsigned Q_W   = $clog2(NUM_Q);

  // ---------------- queue instances ----------------
  logic [NUM_Q-1:0] q_push, q_full, q_hv, q_due, q_pop;
  uop_t             q_head [NUM_Q];
  logic [15:0]      q_cnt  [NUM_Q];
  ts_t              rel;

  for (genvar g = 0; g < NUM_Q; g++) begin : g_q
    logic [$clog2(Q_DEPTH[g]+1)-1:0] cnt;
    sort_queue #(.DEPTH(Q_DEPTH[g])) u_q (
      .clk, .rst_n, .now,
      .push(q_push[g]), .push_uop(in_uop), .push_rel(rel),
      .full(q_full[g]), .count(cnt),
      .head_valid(q_hv[g]), .head_due(q_due[g]), .head_uop(q_head[g]),
      .pop(q_pop[g])
    );
    assign q_cnt[g] = 16'(cnt);
  end

  // ---------------- lock table ----------------
  logic [SLOTS-1:0] in_sort_q;
  seq_t             occ_seq_q [SLOTS];

  function automatic logic locked(logic v, seq_t s);
    return v && in_sort_q[s[SLOT_W-1:0]] && (occ_seq_q[s[SLOT_W-1:0]] == s);
  endfunction

  // ---------------- placement ----------------
  lat_t             delay;
  logic             place_ok;
  logic [Q_W-1:0]   place_q;

  always_comb begin
    int unsigned cls;
    logic        cls_found;
    logic [15:0] best_cnt;
    delay = (in_uop.wait_t > lat_t'(LEAD)) ? in_uop.wait_t - lat_t'(LEAD) : '0;
    rel   = in_uop.disp_ts + ts_t'(delay);
    // shortest queue length that covers the delay
    cls       = Q_DEPTH[NUM_Q-1];
    cls_found = 1'b0;
    for (int q = 0; q < NUM_Q; q++)
      if (!cls_found && 32'(delay) <= Q_DEPTH[q]) begin
        cls       = Q_DEPTH[q];
        cls_found = 1'b1;
      end
    place_ok = 1'b0;
    place_q  = '0;
    best_cnt = '1;
    for (int q = 0; q < NUM_Q; q++)
      if (Q_DEPTH[q] == cls && !q_full[q] && q_cnt[q] < best_cnt) begin
        place_ok = 1'b1;
        place_q  = Q_W'(q);
        best_cnt = q_cnt[q];
      end
  end

  assign in_ready = place_ok && !in_sort_q[in_uop.seq[SLOT_W-1:0]];

  always_comb begin
    q_push = '0;
    if (in_valid && in_ready) q_push[place_q] = 1'b1;
  end

  // ---------------- release (round robin) ----------------
  logic [NUM_Q-1:0] elig;
  logic [Q_W-1:0]   rr_q, pick;
  logic             any;

  always_comb begin
    for (int q = 0; q < NUM_Q; q++)
      elig[q] = q_due[q] && !locked(q_head[q].lk1_v, q_head[q].lk1)
                         && !locked(q_head[q].lk2_v, q_head[q].lk2);
    any  = 1'b0;
    pick = '0;
    for (int k = 0; k < NUM_Q; k++) begin
      int unsigned q;
      q = (32'(rr_q) + k) % NUM_Q;
      if (!any && elig[q]) begin
        any  = 1'b1;
        pick = Q_W'(q);
      end
    end
    lock_stall = |(q_due & ~elig);
  end

  assign out_valid = any;
  assign out_uop   = q_head[pick];

  always_comb begin
    q_pop = '0;
    if (any && out_ready) q_pop[pick] = 1'b1;
  end

  always_comb begin
    occupancy = '0;
    for (int q = 0; q < NUM_Q; q++) occupancy = occupancy + q_cnt[q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sort_q <= '0;
      rr_q      <= '0;
    end else begin
      if (any && out_ready) begin
        in_sort_q[out_uop.seq[SLOT_W-1:0]] <= 1'b0;
        rr_q <= (pick == Q_W'(NUM_Q-1)) ? '0 : pick + Q_W'(1);
      end
      if (in_valid && in_ready) in_sort_q[in_uop.seq[SLOT_W-1:0]] <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (in_valid && in_ready) occ_seq_q[in_uop.seq[SLOT_W-1:0]] <= in_uop.seq;
endmodule
