// issue_queue: speculative scheduler with selective replay.
//
// The issue queue holds up to ENTRIES instructions and each cycle selects up to
// ISSUE_W of them (at most LDST_W loads/stores) whose operands are expected to
// be ready.  Between selection and execution lie STE pipeline stages
// (register file read and bookkeeping), so the scheduler cannot wait for a
// producer to finish: when a producer with latency L is selected in cycle t,
// its dependents become selectable in cycle t+L and reach execution exactly
// when the result does.  For fixed-latency ops L is the unit latency; for a
// load it is the latency predicted before the load entered the scheduling
// window, instead of an assumed cache hit.
//
// When an instruction reaches execution, its operands are checked against the
// values that really exist.  If one is missing (its producer was a load that
// took longer than predicted, or was itself misscheduled) the instruction is
// misscheduled: it is replayed, becoming selectable again REPLAY_T cycles
// later, and its own dependents lose their wakeup so they are not selected on
// its account.  Only dependents of the missing value replay (selective
// replay).  An instruction stays in the queue until it executes correctly.
// Selective replay, retrying every REPLAY_T = 12 cycles (the L2 hit latency),
// and using predicted load latencies for wakeup follow the design, as do the
// 32 entries, 8-wide issue, 2 load/store units and the 7-stage schedule to
// execute depth.  Readiness is kept per physical register (a speculative
// "selected + countdown" state and a real "value present" state) rather than
// by broadcasting tags to the entries, and selection favours the lowest entry
// index; both are this implementation's choices.
//
// Interface and timing: in_valid/in_ready/in_uop inserts one instruction per
// cycle (in_ready while an entry is free).  The ISSUE_W execute slots
// ex_valid/ex_uop/ex_replay show what reaches execution STE cycles after
// selection; ex_replay marks a misscheduled one.  Loads that execute correctly
// must be answered on ld_done/ld_tag, in the cycle their data arrives (the
// value counts as present in that cycle).  n_issued, n_replays and occupancy
// are per-cycle counts for energy accounting.
module issue_queue
  import sched_pkg::*;
#(
  parameter int unsigned ENTRIES  = 32,
  parameter int unsigned ISSUE_W  = 8,
  parameter int unsigned LDST_W   = 2,
  parameter int unsigned STE      = 7,
  parameter int unsigned REPLAY_T = L2_LAT,
  parameter int unsigned LD_RESP_W = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  uop_t in_uop,
  output logic ex_valid  [ISSUE_W],
  output logic ex_replay [ISSUE_W],
  output uop_t ex_uop    [ISSUE_W],
  input  logic  ld_done  [LD_RESP_W],
  input  preg_t ld_tag   [LD_RESP_W],
  output logic [$clog2(ISSUE_W+1)-1:0] n_issued,
  output logic [$clog2(ISSUE_W+1)-1:0] n_replays,
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);
  localparam int unsigned E_W  = $clog2(ENTRIES);
  localparam int unsigned N_W  = $clog2(ISSUE_W+1);
  localparam int unsigned RC_W = $clog2(REPLAY_T+1);

  // ---------------- entries ----------------
  logic [ENTRIES-1:0] valid_q, issued_q;
  uop_t               uop_q    [ENTRIES];
  logic [RC_W-1:0]    replay_q [ENTRIES];

  // ---------------- per physical register readiness ----------------
  logic [NUM_PREGS-1:0] sched_q;      // producer selected, wakeup in progress
  lat_t                 spec_cnt_q [NUM_PREGS];
  logic [NUM_PREGS-1:0] real_q;       // value present
  logic [NUM_PREGS-1:0] rpend_q;      // fixed-latency result on its way
  lat_t                 real_cnt_q [NUM_PREGS];

  function automatic logic spec_ready(logic v, preg_t p);
    return !v || (sched_q[p] && spec_cnt_q[p] == '0);
  endfunction

  logic [NUM_PREGS-1:0] ld_now;
  always_comb begin
    ld_now = '0;
    for (int k = 0; k < LD_RESP_W; k++)
      if (ld_done[k]) ld_now[ld_tag[k]] = 1'b1;
  end

  function automatic logic real_ready(logic v, preg_t p);
    return !v || real_q[p] || ld_now[p] || (rpend_q[p] && real_cnt_q[p] == '0);
  endfunction

  function automatic logic is_mem(op_t op);
    return op == OP_LOAD || op == OP_STORE;
  endfunction

  // ---------------- insertion ----------------
  logic           ins_fire;
  logic [E_W-1:0] ins_idx;
  always_comb begin
    in_ready = 1'b0;
    ins_idx  = '0;
    for (int e = ENTRIES-1; e >= 0; e--)
      if (!valid_q[e]) begin
        in_ready = 1'b1;
        ins_idx  = E_W'(e);
      end
  end
  assign ins_fire = in_valid && in_ready;

  // ---------------- select ----------------
  logic [ENTRIES-1:0] elig, sel;
  logic               sel_v   [ISSUE_W];
  logic [E_W-1:0]     sel_idx [ISSUE_W];
  always_comb begin
    int unsigned n, nmem;
    for (int e = 0; e < ENTRIES; e++)
      elig[e] = valid_q[e] && !issued_q[e] && replay_q[e] == '0 &&
                spec_ready(uop_q[e].ps1_v, uop_q[e].ps1) &&
                spec_ready(uop_q[e].ps2_v, uop_q[e].ps2);
    sel  = '0;
    n    = 0;
    nmem = 0;
    for (int s = 0; s < ISSUE_W; s++) begin
      sel_v[s]   = 1'b0;
      sel_idx[s] = '0;
    end
    for (int e = 0; e < ENTRIES; e++)
      if (elig[e] && n < ISSUE_W && (!is_mem(uop_q[e].op) || nmem < LDST_W)) begin
        sel[e]     = 1'b1;
        sel_v[n]   = 1'b1;
        sel_idx[n] = E_W'(e);
        n++;
        if (is_mem(uop_q[e].op)) nmem++;
      end
    n_issued = N_W'(n);
  end

  // ---------------- schedule-to-execute pipeline ----------------
  logic           pv_q [STE][ISSUE_W];
  logic [E_W-1:0] pi_q [STE][ISSUE_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < STE; d++)
        for (int s = 0; s < ISSUE_W; s++) begin
          pv_q[d][s] <= 1'b0;
          pi_q[d][s] <= '0;
        end
    end else begin
      for (int s = 0; s < ISSUE_W; s++) begin
        pv_q[0][s] <= sel_v[s];
        pi_q[0][s] <= sel_idx[s];
      end
      for (int d = 1; d < STE; d++)
        for (int s = 0; s < ISSUE_W; s++) begin
          pv_q[d][s] <= pv_q[d-1][s];
          pi_q[d][s] <= pi_q[d-1][s];
        end
    end
  end

  // ---------------- execute-stage check ----------------
  always_comb begin
    int unsigned nr;
    nr = 0;
    for (int s = 0; s < ISSUE_W; s++) begin
      ex_valid[s]  = pv_q[STE-1][s];
      ex_uop[s]    = uop_q[pi_q[STE-1][s]];
      ex_replay[s] = ex_valid[s] &&
                     !(real_ready(ex_uop[s].ps1_v, ex_uop[s].ps1) &&
                       real_ready(ex_uop[s].ps2_v, ex_uop[s].ps2));
      if (ex_replay[s]) nr++;
    end
    n_replays = N_W'(nr);
  end

  always_comb begin
    occupancy = '0;
    for (int e = 0; e < ENTRIES; e++) occupancy = occupancy + $bits(occupancy)'(valid_q[e]);
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      issued_q <= '0;
      for (int e = 0; e < ENTRIES; e++) replay_q[e] <= '0;
      sched_q  <= '1;         // architectural values exist at reset
      real_q   <= '1;
      rpend_q  <= '0;
      for (int p = 0; p < NUM_PREGS; p++) begin
        spec_cnt_q[p] <= '0;
        real_cnt_q[p] <= '0;
      end
    end else begin
      // time passes
      for (int e = 0; e < ENTRIES; e++)
        if (replay_q[e] != '0) replay_q[e] <= replay_q[e] - RC_W'(1);
      for (int p = 0; p < NUM_PREGS; p++) begin
        if (spec_cnt_q[p] != '0) spec_cnt_q[p] <= spec_cnt_q[p] - lat_t'(1);
        if (rpend_q[p]) begin
          if (real_cnt_q[p] == '0) begin
            rpend_q[p] <= 1'b0;
            real_q[p]  <= 1'b1;
          end else begin
            real_cnt_q[p] <= real_cnt_q[p] - lat_t'(1);
          end
        end
        if (ld_now[p]) real_q[p] <= 1'b1;
      end
      // insertion: the destination's value is gone until the new producer runs
      if (ins_fire) begin
        valid_q[ins_idx]  <= 1'b1;
        issued_q[ins_idx] <= 1'b0;
        replay_q[ins_idx] <= '0;
        uop_q[ins_idx]    <= in_uop;
        if (in_uop.dst_v) begin
          sched_q[in_uop.pdst] <= 1'b0;
          real_q[in_uop.pdst]  <= 1'b0;
          rpend_q[in_uop.pdst] <= 1'b0;
        end
      end
      // selection: speculative wakeup of the dependents after lat cycles
      for (int e = 0; e < ENTRIES; e++)
        if (sel[e]) begin
          issued_q[e] <= 1'b1;
          if (uop_q[e].dst_v) begin
            sched_q[uop_q[e].pdst]    <= 1'b1;
            spec_cnt_q[uop_q[e].pdst] <= (uop_q[e].lat == '0) ? '0 : uop_q[e].lat - lat_t'(1);
          end
        end
      // execution: retire correct ones, replay misscheduled ones
      for (int s = 0; s < ISSUE_W; s++)
        if (ex_valid[s]) begin
          if (ex_replay[s]) begin
            issued_q[pi_q[STE-1][s]] <= 1'b0;
            replay_q[pi_q[STE-1][s]] <= RC_W'(REPLAY_T);
            if (ex_uop[s].dst_v) sched_q[ex_uop[s].pdst] <= 1'b0;
          end else begin
            valid_q[pi_q[STE-1][s]] <= 1'b0;
            if (ex_uop[s].dst_v && ex_uop[s].op != OP_LOAD) begin
              rpend_q[ex_uop[s].pdst]    <= 1'b1;
              real_cnt_q[ex_uop[s].pdst] <= op_latency(ex_uop[s].op) - lat_t'(1);
            end
          end
        end
    end
  end

  // A correctly executed instruction leaves; it cannot be selected again first
  for (genvar s = 0; s < ISSUE_W; s++) begin : g_chk
    a_ex_was_issued: assert property (@(posedge clk) disable iff (!rst_n)
      ex_valid[s] |-> valid_q[pi_q[STE-1][s]] && issued_q[pi_q[STE-1][s]]);
  end
endmodule
