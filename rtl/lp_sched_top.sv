// lp_sched_top: latency-predicting speculative scheduler.
//
// The out-of-order core's scheduling window with load latency prediction,
// instruction sorting and a preissue buffer in front of a speculative
// scheduler.  Instructions arrive renamed-in-part (physical destination
// already allocated) one per cycle and pass through:
//
//   s1   latency prediction stage 1: LHT and load address predictor read
//   s2   latency prediction stage 2: SILO and miss detection engine, result
//        registered at the end of the stage
//   rename/timing: the timing table maps sources to physical registers and
//        works out the waiting time; the instruction enters a sorting FIFO
//        chosen by that waiting time
//   sorting engine -> preissue buffer (PIB) -> issue queue -> STE pipeline ->
//        execute slots (with register file read from the duplicated file)
//
// Instructions that will wait long are held in the cheap FIFOs rather than
// in the associative issue queue, and loads' dependents are woken up after
// the predicted load latency, so fewer of them are misscheduled and replayed.
//
// The memory hierarchy and the functional units are outside.  They are told
// about executing instructions through ex_valid/ex_replay/ex_uop (a load that
// executes without replay is a memory access of ex_uop.addr, answered with
// ld_done/ld_tag in the cycle its data arrives) and supply register writes
// (wb_*), cache fills (fill_*) and the start of a miss (miss_*: block address
// and expected latency, which enters the SILO).  The top measures each load's
// latency from execution to ld_done and trains the LHT with it, and trains the
// address predictor with the address of each executed load; only one load per
// cycle trains each table (the lowest slot), an implementation choice.
// perf holds running event counts.
//
// Timing: an instruction accepted in cycle t is in s1 in t+1, s2 in t+2, can
// enter a sorting queue in t+3, leave it in t+4 at the earliest, reach the
// issue queue in t+6 and be selected there, then execute STE cycles later.
module lp_sched_top
  import sched_pkg::*;
#(
  parameter int unsigned IQ_ENTRIES  = 32,
  parameter int unsigned ISSUE_W     = 8,
  parameter int unsigned LDST_W      = 2,
  parameter int unsigned STE         = 7,
  parameter int unsigned REPLAY_T    = L2_LAT,
  parameter int unsigned PIB_DEPTH   = 64,
  parameter int unsigned AP_ENTRIES  = 8192,
  parameter int unsigned LHT_ENTRIES = 2048,
  parameter int unsigned SILO_ENTRIES = 8,
  parameter int unsigned DATA_W      = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  // instructions from rename
  input  logic   in_valid,
  output logic   in_ready,
  input  instr_t in_instr,
  // execute slots
  output logic   ex_valid  [ISSUE_W],
  output logic   ex_replay [ISSUE_W],
  output uop_t   ex_uop    [ISSUE_W],
  output logic [DATA_W-1:0] ex_opnd [2*ISSUE_W],
  // results of the functional units
  input  logic   wb_en   [ISSUE_W],
  input  preg_t  wb_addr [ISSUE_W],
  input  logic [DATA_W-1:0] wb_data [ISSUE_W],
  // memory hierarchy
  input  logic   ld_done [LDST_W],
  input  preg_t  ld_tag  [LDST_W],
  input  logic   fill_en,
  input  level_t fill_level,
  input  addr_t  fill_addr,
  input  logic   miss_en,
  input  addr_t  miss_addr,
  input  lat_t   miss_lat,
  // event counters
  output perf_t  perf
);
  // ---------------- time ----------------
  ts_t now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + ts_t'(1);

  // ---------------- front pipeline: latency prediction ----------------
  logic   s1_v, s2_v;
  instr_t s1_i, s2_i;
  lat_t   s2_lat;
  logic [1:0] s2_src;
  logic   s2_fire, s1_move, in_fire;
  logic   sort_in_ready;
  lat_t   lp_lat;
  logic [1:0] lp_src;
  level_t lp_level;
  addr_t  lp_addr;

  assign s2_fire  = s2_v && sort_in_ready;
  assign s1_move  = s1_v && (!s2_v || s2_fire);
  assign in_ready = !s1_v || s1_move;
  assign in_fire  = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
      s2_v <= 1'b0;
    end else begin
      if (in_fire)      s1_v <= 1'b1;
      else if (s1_move) s1_v <= 1'b0;
      if (s1_move)      s2_v <= 1'b1;
      else if (s2_fire) s2_v <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_fire) s1_i <= in_instr;
    if (s1_move) begin
      s2_i   <= s1_i;
      s2_lat <= lp_lat;
      s2_src <= lp_src;
    end
  end

  // training signals
  logic  ap_upd_en, lht_upd_en;
  pc_t   ap_upd_pc, lht_upd_pc;
  addr_t ap_upd_addr;
  lat_t  lht_upd_lat;

  latency_pred #(
    .AP_ENTRIES(AP_ENTRIES), .LHT_ENTRIES(LHT_ENTRIES), .SILO_ENTRIES(SILO_ENTRIES)
  ) u_lp (
    .clk, .rst_n, .now,
    .rd_en(in_fire), .rd_pc(in_instr.pc),
    .pred_lat(lp_lat), .pred_src(lp_src), .pred_level(lp_level), .pred_addr(lp_addr),
    .ap_upd_en, .ap_upd_pc, .ap_upd_addr,
    .lht_upd_en, .lht_upd_pc, .lht_upd_lat,
    .fill_en, .fill_level, .fill_addr,
    .silo_alloc_en(miss_en), .silo_alloc_addr(miss_addr), .silo_alloc_lat(miss_lat)
  );

  // ---------------- rename / timing table ----------------
  uop_t tt_uop;
  timing_table u_tt (
    .clk, .rst_n, .now, .in_fire(s2_fire), .in_instr(s2_i), .in_pred_lat(s2_lat),
    .out_uop(tt_uop)
  );

  // ---------------- sorting engine ----------------
  logic        se_out_valid, se_out_ready, se_lock_stall;
  uop_t        se_out_uop;
  logic [15:0] se_occ;
  sorting_engine #(.LEAD(STE + 2)) u_se (
    .clk, .rst_n, .now,
    .in_valid(s2_v), .in_ready(sort_in_ready), .in_uop(tt_uop),
    .out_valid(se_out_valid), .out_ready(se_out_ready), .out_uop(se_out_uop),
    .occupancy(se_occ), .lock_stall(se_lock_stall)
  );

  // ---------------- preissue buffer ----------------
  logic pib_out_valid, iq_in_ready;
  uop_t pib_out_uop;
  logic [$clog2(PIB_DEPTH+1)-1:0] pib_cnt;
  pib #(.DEPTH(PIB_DEPTH)) u_pib (
    .clk, .rst_n,
    .in_valid(se_out_valid), .in_ready(se_out_ready), .in_uop(se_out_uop),
    .out_valid(pib_out_valid), .out_ready(iq_in_ready), .out_uop(pib_out_uop),
    .count(pib_cnt)
  );

  // ---------------- speculative scheduler ----------------
  logic [$clog2(ISSUE_W+1)-1:0]    n_issued, n_replays;
  logic [$clog2(IQ_ENTRIES+1)-1:0] iq_occ;
  issue_queue #(
    .ENTRIES(IQ_ENTRIES), .ISSUE_W(ISSUE_W), .LDST_W(LDST_W), .STE(STE),
    .REPLAY_T(REPLAY_T), .LD_RESP_W(LDST_W)
  ) u_iq (
    .clk, .rst_n,
    .in_valid(pib_out_valid), .in_ready(iq_in_ready), .in_uop(pib_out_uop),
    .ex_valid, .ex_replay, .ex_uop,
    .ld_done, .ld_tag,
    .n_issued, .n_replays, .occupancy(iq_occ)
  );

  // ---------------- register file ----------------
  preg_t rf_raddr [2*ISSUE_W];
  always_comb
    for (int s = 0; s < ISSUE_W; s++) begin
      rf_raddr[2*s]   = ex_uop[s].ps1;
      rf_raddr[2*s+1] = ex_uop[s].ps2;
    end

  dup_regfile #(
    .REGS(NUM_PREGS), .DATA_W(DATA_W), .RD_PORTS(2*ISSUE_W), .WR_PORTS(ISSUE_W)
  ) u_rf (
    .clk, .rd_addr(rf_raddr), .rd_data(ex_opnd),
    .wr_en(wb_en), .wr_addr(wb_addr), .wr_data(wb_data)
  );

  // ---------------- predictor training ----------------
  pc_t ld_pc_q [NUM_PREGS];
  ts_t ld_ts_q [NUM_PREGS];

  always_comb begin
    ts_t d;
    d           = '0;
    ap_upd_en   = 1'b0;
    ap_upd_pc   = '0;
    ap_upd_addr = '0;
    for (int s = ISSUE_W-1; s >= 0; s--)
      if (ex_valid[s] && !ex_replay[s] && ex_uop[s].op == OP_LOAD) begin
        ap_upd_en   = 1'b1;
        ap_upd_pc   = ex_uop[s].pc;
        ap_upd_addr = ex_uop[s].addr;
      end
    lht_upd_en  = 1'b0;
    lht_upd_pc  = '0;
    lht_upd_lat = '0;
    for (int k = LDST_W-1; k >= 0; k--)
      if (ld_done[k]) begin
        d = now - ld_ts_q[ld_tag[k]];
        lht_upd_en  = 1'b1;
        lht_upd_pc  = ld_pc_q[ld_tag[k]];
        lht_upd_lat = (d > ts_t'(MAX_LAT)) ? lat_t'(MAX_LAT) : d[LAT_W-1:0];
      end
  end

  always_ff @(posedge clk)
    for (int s = 0; s < ISSUE_W; s++)
      if (ex_valid[s] && !ex_replay[s] && ex_uop[s].op == OP_LOAD && ex_uop[s].dst_v) begin
        ld_pc_q[ex_uop[s].pdst] <= ex_uop[s].pc;
        ld_ts_q[ex_uop[s].pdst] <= now;
      end

  // ---------------- event counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf <= '0;
    end else begin
      perf.cycles       <= perf.cycles + 32'd1;
      perf.dispatched   <= perf.dispatched + 32'(s2_fire);
      perf.issued       <= perf.issued + 32'(n_issued);
      perf.replays      <= perf.replays + 32'(n_replays);
      perf.iq_occ_sum   <= perf.iq_occ_sum + 32'(iq_occ);
      perf.sort_occ_sum <= perf.sort_occ_sum + 32'(se_occ);
      perf.pib_occ_sum  <= perf.pib_occ_sum + 32'(pib_cnt);
      perf.lock_stalls  <= perf.lock_stalls + 32'(se_lock_stall);
      if (s1_move && s1_i.op == OP_LOAD) begin
        perf.pred_lht  <= perf.pred_lht  + 32'(lp_src == 2'd0);
        perf.pred_silo <= perf.pred_silo + 32'(lp_src == 2'd1);
        perf.pred_md   <= perf.pred_md   + 32'(lp_src == 2'd2);
      end
      perf.sort_full <= perf.sort_full + 32'(s2_v && !sort_in_ready);
      perf.pib_used  <= perf.pib_used + 32'(pib_out_valid && !iq_in_ready);
      perf.iq_full   <= perf.iq_full + 32'(!iq_in_ready);
    end
  end

  // s2_src and the predicted level and address are kept for observation only
  logic unused_obs;
  assign unused_obs = ^{s2_src, lp_level, lp_addr};
endmodule
