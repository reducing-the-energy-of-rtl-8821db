// tb_lp_sched_top: end-to-end testbench of the latency-predicting scheduler,
// with every parameter of the top at its default.  Its one parameter,
// IQ_ENTRIES, lets tb_lp_sched_iq64 run the same test on a 64-entry issue
// queue (through the wrapper lp_sched_top_sized); at its default (32) the top
// itself is instantiated with no parameter list.
//
// The testbench plays the rest of the core around the scheduling window:
//  - rename: a synthetic loop program over 16 integer registers, renamed with
//    a free list of physical registers 64..191 that are freed in program
//    order (a simple reorder buffer) when the next writer of the same
//    architectural register has executed;
//  - functional units: every correctly executed instruction writes a value
//    derived from its sequence number to the register file, at once for an
//    ALU op (the register file is read again only in a later cycle);
//  - memory: L1 (32-byte blocks) and L2 (64-byte blocks) contents, blocks in
//    flight, latencies 2 / 12 / 164; a load to a block already in flight waits
//    for it.  Misses are announced on miss_*, arriving blocks on fill_*, load
//    data on ld_done/ld_tag.
//
// The program runs three phases: "memory-intensive" (one load streams through
// memory in 64-byte steps, so every iteration misses to memory),
// "ILP-intensive" (8-byte steps, mostly L1 hits) and "mispredicted load" (one
// load alternates between a resident block and a new one, so its last-latency
// prediction is always wrong and ten dependents and a long floating-point
// chain crowd the issue queue), then an "L2-hit" phase in which the same
// loop's load always hits L2 and waits for a multiply, so that several of its
// dependents are in the 5-long sorting queues at once.  Checks: every instruction
// that reaches execution is flagged as a replay exactly when an operand does
// not yet exist; operands read from the register file carry the values their
// producers wrote; every instruction executes correctly exactly once and
// nothing is left in the window at the end.  Every mechanism of the design
// must have happened at least once: predictions from the LHT, the SILO and the
// miss detection engine, replays, a sorting-queue lock stall, a full sorting
// class, the preissue buffer holding instructions for a full issue queue, a
// full issue queue, 8-wide issue, and use of every sorting queue.
module tb_lp_sched_top #(
  parameter int unsigned IQ_ENTRIES = 32   // 32: the top's default
);
  import sched_pkg::*;
  localparam int unsigned ISSUE_W = 8, LDST_W = 2, DW = 64;
  localparam int unsigned N_MEM_ITER = 150, N_ILP_ITER = 150, N_ALT_ITER = 60, N_L2_ITER = 40;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  instr_t in_instr = '0;
  logic ex_valid [ISSUE_W], ex_replay [ISSUE_W];
  uop_t ex_uop [ISSUE_W];
  logic [DW-1:0] ex_opnd [2*ISSUE_W];
  logic wb_en [ISSUE_W];
  preg_t wb_addr [ISSUE_W];
  logic [DW-1:0] wb_data [ISSUE_W];
  logic ld_done [LDST_W];
  preg_t ld_tag [LDST_W];
  logic fill_en = 0;
  level_t fill_level = LVL_L1;
  addr_t fill_addr = '0;
  logic miss_en = 0;
  addr_t miss_addr = '0;
  lat_t miss_lat = '0;
  perf_t perf;
  int checks = 0, failures = 0;

  // at IQ_ENTRIES = 32 the top is built with no parameter list at all;
  // another size goes through the pass-through wrapper lp_sched_top_sized
  logic             probe_sel_v [ISSUE_W];   // issue slots used this cycle
  logic [7:0]       probe_q_push;            // sorting queue written this cycle
  if (IQ_ENTRIES == 32) begin : g_dut
    lp_sched_top dut (.*);
    assign probe_sel_v  = dut.u_iq.sel_v;
    assign probe_q_push = dut.u_se.q_push;
  end else begin : g_dut
    lp_sched_top_sized #(.IQ_ENTRIES(IQ_ENTRIES)) dut (.*);
    assign probe_sel_v  = dut.u_top.u_iq.sel_v;
    assign probe_q_push = dut.u_top.u_se.q_push;
  end
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- rename model ----------------
  int     amap [32];                 // architectural -> physical
  int     free_list [$];
  typedef struct { int old_p; bit has_dst; } rob_t;
  rob_t   rob [$];                   // in dispatch order
  longint rob_head_seq = 0;
  bit     done_seq [longint];        // seq -> executed correctly
  longint n_disp = 0, n_exec = 0, n_replay_seen = 0;

  // ---------------- value model ----------------
  localparam longint NEVER = 64'h7fff_ffff_ffff;
  longint        ready_at [NUM_PREGS];
  logic [DW-1:0] value_of [NUM_PREGS];
  bit            known    [NUM_PREGS];       // value_of holds what the register file holds

  function automatic logic [DW-1:0] val(longint seq);
    return {32'hC0DE_0000 | 32'(seq[15:0]), 32'(seq * 7 + 3)};
  endfunction

  // ---------------- memory model ----------------
  bit     l1 [int];                  // resident 32-byte blocks
  bit     l2 [int];                  // resident 64-byte blocks
  longint infl [int];                // 32-byte block -> arrival cycle
  longint resp_at [$];  preg_t resp_tag [$];  longint resp_seq [$];
  longint fill_q_at [$]; addr_t fill_q_addr [$]; level_t fill_q_lvl [$];
  addr_t  miss_q_addr [$]; lat_t miss_q_lat [$];

  // ---------------- mechanism counters ----------------
  int max_issue = 0;
  int q_used [8];

  // ---------------- program ----------------
  // one loop iteration (12 instructions); the stream step sets the phase
  typedef struct { op_t op; int d; int s1; int s2; int kind; } pinst_t;  // kind 1: stream load, 2: hot load
  pinst_t body [12];
  pinst_t body3 [15];
  initial begin
    // third phase: one load alternates between a resident block and a new
    // one, so its address (and latency) is mispredicted every other time;
    // ten instructions wait for it, and two chained 10-cycle multiplies feed an add
    body3[0] = '{OP_LOAD, 1, 15, -1, 3};
    for (int k = 1; k <= 10; k++) body3[k] = '{OP_ALU, 15 + k, 1, k + 1, 0};
    body3[11] = '{OP_FMUL, 26, 8, 9, 0};
    body3[12] = '{OP_FMUL, 27, 26, 9, 0};
    body3[13] = '{OP_ALU,  28, 27, 28, 0};
    body3[14] = '{OP_ALU,  8, 8, -1, 0};
  end
  initial begin
    body[0]  = '{OP_LOAD, 1, 15, -1, 1};   // r1 = [stream]
    body[1]  = '{OP_ALU,  2, 1, 3, 0};     // r2 = r1 + r3   (waits for the load)
    body[2]  = '{OP_MUL,  4, 2, 5, 0};     // r4 = r2 * r5
    body[3]  = '{OP_LOAD, 6, 14, -1, 2};   // r6 = [hot]
    body[4]  = '{OP_ALU,  7, 6, 7, 0};     // r7 += r6
    body[5]  = '{OP_ALU,  8, 8, -1, 0};    // r8 += 1        (independent)
    body[6]  = '{OP_ALU,  9, 9, 10, 0};    // r9 += r10      (independent)
    body[7]  = '{OP_ALU, 10, 10, -1, 0};   // r10 += 1
    body[8]  = '{OP_ALU, 11, 4, 11, 0};    // r11 += r4      (waits for the chain)
    body[9]  = '{OP_ALU, 12, 12, 8, 0};    // r12 += r8
    body[10] = '{OP_STORE, -1, 11, 13, 0}; // [r13] = r11
    body[11] = '{OP_BRANCH, -1, 8, -1, 0}; // loop
  end

  // ---------------- per-cycle model (falling edge) ----------------
  always @(negedge clk) begin
    if (rst_n) begin
      // load data, fills and miss notices due in this cycle
      for (int k = 0; k < LDST_W; k++) begin ld_done[k] = 0; ld_tag[k] = '0; end
      begin
        int k;
        k = 0;
        for (int i = 0; i < resp_at.size(); i++)
          if (resp_at[i] <= cyc && k < LDST_W) begin
            ld_done[k] = 1; ld_tag[k] = resp_tag[i]; k++;
            ready_at[resp_tag[i]] = cyc + 1;          // register file write lands next cycle
            known[resp_tag[i]] = 0;                  // load data is not written by this testbench
            resp_at.delete(i); resp_tag.delete(i); resp_seq.delete(i); i--;
          end
      end
      fill_en = 0;
      for (int i = 0; i < fill_q_at.size(); i++)
        if (fill_q_at[i] <= cyc) begin
          fill_en = 1; fill_addr = fill_q_addr[i]; fill_level = fill_q_lvl[i];
          fill_q_at.delete(i); fill_q_addr.delete(i); fill_q_lvl.delete(i);
          break;
        end
      miss_en = 0;
      if (miss_q_addr.size() > 0) begin
        miss_en = 1; miss_addr = miss_q_addr.pop_front(); miss_lat = miss_q_lat.pop_front();
      end
      for (int s = 0; s < ISSUE_W; s++) wb_en[s] = 0;
      #1;
      // execution
      for (int s = 0; s < ISSUE_W; s++)
        if (ex_valid[s]) begin
          uop_t u;
          bit ok;
          longint sq;
          u = ex_uop[s];
          sq = longint'(u.seq);
          ok = (!u.ps1_v || ready_at[u.ps1] <= cyc || (ld_now(u.ps1))) &&
               (!u.ps2_v || ready_at[u.ps2] <= cyc || (ld_now(u.ps2)));
          checks++;
          if (ex_replay[s] !== !ok) begin
            failures++;
            if (failures < 10) $display("FAIL cyc=%0d seq=%0d replay=%b model ok=%b", cyc, sq, ex_replay[s], ok);
          end
          if (!ok) n_replay_seen++;
          else begin
            // operands from the register file (values older than this cycle)
            if (u.ps1_v && ready_at[u.ps1] < cyc && known[u.ps1]) begin
              checks++;
              if (ex_opnd[2*s] !== value_of[u.ps1]) begin
                failures++;
                if (failures < 10) $display("FAIL operand 1 of seq %0d", sq);
              end
            end
            if (u.ps2_v && ready_at[u.ps2] < cyc && known[u.ps2]) begin
              checks++;
              if (ex_opnd[2*s+1] !== value_of[u.ps2]) begin
                failures++;
                if (failures < 10) $display("FAIL operand 2 of seq %0d", sq);
              end
            end
            if (done_seq.exists(sq)) begin failures++; $display("FAIL seq %0d executed twice", sq); end
            done_seq[sq] = 1;
            n_exec++;
            if (u.op == OP_LOAD) mem_access(u);
            else if (u.dst_v) begin
              wb_en[s] = 1; wb_addr[s] = u.pdst; wb_data[s] = val(sq);
              ready_at[u.pdst] = cyc + longint'(op_latency(u.op));
              value_of[u.pdst] = val(sq);
              known[u.pdst] = 1;
            end
          end
        end
      begin
        int n;
        n = 0;
        for (int s = 0; s < ISSUE_W; s++) if (probe_sel_v[s]) n++;
        if (n > max_issue) max_issue = n;
        for (int q = 0; q < 8; q++) if (probe_q_push[q]) q_used[q]++;
      end
      // in-order release of physical registers
      while (rob.size() > 0 && done_seq.exists(rob_head_seq)) begin
        rob_t r;
        r = rob.pop_front();
        if (r.has_dst) free_list.push_back(r.old_p);
        done_seq.delete(rob_head_seq);
        rob_head_seq++;
      end
    end
  end

  function automatic bit ld_now(preg_t p);
    for (int k = 0; k < LDST_W; k++) if (ld_done[k] && ld_tag[k] == p) return 1;
    return 0;
  endfunction

  task automatic mem_access(uop_t u);
    int b1, b2;
    longint lat;
    b1 = int'(u.addr >> 5);
    b2 = int'(u.addr >> 6);
    if (l1.exists(b1)) lat = L1_LAT;
    else if (infl.exists(b1)) lat = (infl[b1] - cyc > L1_LAT) ? infl[b1] - cyc : L1_LAT;
    else begin
      lat = l2.exists(b2) ? L2_LAT : MEM_LAT;
      infl[b1] = cyc + lat;
      miss_q_addr.push_back(u.addr);
      miss_q_lat.push_back(lat_t'(lat - 1));
      fill_q_at.push_back(cyc + lat); fill_q_addr.push_back(u.addr); fill_q_lvl.push_back(LVL_L1);
      if (lat == MEM_LAT) begin
        fill_q_at.push_back(cyc + lat); fill_q_addr.push_back(u.addr); fill_q_lvl.push_back(LVL_L2);
      end
    end
    resp_at.push_back(cyc + lat);
    resp_tag.push_back(u.pdst);
    resp_seq.push_back(longint'(u.seq));
  endtask

  // caches become resident when their fill is delivered
  always @(posedge clk)
    if (rst_n && fill_en) begin
      if (fill_level == LVL_L1) begin l1[int'(fill_addr >> 5)] = 1; infl.delete(int'(fill_addr >> 5)); end
      else l2[int'(fill_addr >> 6)] = 1;
    end

  // ---------------- dispatch ----------------
  task automatic dispatch(pinst_t p, int pc_idx, addr_t a);
    instr_t ins;
    ins = '0;
    while (free_list.size() == 0) @(negedge clk);
    ins.pc = 32'h0001_0000 + 32'(pc_idx * 4);
    ins.op = p.op;
    ins.src1_v = p.s1 >= 0; ins.src1 = areg_t'(p.s1 < 0 ? 0 : p.s1);
    ins.src2_v = p.s2 >= 0; ins.src2 = areg_t'(p.s2 < 0 ? 0 : p.s2);
    ins.dst_v = p.d >= 0;   ins.dst = areg_t'(p.d < 0 ? 0 : p.d);
    ins.pdst = preg_t'(ins.dst_v ? free_list[0] : 0);
    ins.addr = a;
    in_instr = ins;
    in_valid = 1;
    @(posedge clk);
    while (!in_ready_at_edge) @(posedge clk);
    #1;
    in_valid = 0;
    if (ins.dst_v) begin
      void'(free_list.pop_front());
      rob.push_back('{amap[p.d], 1});
      amap[p.d] = int'(ins.pdst);
      ready_at[ins.pdst] = NEVER;
    end else rob.push_back('{0, 0});
    n_disp++;
  endtask

  logic in_ready_at_edge;
  always @(negedge clk) in_ready_at_edge = in_ready;

  task automatic run_phase(int iters, int step, ref addr_t stream);
    for (int it = 0; it < iters; it++) begin
      for (int k = 0; k < 12; k++) begin
        addr_t a;
        a = '0;
        if (body[k].kind == 1) a = stream;
        if (body[k].kind == 2) a = 32'h0800_0000 + 32'((it % 4) * 8);
        dispatch(body[k], k + (step == 64 ? 0 : 16), a);
      end
      stream = stream + addr_t'(step);
    end
  endtask

  // l2_half = 0: the load alternates between a resident block and a new one;
  // l2_half = 1: it walks the second halves of the 64-byte blocks the first
  // phase brought into L2 (L1 holds only their first halves): every load is
  // an L2 hit, so its dependents wait just long enough for the 5-long queues
  task automatic run_phase3(int iters, bit l2_half);
    for (int it = 0; it < iters; it++)
      for (int k = 0; k < 15; k++) begin
        addr_t a;
        a = '0;
        if (body3[k].kind == 3 && !l2_half) a = (it % 2 == 0) ? 32'h0900_0000 : 32'h2000_0000 + 32'(it * 4096);
        if (body3[k].kind == 3 && l2_half)  a = 32'h1000_0020 + 32'(it * 64);
        // in the L2-hit phase the load's address register comes from a
        // multiply, so its dependents wait 12..15 cycles
        if (k == 14 && l2_half) dispatch('{OP_MUL, 15, 15, -1, 0}, 32 + k, a);
        else                    dispatch(body3[k], 32 + k, a);
      end
  endtask

  task automatic expect_seen(longint n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
    else $display("  %-44s %0d", what, n);
  endtask

  initial begin
    #20000000; failures++;
    $display("watchdog: dispatched=%0d executed=%0d", n_disp, n_exec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    addr_t stream;
    perf_t p_mem;
    for (int p = 0; p < NUM_PREGS; p++) begin ready_at[p] = 0; value_of[p] = '0; known[p] = 0; end
    for (int r = 0; r < 32; r++) amap[r] = r;
    for (int p = 64; p < NUM_PREGS; p++) free_list.push_back(p);
    for (int s = 0; s < ISSUE_W; s++) begin wb_en[s] = 0; wb_addr[s] = '0; wb_data[s] = '0; end
    for (int k = 0; k < LDST_W; k++) begin ld_done[k] = 0; ld_tag[k] = '0; end
    repeat (3) @(posedge clk);
    // architectural registers start with known values
    for (int r = 0; r < 32; r += ISSUE_W) begin
      for (int s = 0; s < ISSUE_W; s++) begin
        wb_en[s] = 1; wb_addr[s] = preg_t'(r + s); wb_data[s] = val(-1 - (r + s));
        value_of[r + s] = val(-1 - (r + s));
        known[r + s] = 1;
      end
      @(posedge clk); #1;
    end
    for (int s = 0; s < ISSUE_W; s++) wb_en[s] = 0;
    rst_n = 1;
    @(negedge clk);
    stream = 32'h1000_0000;
    run_phase(N_MEM_ITER, 64, stream);
    wait (rob.size() == 0);
    p_mem = perf;
    $display("memory-intensive phase: %0d instructions, %0d cycles, IQ occupancy %0.1f, replays %0d",
             p_mem.dispatched, p_mem.cycles, real'(p_mem.iq_occ_sum) / p_mem.cycles, p_mem.replays);
    p_mem = perf;
    run_phase(N_ILP_ITER, 8, stream);
    wait (rob.size() == 0);
    $display("ILP-intensive phase: %0d instructions, %0d cycles, IQ occupancy %0.1f, replays %0d",
             perf.dispatched - p_mem.dispatched, perf.cycles - p_mem.cycles,
             real'(perf.iq_occ_sum - p_mem.iq_occ_sum) / (perf.cycles - p_mem.cycles),
             perf.replays - p_mem.replays);
    p_mem = perf;
    run_phase3(N_ALT_ITER, 1'b0);
    wait (rob.size() == 0);
    repeat (20) @(posedge clk);
    $display("mispredicted-load phase: %0d instructions, %0d cycles, IQ occupancy %0.1f, replays %0d",
             perf.dispatched - p_mem.dispatched, perf.cycles - p_mem.cycles,
             real'(perf.iq_occ_sum - p_mem.iq_occ_sum) / (perf.cycles - p_mem.cycles),
             perf.replays - p_mem.replays);
    p_mem = perf;
    @(negedge clk);
    run_phase3(N_L2_ITER, 1'b1);
    wait (rob.size() == 0);
    repeat (20) @(posedge clk);
    $display("L2-hit phase: %0d instructions, %0d cycles, IQ occupancy %0.1f, replays %0d",
             perf.dispatched - p_mem.dispatched, perf.cycles - p_mem.cycles,
             real'(perf.iq_occ_sum - p_mem.iq_occ_sum) / (perf.cycles - p_mem.cycles),
             perf.replays - p_mem.replays);
    checks++;
    if (n_exec != n_disp || perf.dispatched != 32'(n_disp)) begin
      failures++; $display("FAIL dispatched %0d executed %0d", n_disp, n_exec);
    end
    checks++;
    if (perf.replays != 32'(n_replay_seen)) begin failures++; $display("FAIL replay count"); end
    $display("mechanisms:");
    expect_seen(perf.pred_lht,    "load latency from the LHT");
    expect_seen(perf.pred_silo,   "load latency from the SILO");
    expect_seen(perf.pred_md,     "load latency from the miss detection engine");
    expect_seen(perf.replays,     "scheduling replays");
    expect_seen(perf.lock_stalls, "sorting-queue lock stalls (cycles)");
    expect_seen(perf.sort_full,   "full sorting class (cycles)");
    // these loops fill a 32-entry issue queue, not a larger one
    if (IQ_ENTRIES <= 32) begin
      expect_seen(perf.pib_used,    "PIB holding for a full issue queue (cycles)");
      expect_seen(perf.iq_full,     "full issue queue (cycles)");
    end else begin
      $display("  %-44s %0d", "PIB holding for a full issue queue (cycles)", perf.pib_used);
      $display("  %-44s %0d", "full issue queue (cycles)", perf.iq_full);
    end
    expect_seen(max_issue == ISSUE_W, "8-wide issue");
    for (int q = 0; q < 8; q++) expect_seen(q_used[q], $sformatf("instructions into sorting queue %0d", q));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
