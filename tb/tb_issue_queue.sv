// tb_issue_queue: self-checking testbench of the speculative scheduler.
//
// The testbench plays the rest of the machine.  It inserts instructions, and
// answers each load that executes after its real latency (carried in the low
// bits of the load's address field for this test).  It keeps its own record of
// when every physical register's value really exists (a fixed-latency op's
// value lat cycles after it executes, a load's value when the testbench answers
// it).  Every instruction reaching execution is checked: it must be flagged as
// a replay exactly when one of its operands is not there yet.  At the end,
// every instruction must have executed correctly exactly once.
//
// Every execution must come exactly STE (7) cycles after its selection.
// Directed cases check the timing: a dependent of a 1-cycle ALU op executes
// the next cycle, of a 5-cycle multiply 5 cycles later, of a load whose latency
// was predicted right exactly when the data arrives; a dependent of a load
// predicted to hit (2 cycles) that really takes 30 replays twice, 12 cycles
// apart, and executes 42 cycles after the load.  Sixteen instructions woken by
// one producer issue 8 per cycle; four loads woken together issue 2 per cycle.
// A random phase mixes everything and fills the queue to its 32 entries.
module tb_issue_queue;
  import sched_pkg::*;
  localparam int unsigned ENTRIES = 32, ISSUE_W = 8, STE = 7;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  uop_t in_uop = '0;
  logic ex_valid [ISSUE_W], ex_replay [ISSUE_W];
  uop_t ex_uop [ISSUE_W];
  logic ld_done [2];
  preg_t ld_tag [2];
  logic [3:0] n_issued, n_replays;
  logic [5:0] occupancy;
  int checks = 0, failures = 0;

  issue_queue dut (.*);
  always #5 clk = ~clk;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // model state
  longint ready_at [NUM_PREGS];      // cycle the value exists; huge = not yet
  longint exec_at  [int];            // seq -> cycle of correct execution
  int     replays_of [int];
  longint sel_cyc [int];             // seq -> cycle of its latest selection
  int     inserted = 0, executed = 0, total_replays = 0;
  int     max_issued = 0, max_mem = 0, max_occ = 0;
  longint resp_at [$];               // pending load responses
  preg_t  resp_tag [$];
  localparam longint NEVER = 64'h7fff_ffff_ffff;

  uop_t   pending [$];               // instructions waiting to be inserted
  seq_t   next_seq = '0;

  function automatic bit avail(logic v, preg_t p, longint c);
    return !v || ready_at[p] <= c;
  endfunction

  task automatic add(op_t op, int pdst, int s1, int s2, int plat, int alat, output seq_t s);
    uop_t u;
    u = '0;
    u.seq = next_seq; s = next_seq; next_seq++;
    u.op = op;
    u.dst_v = (pdst >= 0); u.pdst = preg_t'(pdst < 0 ? 0 : pdst);
    u.ps1_v = (s1 >= 0);   u.ps1 = preg_t'(s1 < 0 ? 0 : s1);
    u.ps2_v = (s2 >= 0);   u.ps2 = preg_t'(s2 < 0 ? 0 : s2);
    u.lat = (op == OP_LOAD) ? lat_t'(plat) : op_latency(op);
    u.addr = addr_t'(alat);
    pending.push_back(u);
  endtask

  // everything happens at the falling edge: responses, checks, next insertion
  always @(negedge clk) begin
    if (rst_n) begin
      int nmem;
      // load responses due in this cycle (at most two per cycle)
      for (int k = 0; k < 2; k++) begin ld_done[k] = 0; ld_tag[k] = '0; end
      begin
        int k;
        k = 0;
        for (int i = 0; i < resp_at.size(); i++)
          if (resp_at[i] <= cyc && k < 2) begin
            ld_done[k] = 1; ld_tag[k] = resp_tag[i]; k++;
            ready_at[resp_tag[i]] = cyc;
            resp_at.delete(i); resp_tag.delete(i); i--;
          end
      end
      #1;
      nmem = 0;
      for (int s = 0; s < ISSUE_W; s++)
        if (ex_valid[s]) begin
          bit ok;
          int sq;
          sq = int'(ex_uop[s].seq);
          // selection to execution takes exactly STE cycles
          checks++;
          if (!sel_cyc.exists(sq) || cyc - sel_cyc[sq] != STE) begin
            failures++;
            if (failures < 10) $display("FAIL seq=%0d reached execute %0d cycles after select", sq,
                                        sel_cyc.exists(sq) ? cyc - sel_cyc[sq] : -1);
          end
          ok = avail(ex_uop[s].ps1_v, ex_uop[s].ps1, cyc) && avail(ex_uop[s].ps2_v, ex_uop[s].ps2, cyc);
          checks++;
          if (ex_replay[s] !== !ok) begin
            failures++;
            if (failures < 10) $display("FAIL cyc=%0d seq=%0d replay=%b model ok=%b", cyc, sq, ex_replay[s], ok);
          end
          if (ok) begin
            if (exec_at.exists(sq)) begin failures++; $display("FAIL seq %0d executed twice", sq); end
            exec_at[sq] = cyc;
            executed++;
            if (ex_uop[s].op == OP_LOAD) begin
              resp_at.push_back(cyc + longint'(ex_uop[s].addr[9:0]));
              resp_tag.push_back(ex_uop[s].pdst);
            end else if (ex_uop[s].dst_v) begin
              ready_at[ex_uop[s].pdst] = cyc + longint'(op_latency(ex_uop[s].op));
            end
          end else begin
            replays_of[sq] = replays_of.exists(sq) ? replays_of[sq] + 1 : 1;
            total_replays++;
          end
        end
      if (int'(n_issued) > max_issued) max_issued = int'(n_issued);
      if (int'(occupancy) > max_occ) max_occ = int'(occupancy);
      begin
        int m;
        m = 0;
        for (int e = 0; e < ENTRIES; e++) begin
          if (dut.sel[e] && (dut.uop_q[e].op == OP_LOAD || dut.uop_q[e].op == OP_STORE)) m++;
          if (dut.sel[e]) sel_cyc[int'(dut.uop_q[e].seq)] = cyc;
        end
        if (m > max_mem) max_mem = m;
      end
      // next insertion
      if (in_valid && in_ready_q) begin
        if (in_uop.dst_v) ready_at[in_uop.pdst] = NEVER;
        void'(pending.pop_front());
        inserted++;
      end
      in_valid = pending.size() > 0 && in_ready;
      if (pending.size() > 0) in_uop = pending[0];
      in_ready_q = in_ready;
    end
  end
  logic in_ready_q = 0;

  task automatic drain();
    int guard;
    guard = 0;
    while ((pending.size() > 0 || occupancy != 0 || resp_at.size() > 0) && guard < 5000) begin
      @(posedge clk); guard++;
    end
    repeat (3) @(posedge clk);
  endtask

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp); end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    seq_t a, b, c, d;
    seq_t grp [16];
    for (int p = 0; p < NUM_PREGS; p++) ready_at[p] = 0;
    for (int k = 0; k < 2; k++) begin ld_done[k] = 0; ld_tag[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // back to back ALU
    add(OP_ALU, 100, 1, 2, 0, 0, a);
    add(OP_ALU, 101, 100, -1, 0, 0, b);
    drain();
    expect_eq(exec_at[b] - exec_at[a], 1, "ALU dependent");
    // multiply
    add(OP_MUL, 102, 3, -1, 0, 0, a);
    add(OP_ALU, 103, 102, -1, 0, 0, b);
    drain();
    expect_eq(exec_at[b] - exec_at[a], 5, "MUL dependent");
    // load with the right predicted latency
    add(OP_LOAD, 104, 4, -1, 30, 30, a);
    add(OP_ALU, 105, 104, -1, 0, 0, b);
    drain();
    expect_eq(exec_at[b] - exec_at[a], 30, "load dependent, predicted");
    expect_eq(replays_of.exists(int'(b)) ? replays_of[int'(b)] : 0, 0, "no replay when predicted");
    // load predicted to hit, really 30 cycles: replay every 12 cycles
    add(OP_LOAD, 106, 4, -1, 2, 30, a);
    add(OP_ALU, 107, 106, -1, 0, 0, b);
    add(OP_ALU, 108, 107, -1, 0, 0, c);
    drain();
    expect_eq(exec_at[b] - exec_at[a], 42, "load dependent, mispredicted");
    expect_eq(replays_of.exists(int'(b)) ? replays_of[int'(b)] : 0, 2, "replays of dependent");
    checks++;
    if (!replays_of.exists(int'(c))) begin failures++; $display("FAIL grandchild never replayed"); end
    expect_eq(exec_at[c] - exec_at[b], 1, "grandchild after replay");
    // wide issue: 16 ALU ops woken by one divide
    add(OP_DIV, 110, 5, -1, 0, 0, a);
    for (int k = 0; k < 16; k++) add(OP_ALU, 111 + k, 110, -1, 0, 0, grp[k]);
    drain();
    expect_eq(max_issued, 8, "peak issue width");
    // four loads woken together: two per cycle
    add(OP_DIV, 130, 5, -1, 0, 0, a);
    for (int k = 0; k < 4; k++) add(OP_LOAD, 131 + k, 130, -1, 2, 2, grp[k]);
    drain();
    expect_eq(max_mem, 2, "load/store units per cycle");
    // random mix
    for (int n = 0; n < 3000; n++) begin
      int r, p1, p2, dst;
      op_t op;
      r = $urandom_range(0, 9);
      op = (r < 3) ? OP_LOAD : (r < 4) ? OP_MUL : (r < 5) ? OP_DIV : (r < 6) ? OP_STORE : OP_ALU;
      dst = (op == OP_STORE) ? -1 : 64 + (n % 128);
      p1 = (n > 0) ? 64 + ((n - $urandom_range(1, 8) + 128) % 128) : 1;
      p2 = $urandom_range(0, 1) ? 64 + ((n - $urandom_range(1, 20) + 128) % 128) : -1;
      if (n < 20) begin p1 = 1; p2 = -1; end
      begin
        int alat, plat;
        alat = ($urandom_range(0, 3) == 0) ? 164 : ($urandom_range(0, 2) == 0 ? 12 : 2);
        plat = $urandom_range(0, 1) ? alat : 2;
        add(op, dst, p1, p2, plat, alat, d);
      end
      // keep at most ~100 outstanding so no register is reused while in flight
      while (pending.size() > 20) @(posedge clk);
    end
    drain();
    expect_eq(executed, inserted, "every instruction executed once");
    checks++;
    if (max_occ != ENTRIES) begin failures++; $display("FAIL queue never full (%0d)", max_occ); end
    checks++;
    if (total_replays == 0) begin failures++; $display("FAIL no replays seen"); end
    $display("executed=%0d replays=%0d", executed, total_replays);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
