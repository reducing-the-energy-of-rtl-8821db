// tb_sorting_engine: self-checking testbench of the sorting engine.
// Directed part: a lone instruction leaves exactly at its release time
// (dispatch + waiting time - LEAD, at the earliest the cycle after it
// entered), for delays in every queue class; a child with a short wait that
// depends on a parent with a long wait does not leave before the parent (the
// lock), and the engine reports the lock stall; filling the three length-1
// queues with not-yet-due instructions stalls a fourth of that class while a
// long-wait instruction is still accepted.  Random part: a stream of
// instructions with random waits and random parents, checked for: every
// instruction leaves exactly once, never before its release time, never
// before a parent that was still inside when it entered.
module tb_sorting_engine;
  import sched_pkg::*;
  localparam int unsigned LEAD = 9;
  logic clk = 0, rst_n = 0;
  ts_t now = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, lock_stall;
  uop_t in_uop = '0, out_uop;
  logic [15:0] occupancy;
  int checks = 0, failures = 0;
  int lock_stalls = 0;

  sorting_engine #(.LEAD(LEAD)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  // bookkeeping per sequence number
  longint rel_at  [int];
  longint in_at   [int];
  longint out_at  [int];
  int     parent1 [int];
  int     parent2 [int];
  longint cyc = 0;
  always @(posedge clk) begin
    if (rst_n && lock_stall) lock_stalls++;
    if (rst_n && out_valid && out_ready) begin
      int s;
      s = int'(out_uop.seq);
      if (out_at.exists(s)) begin failures++; $display("FAIL seq %0d left twice", s); end
      out_at[s] = cyc;
    end
    cyc <= cyc + 1;
  end

  seq_t next_seq = '0;

  // offer one instruction until accepted; returns its sequence number
  task automatic send(int wait_t, int p1, int p2, output int s);
    s = int'(next_seq);
    in_uop = '0;
    in_uop.seq = next_seq;
    in_uop.wait_t = lat_t'(wait_t);
    in_uop.disp_ts = now;
    in_uop.lk1_v = (p1 >= 0); in_uop.lk1 = seq_t'(p1 < 0 ? 0 : p1);
    in_uop.lk2_v = (p2 >= 0); in_uop.lk2 = seq_t'(p2 < 0 ? 0 : p2);
    in_valid = 1;
    #1;
    while (!in_ready) begin
      @(posedge clk); #1;
      in_uop.disp_ts = now;
    end
    in_at[s] = cyc;
    rel_at[s] = cyc + ((wait_t > LEAD) ? wait_t - LEAD : 0);
    parent1[s] = (p1 >= 0 && !out_at.exists(p1)) ? p1 : -1;
    parent2[s] = (p2 >= 0 && !out_at.exists(p2)) ? p2 : -1;
    @(posedge clk); #1;
    in_valid = 0;
    next_seq++;
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while (occupancy != 0 && guard < 2000) begin @(posedge clk); #1; guard++; end
    repeat (2) @(posedge clk); #1;
  endtask

  task automatic expect_leave(int s, longint at, string what);
    checks++;
    if (!out_at.exists(s) || out_at[s] != at) begin
      failures++;
      $display("FAIL %s: seq %0d left at %0d, expected %0d", what, s,
               out_at.exists(s) ? out_at[s] : -1, at);
    end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int s, a, b, c, d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // lone instructions in each class
    begin
      int waits [7] = '{0, 10, 14, 19, 29, 60, 300};
      foreach (waits[k]) begin
        send(waits[k], -1, -1, s);
        drain();
        expect_leave(s, (rel_at[s] > in_at[s] + 1) ? rel_at[s] : in_at[s] + 1, "lone");
      end
    end
    // lock: parent waits long, child is due at once
    send(80, -1, -1, a);
    send(0, a, -1, b);
    drain();
    checks++;
    if (!(out_at[b] > out_at[a])) begin failures++; $display("FAIL lock order"); end
    expect_leave(a, rel_at[a], "parent");
    checks++;
    if (lock_stalls == 0) begin failures++; $display("FAIL no lock stall seen"); end
    // class full: with the output held, three delay-1 instructions fill the
    // length-1 queues
    out_ready = 0;
    send(LEAD + 1, -1, -1, a);
    send(LEAD + 1, -1, -1, b);
    send(LEAD + 1, -1, -1, c);
    in_uop.seq = next_seq; in_uop.wait_t = lat_t'(LEAD + 1); in_uop.disp_ts = now;
    in_uop.lk1_v = 0; in_uop.lk2_v = 0;
    #1;
    checks++;
    if (in_ready) begin failures++; $display("FAIL length-1 class should be full"); end
    in_uop.wait_t = lat_t'(200);
    #1;
    checks++;
    if (!in_ready) begin failures++; $display("FAIL long queue should accept"); end
    in_valid = 0;
    out_ready = 1;
    drain();
    // random stream with backpressure on the output
    fork
      begin
        for (int n = 0; n < 1500; n++) begin
          int p1, p2, cur;
          cur = int'(next_seq);
          p1 = (cur > 0 && $urandom_range(0, 1)) ? cur - $urandom_range(1, (cur < 6) ? cur : 6) : -1;
          p2 = (cur > 0 && $urandom_range(0, 3) == 0) ? cur - 1 : -1;
          send($urandom_range(0, 3) == 0 ? $urandom_range(20, 250) : $urandom_range(0, 30), p1, p2, d);
        end
      end
      begin
        repeat (6000) begin
          out_ready = $urandom_range(0, 4) != 0;
          @(posedge clk); #1;
        end
        out_ready = 1;
      end
    join
    out_ready = 1;
    drain();
    foreach (in_at[k]) begin
      checks++;
      if (!out_at.exists(k)) begin failures++; $display("FAIL seq %0d never left", k); continue; end
      if (out_at[k] < rel_at[k] || out_at[k] <= in_at[k]) begin
        failures++; $display("FAIL seq %0d left early (%0d < %0d)", k, out_at[k], rel_at[k]);
      end
      if (parent1[k] >= 0 && out_at[k] <= out_at[parent1[k]]) begin
        failures++; $display("FAIL seq %0d left before parent %0d", k, parent1[k]);
      end
      if (parent2[k] >= 0 && out_at[k] <= out_at[parent2[k]]) begin
        failures++; $display("FAIL seq %0d left before parent %0d", k, parent2[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
