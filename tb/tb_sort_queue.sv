// tb_sort_queue: self-checking testbench of one sorting FIFO (default depth 5).
// A SystemVerilog queue is the reference.  Random pushes with random release
// times and pops of due heads run for many cycles; each cycle the testbench
// checks count, full, head contents, and that the head is reported due
// exactly when the timestamp has reached its release time.  It also fills
// the FIFO, checks that a push to a full FIFO is dropped, and pushes and pops
// together while full.
module tb_sort_queue;
  import sched_pkg::*;
  localparam int unsigned DEPTH = 5;
  logic clk = 0, rst_n = 0;
  ts_t now = '0;
  logic push = 0, pop = 0;
  uop_t push_uop = '0, head_uop;
  ts_t push_rel = '0;
  logic full, head_valid, head_due;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;

  sort_queue #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { seq_t seq; ts_t rel; } item_t;
  item_t m [$];

  task automatic compare(string what);
    bit due;
    checks++;
    due = (m.size() > 0) && ts_reached(now, m[0].rel);
    if (count !== $bits(count)'(m.size()) || full !== (m.size() == DEPTH) ||
        head_valid !== (m.size() > 0) || head_due !== due ||
        (m.size() > 0 && head_uop.seq !== m[0].seq)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s t=%0d cnt=%0d/%0d due=%b/%b seq=%0d/%0d rel=%0d/%0d", what, now, count, m.size(), head_due, due, head_uop.seq, m[0].seq, dut.mem_rel[dut.rd_q], m[0].rel);
    end
  endtask

  // drive one cycle: optional push and pop, then update the model
  task automatic cycle(bit p, bit q, seq_t s, ts_t rel);
    bit did_pop;
    push = p; pop = q; push_uop.seq = s; push_rel = rel;
    #1;
    did_pop = q && m.size() > 0;
    @(posedge clk); #1;
    now = now + 1;
    #1;
    push = 0; pop = 0;
    if (did_pop) void'(m.pop_front());
    if (p && (m.size() < DEPTH || did_pop)) m.push_back('{s, rel});
    compare("cycle");
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    seq_t s;
    s = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    compare("reset");
    // fill, overflow attempt, push+pop when full
    for (int k = 0; k < DEPTH + 1; k++) begin cycle(1, 0, s, now + ts_t'(3)); s++; end
    cycle(1, 1, s, now); s++;
    for (int n = 0; n < 4000; n++) begin
      bit p, q;
      p = $urandom_range(0, 2) != 0;
      q = head_due && $urandom_range(0, 3) != 0;
      cycle(p, q, s, now + ts_t'($urandom_range(0, 12)));
      if (p) s++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
