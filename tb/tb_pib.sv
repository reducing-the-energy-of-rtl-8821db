// tb_pib: self-checking testbench of the 64-entry preissue buffer.
// Random valid on the input and random ready on the output, checked against
// a SystemVerilog queue: order, count, ready low exactly when 64 entries are
// held, and no entry lost or duplicated.  One phase holds the output to fill
// the buffer completely.
module tb_pib;
  import sched_pkg::*;
  localparam int unsigned DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  uop_t in_uop = '0, out_uop;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  int max_seen = 0;

  pib dut (.*);
  always #5 clk = ~clk;

  seq_t m [$];

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
    for (int n = 0; n < 6000; n++) begin
      bit pushed, popped;
      in_valid = $urandom_range(0, 3) != 0;
      out_ready = (n >= 200 && n < 300) ? 1'b0 : ($urandom_range(0, 2) != 0);
      in_uop.seq = s;
      #1;
      checks++;
      if (in_ready !== (m.size() < DEPTH) || out_valid !== (m.size() > 0) ||
          count !== $bits(count)'(m.size()) || (m.size() > 0 && out_uop.seq !== m[0])) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d size=%0d count=%0d", n, m.size(), count);
      end
      pushed = in_valid && in_ready;
      popped = out_valid && out_ready;
      @(posedge clk); #1;
      if (popped) void'(m.pop_front());
      if (pushed) begin m.push_back(s); s++; end
      if (m.size() > max_seen) max_seen = m.size();
    end
    checks++;
    if (max_seen != DEPTH) begin failures++; $display("FAIL never full (%0d)", max_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
