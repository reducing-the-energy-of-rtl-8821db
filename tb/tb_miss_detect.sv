// tb_miss_detect: self-checking testbench of the cache miss detection engine.
// After reset every address is predicted to go to memory.  Fills into the L2
// and L1 tables make those blocks predicted as L2 or L1 hits, a fill of another
// block at the same table index displaces the first, and a random stream of
// fills and lookups is compared with a reference model of the two
// direct-mapped partial-tag tables.
module tb_miss_detect;
  import sched_pkg::*;
  logic clk = 0, rst_n = 0;
  addr_t lk_addr = '0, fill_addr = '0;
  level_t lk_level, fill_level = LVL_L1;
  logic fill_en = 0;
  int checks = 0, failures = 0;

  miss_detect dut (.*);
  always #5 clk = ~clk;

  int unsigned m1 [int];   // index -> partial tag
  int unsigned m2 [int];

  function automatic level_t model(addr_t a);
    if (m1.exists(int'(a[12:5])) && m1[int'(a[12:5])] == a[20:13]) return LVL_L1;
    if (m2.exists(int'(a[16:6])) && m2[int'(a[16:6])] == a[24:17]) return LVL_L2;
    return LVL_MEM;
  endfunction

  task automatic fill(level_t l, addr_t a);
    fill_en = 1; fill_level = l; fill_addr = a;
    @(posedge clk); #1;
    fill_en = 0;
    if (l == LVL_L1) m1[int'(a[12:5])] = a[20:13];
    else             m2[int'(a[16:6])] = a[24:17];
  endtask

  task automatic look(addr_t a, level_t exp);
    lk_addr = a;
    #1;
    checks++;
    if (lk_level !== exp) begin
      failures++;
      $display("FAIL addr=%h got %s exp %s", a, lk_level.name(), exp.name());
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    addr_t a, b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    a = 32'h0012_3440;
    look(a, LVL_MEM);
    fill(LVL_L2, a);          look(a, LVL_L2);
    fill(LVL_L1, a);          look(a, LVL_L1);
    look(a + 32'd31, LVL_L1); // same 32-byte block
    look(a + 32'd32, LVL_L2); // next L1 block, same 64-byte L2 block
    b = a + 32'h0000_2000;    // same L1 index, other tag
    fill(LVL_L1, b);          look(b, LVL_L1);
    look(a, LVL_L2);          // displaced from the L1 table
    for (int n = 0; n < 2000; n++) begin
      addr_t r;
      r = {$urandom_range(0, 3) == 0 ? 8'h00 : 8'h01, 9'h0, 15'($urandom)};
      if ($urandom_range(0, 1) == 0) fill($urandom_range(0, 1) ? LVL_L1 : LVL_L2, r);
      r = {$urandom_range(0, 3) == 0 ? 8'h00 : 8'h01, 9'h0, 15'($urandom)};
      look(r, model(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
