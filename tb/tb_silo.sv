// tb_silo: self-checking testbench of the Status of In-flight Loads table.
// Checks: no alias when empty; an allocated block is found by any address in
// the same 32-byte block with the right remaining time, counting down each
// cycle and stopping at 0; a fill frees the entry; a second allocation of the
// same block refreshes rather than duplicates; with all 8 entries taken, a new
// block replaces the one with the earliest arrival.
module tb_silo;
  import sched_pkg::*;
  logic clk = 0, rst_n = 0;
  ts_t now = '0;
  addr_t lk_addr = '0, alloc_addr = '0, fill_addr = '0;
  logic lk_hit, alloc_en = 0, fill_en = 0;
  lat_t lk_remain, alloc_lat = '0;
  int checks = 0, failures = 0;

  silo dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  task automatic alloc(addr_t a, int lat);
    alloc_en = 1; alloc_addr = a; alloc_lat = lat_t'(lat);
    @(posedge clk); #1;
    alloc_en = 0;
  endtask

  task automatic expect_look(addr_t a, bit hit, int remain, string what);
    lk_addr = a;
    #1;
    checks++;
    if (lk_hit !== hit || (hit && lk_remain !== lat_t'(remain))) begin
      failures++;
      $display("FAIL %s: hit=%b remain=%0d exp %b/%0d", what, lk_hit, lk_remain, hit, remain);
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    expect_look(32'h1000, 0, 0, "empty");
    alloc(32'h1000, 100);                      // arrival = alloc cycle + 100
    expect_look(32'h101f, 1, 99, "same block");
    expect_look(32'h1020, 0, 0, "next block");
    repeat (10) @(posedge clk); #1;
    expect_look(32'h1004, 1, 89, "countdown");
    alloc(32'h1008, 20);                       // same block again: refresh
    expect_look(32'h1000, 1, 19, "refresh");
    repeat (25) @(posedge clk); #1;
    expect_look(32'h1000, 1, 0, "due");
    fill_en = 1; fill_addr = 32'h1010;
    @(posedge clk); #1;
    fill_en = 0;
    expect_look(32'h1000, 0, 0, "filled");
    // fill all 8 entries; the earliest arrival is block 3
    for (int k = 0; k < 8; k++) alloc(32'h8000 + k * 32, (k == 3) ? 30 : 200 + k);
    for (int k = 0; k < 8; k++) expect_look(32'h8000 + k * 32, 1, ((k == 3) ? 30 : 200 + k) - (8 - k), "full");
    alloc(32'h9000, 50);
    expect_look(32'h9000, 1, 49, "replacement");
    expect_look(32'h8000 + 3 * 32, 0, 0, "victim");
    expect_look(32'h8000, 1, 200 - 9, "survivor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
