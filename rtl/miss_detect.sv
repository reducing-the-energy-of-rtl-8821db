// miss_detect: cache miss detection engine.
//
// Tells, from a (predicted) load address, which level of the memory hierarchy
// the load is expected to hit in: L1, L2 or main memory.  The design uses such
// an engine as a small structure in front of the caches but does not describe
// its insides; this implementation keeps one direct-mapped table of partial
// tags per cache level.  A table entry is indexed by the low bits of the block
// address at that level (32-byte blocks for L1, 64-byte for L2) and remembers
// PTAG_W further address bits of the last block filled there.  A lookup whose
// partial tag matches a valid entry reports "present" at that level; the
// lowest level that reports present is the prediction, and an address found in
// neither table is predicted to go to memory.  Evictions are not tracked: a
// block is forgotten only when another block fills the same table entry.
//
// Interface and timing: the lookup is combinational (lk_addr -> lk_level).
// Fill notifications (fill_en, fill_level, fill_addr) from the caches are
// written at the clock edge.  Reset invalidates both tables.
module miss_detect
  import sched_pkg::*;
#(
  parameter int unsigned L1_ENTRIES = 256,   // one per L1 block (8KB / 32B)
  parameter int unsigned L1_BLK_W   = 5,     // log2 of the 32-byte L1 block
  parameter int unsigned L2_ENTRIES = 2048,
  parameter int unsigned L2_BLK_W   = 6,     // log2 of the 64-byte L2 block
  parameter int unsigned PTAG_W     = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  addr_t  lk_addr,
  output level_t lk_level,
  input  logic   fill_en,
  input  level_t fill_level,   // LVL_L1 or LVL_L2
  input  addr_t  fill_addr
);
  localparam int unsigned I1_W = $clog2(L1_ENTRIES);
  localparam int unsigned I2_W = $clog2(L2_ENTRIES);

  logic [PTAG_W-1:0]     l1_tag_q [L1_ENTRIES];
  logic [PTAG_W-1:0]     l2_tag_q [L2_ENTRIES];
  logic [L1_ENTRIES-1:0] l1_v_q;
  logic [L2_ENTRIES-1:0] l2_v_q;

  function automatic logic [I1_W-1:0] i1(addr_t a);  return a[L1_BLK_W +: I1_W];  endfunction
  function automatic logic [PTAG_W-1:0] t1(addr_t a); return a[L1_BLK_W+I1_W +: PTAG_W]; endfunction
  function automatic logic [I2_W-1:0] i2(addr_t a);  return a[L2_BLK_W +: I2_W];  endfunction
  function automatic logic [PTAG_W-1:0] t2(addr_t a); return a[L2_BLK_W+I2_W +: PTAG_W]; endfunction

  logic in_l1, in_l2;
  always_comb begin
    in_l1 = l1_v_q[i1(lk_addr)] && (l1_tag_q[i1(lk_addr)] == t1(lk_addr));
    in_l2 = l2_v_q[i2(lk_addr)] && (l2_tag_q[i2(lk_addr)] == t2(lk_addr));
    if (in_l1)      lk_level = LVL_L1;
    else if (in_l2) lk_level = LVL_L2;
    else            lk_level = LVL_MEM;
  end

  always_ff @(posedge clk) begin
    if (fill_en && fill_level == LVL_L1) l1_tag_q[i1(fill_addr)] <= t1(fill_addr);
    if (fill_en && fill_level == LVL_L2) l2_tag_q[i2(fill_addr)] <= t2(fill_addr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_v_q <= '0;
      l2_v_q <= '0;
    end else if (fill_en) begin
      if (fill_level == LVL_L1) l1_v_q[i1(fill_addr)] <= 1'b1;
      if (fill_level == LVL_L2) l2_v_q[i2(fill_addr)] <= 1'b1;
    end
  end
endmodule
