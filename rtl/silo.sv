// silo: Status of In-flight Loads.
//
// A small fully associative table (8 entries) of cache blocks that are on
// their way into the L1 cache, each with the timestamp at which its data is
// expected.  A load whose address falls in such a block will not see an L1 or
// L2 hit nor a full memory latency: it waits for the block already in flight.
// The lookup reports whether the address aliases an in-flight block and how
// many cycles remain until the block arrives (0 if the expected time has
// passed).  The size (8 entries, fully associative) follows the design; the
// entry contents (27-bit block address + 16-bit arrival timestamp), the
// allocation policy and the release on fill are this implementation's choice.
//
// Interface and timing: the lookup is combinational.  alloc_en records a
// block (alloc_addr) that missed and will arrive after alloc_lat cycles; an
// existing entry for the same block is refreshed instead of duplicated, else a
// free entry is used, else the entry with the earliest arrival is replaced.
// fill_en frees the entry of a block that has arrived.  Entries whose arrival
// time passed long ago stay until filled or replaced.
module silo
  import sched_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned BLK_W   = 5    // log2 of the 32-byte L1 block
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ts_t   now,
  input  addr_t lk_addr,
  output logic  lk_hit,
  output lat_t  lk_remain,
  input  logic  alloc_en,
  input  addr_t alloc_addr,
  input  lat_t  alloc_lat,
  input  logic  fill_en,
  input  addr_t fill_addr
);
  localparam int unsigned BA_W = ADDR_W - BLK_W;
  localparam int unsigned E_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef struct packed {
    logic            v;
    logic [BA_W-1:0] blk;
    ts_t             arrive;
  } silo_entry_t;

  silo_entry_t ent_q [ENTRIES];

  // Lookup
  always_comb begin
    ts_t d;
    lk_hit    = 1'b0;
    lk_remain = '0;
    d         = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent_q[i].v && ent_q[i].blk == lk_addr[ADDR_W-1:BLK_W]) begin
        lk_hit = 1'b1;
        d = ent_q[i].arrive - now;
        if (d[TS_W-1])                  lk_remain = '0;        // already due
        else if (d > ts_t'(MAX_LAT))    lk_remain = lat_t'(MAX_LAT);
        else                            lk_remain = d[LAT_W-1:0];
      end
    end
  end

  // Allocation slot: matching entry, else first free, else earliest arrival
  logic [E_W-1:0] slot;
  always_comb begin
    logic found;
    logic [E_W-1:0] oldest;
    found  = 1'b0;
    slot   = '0;
    oldest = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (ent_q[i].arrive - ent_q[oldest].arrive >= ts_t'(1 << (TS_W-1)))
        oldest = E_W'(i);
    for (int i = 0; i < ENTRIES; i++)
      if (!found && ent_q[i].v && ent_q[i].blk == alloc_addr[ADDR_W-1:BLK_W]) begin
        found = 1'b1;
        slot  = E_W'(i);
      end
    for (int i = 0; i < ENTRIES; i++)
      if (!found && !ent_q[i].v) begin
        found = 1'b1;
        slot  = E_W'(i);
      end
    if (!found) slot = oldest;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent_q[i] <= '0;
    end else begin
      if (fill_en)
        for (int i = 0; i < ENTRIES; i++)
          if (ent_q[i].v && ent_q[i].blk == fill_addr[ADDR_W-1:BLK_W]) ent_q[i].v <= 1'b0;
      if (alloc_en) begin
        ent_q[slot].v      <= 1'b1;
        ent_q[slot].blk    <= alloc_addr[ADDR_W-1:BLK_W];
        ent_q[slot].arrive <= now + ts_t'(alloc_lat);
      end
    end
  end
endmodule
