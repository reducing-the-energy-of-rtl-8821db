// lht: latency history table, a tagless PC-indexed last-latency predictor.
//
// Each entry remembers the latency the load at that PC saw last time and a
// 2-bit confidence counter.  When a load completes, an update with its measured
// latency either raises the counter (same latency again) or replaces the
// latency and clears the counter.  A lookup reports the stored latency and
// whether it is confident (counter >= CONF_THRESH).  The 2K-entry size follows
// the design; the design sizes each entry at 40 bits, of which this
// implementation uses 12 (10-bit latency, 2-bit counter): the remaining bits
// would hold nothing this predictor reads.
//
// Interface and timing: lookups with rd_en in cycle t answer in cycle t+1
// (synchronous read) and hold while rd_en is low.  Entries start invalid: a
// valid bit per entry is cleared by reset, and an invalid entry is never
// confident.
module lht
  import sched_pkg::*;
#(
  parameter int unsigned ENTRIES     = 2048,
  parameter int unsigned CONF_THRESH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rd_en,
  input  pc_t  rd_pc,
  output lat_t pred_lat,
  output logic pred_conf,
  input  logic upd_en,
  input  pc_t  upd_pc,
  input  lat_t upd_lat
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  typedef struct packed {
    lat_t       lat;
    logic [1:0] conf;
  } lht_entry_t;

  lht_entry_t         table_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;

  function automatic logic [IDX_W-1:0] idx(pc_t pc);
    return pc[IDX_W+1:2];
  endfunction

  lht_entry_t rd_entry;
  logic       rd_valid;
  lht_entry_t old_entry, new_entry;

  always_comb begin
    old_entry = table_q[idx(upd_pc)];
    if (valid_q[idx(upd_pc)] && old_entry.lat == upd_lat) begin
      new_entry.lat  = old_entry.lat;
      new_entry.conf = (old_entry.conf == 2'd3) ? 2'd3 : old_entry.conf + 2'd1;
    end else begin
      new_entry.lat  = upd_lat;
      new_entry.conf = 2'd0;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_entry <= table_q[idx(rd_pc)];
    if (upd_en) table_q[idx(upd_pc)] <= new_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      rd_valid <= 1'b0;
    end else begin
      if (rd_en) rd_valid <= valid_q[idx(rd_pc)];
      if (upd_en) valid_q[idx(upd_pc)] <= 1'b1;
    end
  end

  assign pred_lat  = rd_entry.lat;
  assign pred_conf = rd_valid && (rd_entry.conf >= 2'(CONF_THRESH));
endmodule
