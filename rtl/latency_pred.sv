// latency_pred: look-ahead load latency predictor.
//
// Predicts, before an instruction enters the scheduling window, how many
// cycles a load will take.  It is two pipeline stages deep:
//   stage 1 (cycle t):   the PC reads the latency history table (LHT) and the
//                        load address predictor (both synchronous tables);
//   stage 2 (cycle t+1): if the LHT is confident, its last latency is the
//                        prediction.  Otherwise the predicted address is
//                        looked up in the SILO (a block already in flight:
//                        predict its remaining time, at least an L1 hit) and
//                        in the cache miss detection engine (predict the L1,
//                        L2 or memory latency of the level it expects).
// Asking the LHT first and the address-based structures only when it is not
// confident follows the design.  Letting a SILO hit take precedence over the
// miss detection engine, and the rule for an aliasing load (remaining time, at
// least the L1 latency), are this implementation's choices.
//
// Interface and timing: present rd_en/rd_pc in cycle t; pred_lat and pred_src
// are valid (combinationally) in cycle t+1 and hold while rd_en stays low, so
// a stalled pipeline keeps its prediction.  The update ports train the
// sub-tables: ap_upd_* with a load's real address at execute, lht_upd_* with
// its measured latency at completion, fill_* when a block fills a cache level,
// and silo_alloc_* when a load misses and its block starts to come in.
module latency_pred
  import sched_pkg::*;
#(
  parameter int unsigned AP_ENTRIES  = 8192,
  parameter int unsigned LHT_ENTRIES = 2048,
  parameter int unsigned SILO_ENTRIES = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  ts_t    now,
  input  logic   rd_en,
  input  pc_t    rd_pc,
  output lat_t   pred_lat,
  output logic [1:0] pred_src,    // 0: LHT, 1: SILO, 2: miss detection
  output level_t pred_level,
  output addr_t  pred_addr,
  input  logic   ap_upd_en,
  input  pc_t    ap_upd_pc,
  input  addr_t  ap_upd_addr,
  input  logic   lht_upd_en,
  input  pc_t    lht_upd_pc,
  input  lat_t   lht_upd_lat,
  input  logic   fill_en,
  input  level_t fill_level,
  input  addr_t  fill_addr,
  input  logic   silo_alloc_en,
  input  addr_t  silo_alloc_addr,
  input  lat_t   silo_alloc_lat
);
  lat_t   lht_lat;
  logic   lht_conf;
  logic   silo_hit;
  lat_t   silo_remain;
  level_t md_level;

  addr_pred #(.ENTRIES(AP_ENTRIES)) u_ap (
    .clk, .rst_n, .rd_en, .rd_pc, .pred_addr,
    .upd_en(ap_upd_en), .upd_pc(ap_upd_pc), .upd_addr(ap_upd_addr)
  );

  lht #(.ENTRIES(LHT_ENTRIES)) u_lht (
    .clk, .rst_n, .rd_en, .rd_pc, .pred_lat(lht_lat), .pred_conf(lht_conf),
    .upd_en(lht_upd_en), .upd_pc(lht_upd_pc), .upd_lat(lht_upd_lat)
  );

  miss_detect u_md (
    .clk, .rst_n, .lk_addr(pred_addr), .lk_level(md_level),
    .fill_en, .fill_level, .fill_addr
  );

  // An L1 fill ends the block's time in flight
  silo #(.ENTRIES(SILO_ENTRIES)) u_silo (
    .clk, .rst_n, .now, .lk_addr(pred_addr), .lk_hit(silo_hit), .lk_remain(silo_remain),
    .alloc_en(silo_alloc_en), .alloc_addr(silo_alloc_addr), .alloc_lat(silo_alloc_lat),
    .fill_en(fill_en && fill_level == LVL_L1), .fill_addr
  );

  always_comb begin
    pred_level = md_level;
    if (lht_conf) begin
      pred_lat = lht_lat;
      pred_src = 2'd0;
    end else if (silo_hit) begin
      pred_lat = (silo_remain > lat_t'(L1_LAT)) ? silo_remain : lat_t'(L1_LAT);
      pred_src = 2'd1;
    end else begin
      pred_src = 2'd2;
      case (md_level)
        LVL_L1:  pred_lat = lat_t'(L1_LAT);
        LVL_L2:  pred_lat = lat_t'(L2_LAT);
        default: pred_lat = lat_t'(MEM_LAT);
      endcase
    end
  end
endmodule
