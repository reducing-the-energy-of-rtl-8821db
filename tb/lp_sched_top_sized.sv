// lp_sched_top_sized: test helper that builds the latency-predicting
// scheduler with an issue queue of IQ_ENTRIES entries.
//
// It only instantiates lp_sched_top with that one parameter changed and
// passes every port straight through, so that the end-to-end testbench can
// run the same test on another issue-queue size while its default build names
// the top with no parameter list at all.  The ports, their meaning and their
// timing are exactly those of lp_sched_top; every other parameter keeps the
// top's default.  Both issue-queue sizes, 32 and 64, are the design's; this
// wrapper is the testbench's own.
module lp_sched_top_sized
  import sched_pkg::*;
#(
  parameter int unsigned IQ_ENTRIES = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  instr_t in_instr,
  output logic   ex_valid  [8],
  output logic   ex_replay [8],
  output uop_t   ex_uop    [8],
  output logic [63:0] ex_opnd [16],
  input  logic   wb_en   [8],
  input  preg_t  wb_addr [8],
  input  logic [63:0] wb_data [8],
  input  logic   ld_done [2],
  input  preg_t  ld_tag  [2],
  input  logic   fill_en,
  input  level_t fill_level,
  input  addr_t  fill_addr,
  input  logic   miss_en,
  input  addr_t  miss_addr,
  input  lat_t   miss_lat,
  output perf_t  perf
);
  lp_sched_top #(.IQ_ENTRIES(IQ_ENTRIES)) u_top (.*);
endmodule
