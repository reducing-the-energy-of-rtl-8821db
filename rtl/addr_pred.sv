// addr_pred: tagless, PC-indexed load address predictor.
//
// Each of ENTRIES entries holds 40 bits: the last effective address a load at
// that PC used (32 bits) and the last stride (8 bits, signed).  The prediction
// is last address + stride.  The table size (8K entries) and the 40-bit entry
// follow the design; the stride scheme that fills the 40 bits is this
// implementation's choice, since the design only names "a load address
// predictor".
//
// Interface and timing: a lookup presented with rd_en in cycle t returns
// pred_addr in cycle t+1 (synchronous read, like an SRAM), and pred_addr holds
// its value while rd_en is low.  An update (upd_en, upd_pc, upd_addr) is
// written at the clock edge; a read of the same entry in that cycle sees the
// old contents.  A stride that does not fit in 8 bits is stored as 0.
module addr_pred
  import sched_pkg::*;
#(
  parameter int unsigned ENTRIES  = 8192,
  parameter int unsigned STRIDE_W = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rd_en,
  input  pc_t   rd_pc,
  output addr_t pred_addr,
  input  logic  upd_en,
  input  pc_t   upd_pc,
  input  addr_t upd_addr
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  typedef struct packed {
    addr_t                last;
    logic [STRIDE_W-1:0]  stride;
  } ap_entry_t;

  ap_entry_t table_q [ENTRIES];

  // PCs are word aligned: drop the two low bits before indexing
  function automatic logic [IDX_W-1:0] idx(pc_t pc);
    return pc[IDX_W+1:2];
  endfunction

  ap_entry_t   rd_entry;
  ap_entry_t   old_entry;
  addr_t       delta;
  logic        fits;
  ap_entry_t   new_entry;

  always_comb begin
    old_entry = table_q[idx(upd_pc)];
    delta     = upd_addr - old_entry.last;
    // fits in a signed STRIDE_W-bit field when the bits above it are a sign extension
    fits      = (delta[ADDR_W-1:STRIDE_W-1] == '0) || (delta[ADDR_W-1:STRIDE_W-1] == '1);
    new_entry.last   = upd_addr;
    new_entry.stride = fits ? delta[STRIDE_W-1:0] : '0;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_entry <= table_q[idx(rd_pc)];
    if (upd_en) table_q[idx(upd_pc)] <= new_entry;
  end

  assign pred_addr = rd_entry.last + {{(ADDR_W-STRIDE_W){rd_entry.stride[STRIDE_W-1]}}, rd_entry.stride};

  // rst_n only clears nothing architecturally visible: the table is a
  // predictor and may start with any contents.
  logic unused_rst;
  assign unused_rst = rst_n;
endmodule
