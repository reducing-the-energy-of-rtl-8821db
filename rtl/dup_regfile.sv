// dup_regfile: physical register file kept as two identical copies.
//
// An 8-issue machine needs 16 read ports and 8 write ports.  Instead of one
// array with all of them, the register file is held twice, each copy with 8
// read ports and 8 write ports: read ports 0..7 (the first half of the issue
// slots, two operands each for four slots) read copy 0, read ports 8..15 read
// copy 1, and every write goes to both copies.  The split and the port counts
// follow the design; the 192 x 64-bit size is this implementation's choice
// (128 in-flight results plus 64 architectural registers).
//
// Interface and timing: reads are combinational (address in, data out in the
// same cycle, no bypass of a same-cycle write); writes happen at the clock
// edge.  If two write ports name the same register, the higher-numbered port
// wins.  The contents are not reset.
module dup_regfile
  import sched_pkg::*;
#(
  parameter int unsigned REGS     = NUM_PREGS,
  parameter int unsigned DATA_W   = 64,
  parameter int unsigned RD_PORTS = 16,
  parameter int unsigned WR_PORTS = 8
) (
  input  logic              clk,
  input  preg_t             rd_addr [RD_PORTS],
  output logic [DATA_W-1:0] rd_data [RD_PORTS],
  input  logic              wr_en   [WR_PORTS],
  input  preg_t             wr_addr [WR_PORTS],
  input  logic [DATA_W-1:0] wr_data [WR_PORTS]
);
  localparam int unsigned HALF = RD_PORTS / 2;

  logic [DATA_W-1:0] copy0 [REGS];
  logic [DATA_W-1:0] copy1 [REGS];

  always_ff @(posedge clk) begin
    for (int w = 0; w < WR_PORTS; w++)
      if (wr_en[w] && 32'(wr_addr[w]) < REGS) begin
        copy0[wr_addr[w]] <= wr_data[w];
        copy1[wr_addr[w]] <= wr_data[w];
      end
  end

  always_comb begin
    for (int r = 0; r < RD_PORTS; r++)
      if (32'(rd_addr[r]) >= REGS) rd_data[r] = '0;
      else if (r < HALF)           rd_data[r] = copy0[rd_addr[r]];
      else                         rd_data[r] = copy1[rd_addr[r]];
  end
endmodule
