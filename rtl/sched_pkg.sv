// sched_pkg: types and constants shared by the latency-predicting speculative
// scheduler.
//
// The latencies below are the machine configuration of the design: L1 hit 2
// cycles, L2 hit 12 cycles, memory 164 cycles, integer add/mult/div 1/5/25 and
// floating-point add/mult/div 2/10/30 cycles.  Waiting times and completion
// times are 10-bit cycle counts, the width the design gives each timing-table
// entry.  Everything else here (address and PC widths, the physical register
// count, the 16-bit free-running timestamp, the op encoding) is this
// implementation's own choice.
package sched_pkg;

  localparam int unsigned PC_W    = 32;   // program counter bits
  localparam int unsigned ADDR_W  = 32;   // data address bits
  localparam int unsigned LAT_W   = 10;   // latency / waiting time bits
  localparam int unsigned TS_W    = 16;   // free-running timestamp bits
  localparam int unsigned AREG_W  = 6;    // 32 integer + 32 FP architectural registers
  localparam int unsigned NUM_AREGS = 64;
  localparam int unsigned PREG_W  = 8;    // physical register tag bits
  localparam int unsigned NUM_PREGS = 192; // 128 ROB entries + 64 architectural
  localparam int unsigned SEQ_W   = 16;   // dispatch sequence number bits

  // Memory hierarchy latencies (cycles)
  localparam int unsigned L1_LAT  = 2;
  localparam int unsigned L2_LAT  = 12;
  localparam int unsigned MEM_LAT = 164;
  localparam int unsigned MAX_LAT = (1 << LAT_W) - 1;

  typedef logic [PC_W-1:0]   pc_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LAT_W-1:0]  lat_t;
  typedef logic [TS_W-1:0]   ts_t;
  typedef logic [AREG_W-1:0] areg_t;
  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [SEQ_W-1:0]  seq_t;

  typedef enum logic [3:0] {
    OP_ALU, OP_MUL, OP_DIV, OP_FADD, OP_FMUL, OP_FDIV, OP_LOAD, OP_STORE, OP_BRANCH
  } op_t;

  // Level of the memory hierarchy a load is predicted to hit in
  typedef enum logic [1:0] {LVL_L1, LVL_L2, LVL_MEM} level_t;

  // Fixed execution latency of every non-load op class
  function automatic lat_t op_latency(op_t op);
    case (op)
      OP_ALU:    return lat_t'(1);
      OP_MUL:    return lat_t'(5);
      OP_DIV:    return lat_t'(25);
      OP_FADD:   return lat_t'(2);
      OP_FMUL:   return lat_t'(10);
      OP_FDIV:   return lat_t'(30);
      OP_LOAD:   return lat_t'(L1_LAT);
      default:   return lat_t'(1);
    endcase
  endfunction

  // Instruction as it arrives from rename (physical destination already
  // allocated by the external free list).
  typedef struct packed {
    pc_t   pc;
    op_t   op;
    logic  src1_v;
    areg_t src1;
    logic  src2_v;
    areg_t src2;
    logic  dst_v;
    areg_t dst;
    preg_t pdst;
    addr_t addr;     // effective address of a load (used when it executes)
  } instr_t;

  // Instruction once renamed and timed: what travels through the sorting
  // queues, the preissue buffer and the issue queue.
  typedef struct packed {
    seq_t  seq;
    pc_t   pc;
    op_t   op;
    logic  dst_v;
    preg_t pdst;
    logic  ps1_v;
    preg_t ps1;
    logic  ps2_v;
    preg_t ps2;
    lat_t  lat;      // predicted execution latency (loads: latency prediction)
    addr_t addr;
    lat_t  wait_t;   // predicted waiting time at dispatch
    ts_t   disp_ts;  // dispatch timestamp
    logic  lk1_v;    // locking: parent 1 still in the sorting engine
    seq_t  lk1;
    logic  lk2_v;
    seq_t  lk2;
  } uop_t;

  // Event counters of the whole scheduler, for energy accounting: occupancy
  // sums divided by cycles give average occupancies, issues and replays count
  // register file reads.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] dispatched;     // instructions accepted into the sorting engine
    logic [31:0] issued;         // selections (each reads the register file)
    logic [31:0] replays;        // misscheduled executions
    logic [31:0] iq_occ_sum;
    logic [31:0] sort_occ_sum;
    logic [31:0] pib_occ_sum;
    logic [31:0] lock_stalls;    // cycles a due sorting-queue head waited for a parent
    logic [31:0] pred_lht;       // load predictions from the LHT
    logic [31:0] pred_silo;      // ... from the SILO
    logic [31:0] pred_md;        // ... from the miss detection engine
    logic [31:0] sort_full;      // cycles an instruction waited for a sorting queue
    logic [31:0] pib_used;       // cycles the PIB held instructions the issue queue could not take
    logic [31:0] iq_full;        // cycles the issue queue had no free entry
  } perf_t;

  // Signed, wrap-safe "a has been reached at time now"
  function automatic logic ts_reached(ts_t now, ts_t t);
    ts_t d;
    d = now - t;
    return ~d[TS_W-1];
  endfunction

endpackage
