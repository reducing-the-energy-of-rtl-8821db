// tb_timing_table: self-checking testbench of the rename map with completion
// times.  A reference model keeps, per architectural register, the physical
// register, the cycle at which the value is expected and the producer's
// sequence number.  Random instructions (random op classes, loads with random
// predicted latencies, random idle cycles) are dispatched; for each, the
// physical sources, waiting time (latest source completion minus now, at
// least 0), latency, sequence number and lock information are compared with
// the model.
module tb_timing_table;
  import sched_pkg::*;
  logic clk = 0, rst_n = 0;
  ts_t now = '0;
  logic in_fire = 0;
  instr_t in_instr = '0;
  lat_t in_pred_lat = '0;
  uop_t out_uop;
  int checks = 0, failures = 0;
  longint cyc = 0;

  timing_table dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin now <= now + 1; cyc <= cyc + 1; end

  int     m_ptag [NUM_AREGS];
  longint m_done [NUM_AREGS];
  bit     m_pv   [NUM_AREGS];
  int     m_seq  [NUM_AREGS];
  int     seq = 0;

  function automatic int lat_of(op_t op, int pl);
    case (op)
      OP_ALU: return 1;  OP_MUL: return 5;  OP_DIV: return 25;
      OP_FADD: return 2; OP_FMUL: return 10; OP_FDIV: return 30;
      OP_LOAD: return pl;
      default: return 1;
    endcase
  endfunction

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < NUM_AREGS; r++) begin m_ptag[r] = r; m_done[r] = 0; m_pv[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 3000; n++) begin
      instr_t ins;
      longint w1, w2, w;
      int lat;
      ins = '0;
      ins.op = op_t'($urandom_range(0, 8));
      ins.pc = 32'($urandom);
      ins.src1_v = $urandom_range(0, 3) != 0; ins.src1 = areg_t'($urandom_range(0, 7));
      ins.src2_v = $urandom_range(0, 1) != 0; ins.src2 = areg_t'($urandom_range(0, 7));
      ins.dst_v = $urandom_range(0, 4) != 0;  ins.dst = areg_t'($urandom_range(0, 7));
      ins.pdst = preg_t'($urandom_range(64, 191));
      in_instr = ins;
      in_pred_lat = lat_t'($urandom_range(1, 200));
      #1;
      w1 = ins.src1_v ? m_done[ins.src1] - cyc : 0; if (w1 < 0) w1 = 0;
      w2 = ins.src2_v ? m_done[ins.src2] - cyc : 0; if (w2 < 0) w2 = 0;
      w = (w1 > w2) ? w1 : w2;
      lat = lat_of(ins.op, int'(in_pred_lat));
      checks++;
      if (out_uop.wait_t !== lat_t'(w) || out_uop.lat !== lat_t'(lat) ||
          out_uop.seq !== seq_t'(seq) ||
          (ins.src1_v && out_uop.ps1 !== preg_t'(m_ptag[ins.src1])) ||
          (ins.src2_v && out_uop.ps2 !== preg_t'(m_ptag[ins.src2])) ||
          out_uop.lk1_v !== (ins.src1_v && m_pv[ins.src1]) ||
          (out_uop.lk1_v && out_uop.lk1 !== seq_t'(m_seq[ins.src1])) ||
          out_uop.lk2_v !== (ins.src2_v && m_pv[ins.src2])) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d wait=%0d exp %0d lat=%0d exp %0d seq=%0d ps1=%0d exp %0d",
                   n, out_uop.wait_t, w, out_uop.lat, lat, out_uop.seq, out_uop.ps1,
                   m_ptag[ins.src1]);
      end
      in_fire <= 1;
      @(posedge clk); #1;
      in_fire <= 0;
      if (ins.dst_v) begin
        m_ptag[ins.dst] = ins.pdst;
        m_done[ins.dst] = (cyc - 1) + ((w + lat > 1024) ? 1024 : w + lat);
        m_pv[ins.dst] = 1;
        m_seq[ins.dst] = seq;
      end
      seq++;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
