// tb_addr_pred: self-checking testbench of the stride load address predictor.
// A reference model (last address and stride per table index, stride kept only
// when it fits in 8 signed bits) is trained with the same random updates; every
// lookup, answered one cycle later, is compared with it.  Strided streams
// exercise the stride path, random jumps the "does not fit" path.
module tb_addr_pred;
  import sched_pkg::*;
  localparam int unsigned ENTRIES = 8192;
  logic clk = 0, rst_n = 0;
  logic rd_en = 0, upd_en = 0;
  pc_t rd_pc = '0, upd_pc = '0;
  addr_t pred_addr, upd_addr = '0;
  int checks = 0, failures = 0;

  addr_pred #(.ENTRIES(ENTRIES)) dut (.*);
  always #5 clk = ~clk;

  addr_t m_last [int];
  int    m_str  [int];
  bit    m_v    [int];

  function automatic int ix(pc_t pc); return int'(pc[14:2]); endfunction

  task automatic train(pc_t pc, addr_t a);
    int i; longint d;
    i = ix(pc);
    upd_en = 1; upd_pc = pc; upd_addr = a;
    @(posedge clk); #1;
    upd_en = 0;
    if (m_v.exists(i)) begin
      d = longint'($signed(a - m_last[i]));
      m_str[i] = (d >= -128 && d <= 127) ? int'(d) : 0;
    end else m_str[i] = 0;  // untrained: the test trains every PC twice before checking
    m_last[i] = a; m_v[i] = 1;
  endtask

  task automatic check(pc_t pc);
    addr_t exp;
    rd_en = 1; rd_pc = pc;
    @(posedge clk); #1;
    rd_en = 0;
    exp = m_last[ix(pc)] + addr_t'(m_str[ix(pc)]);
    checks++;
    if (pred_addr !== exp) begin
      failures++;
      $display("FAIL pc=%h pred=%h exp=%h", pc, pred_addr, exp);
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pc_t pcs [8];
    addr_t base [8];
    int stride [8];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      pcs[k] = pc_t'((k * 37 + 5) * 4) + pc_t'(32'h0040_0000);
      base[k] = addr_t'($urandom);
      stride[k] = (k < 6) ? (k * 8 - 16) : 4000;   // last two: too large to store
    end
    // first touch of each PC sets a stride relative to the random table start:
    // train twice so the model and the table agree from a known state
    for (int k = 0; k < 8; k++) begin
      train(pcs[k], base[k]);
      train(pcs[k], base[k]);
      m_str[ix(pcs[k])] = 0;
    end
    for (int n = 1; n < 40; n++)
      for (int k = 0; k < 8; k++) begin
        train(pcs[k], base[k] + addr_t'(n * stride[k]));
        check(pcs[k]);
      end
    // a read in the same cycle as the update sees the old entry
    rd_en = 1; rd_pc = pcs[0]; upd_en = 1; upd_pc = pcs[0]; upd_addr = 32'h1234_5678;
    @(posedge clk); #1;
    rd_en = 0; upd_en = 0;
    checks++;
    if (pred_addr !== m_last[ix(pcs[0])] + addr_t'(m_str[ix(pcs[0])])) begin
      failures++; $display("FAIL read-during-write");
    end
    // the prediction holds while rd_en is low
    repeat (3) @(posedge clk);
    checks++;
    if (pred_addr !== m_last[ix(pcs[0])] + addr_t'(m_str[ix(pcs[0])])) begin
      failures++; $display("FAIL hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
