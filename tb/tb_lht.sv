// tb_lht: self-checking testbench of the latency history table.
// A reference model of the last latency and the 2-bit confidence counter per
// table index is driven with the same updates.  Checks: a never-trained entry
// is not confident; confidence is reached after the same latency is seen
// CONF_THRESH+1 times in a row; a new latency resets it; lookups answer one
// cycle after rd_en; random update streams agree with the model.
module tb_lht;
  import sched_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rd_en = 0, upd_en = 0;
  pc_t rd_pc = '0, upd_pc = '0;
  lat_t pred_lat, upd_lat = '0;
  logic pred_conf;
  int checks = 0, failures = 0;

  lht dut (.*);
  always #5 clk = ~clk;

  int m_lat [int];
  int m_cf  [int];

  function automatic int ix(pc_t pc); return int'(pc[12:2]); endfunction

  task automatic upd(pc_t pc, int lat);
    int i;
    i = ix(pc);
    upd_en = 1; upd_pc = pc; upd_lat = lat_t'(lat);
    @(posedge clk); #1;
    upd_en = 0;
    if (m_lat.exists(i) && m_lat[i] == lat) m_cf[i] = (m_cf[i] == 3) ? 3 : m_cf[i] + 1;
    else begin m_lat[i] = lat; m_cf[i] = 0; end
  endtask

  task automatic look(pc_t pc);
    int i; bit econf;
    i = ix(pc);
    rd_en = 1; rd_pc = pc;
    @(posedge clk); #1;
    rd_en = 0;
    econf = m_lat.exists(i) && m_cf[i] >= 2;
    checks++;
    if (pred_conf !== econf || (econf && pred_lat !== lat_t'(m_lat[i]))) begin
      failures++;
      $display("FAIL pc=%h conf=%b/%b lat=%0d/%0d cf=%0d", pc, pred_conf, econf, pred_lat, m_cf.exists(i) ? m_cf[i] : -1,
               m_lat.exists(i) ? m_lat[i] : -1);
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    look(32'h100);                 // untrained: not confident
    upd(32'h100, 164); look(32'h100);
    upd(32'h100, 164); look(32'h100);
    upd(32'h100, 164); look(32'h100);  // third time: confident
    checks++;
    if (!(pred_conf && pred_lat == 10'd164)) begin failures++; $display("FAIL confidence"); end
    upd(32'h100, 12); look(32'h100);   // changed: not confident
    checks++;
    if (pred_conf) begin failures++; $display("FAIL reset of confidence"); end
    // random streams over a few PCs with a few latencies
    for (int n = 0; n < 600; n++) begin
      pc_t pc;
      int lats [4] = '{2, 12, 164, 40};
      pc = pc_t'($urandom_range(0, 7) * 4 + 32'h2000);
      if ($urandom_range(0, 2) != 0) upd(pc, lats[$urandom_range(0, 1) + ((n / 100) % 3)]);
      look(pc_t'($urandom_range(0, 7) * 4 + 32'h2000));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
