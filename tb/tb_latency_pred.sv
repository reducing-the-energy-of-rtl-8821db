// tb_latency_pred: self-checking testbench of the two-stage load latency
// predictor.  It trains the sub-tables through the update ports and checks
// the priority of the sources and the predicted values one cycle after each
// lookup: memory latency for an unknown address, L2 and L1 latency after fills
// of the predicted address, the remaining in-flight time (at least the L1
// latency) when the address aliases a SILO block, and the LHT's latency once
// it is confident, whatever the other structures say.  A random part then
// puts 120 loads in one of these situations each (nothing known, L2 resident,
// L1 resident, block in flight, LHT confident, LHT not yet confident) and
// checks latency, source and predicted address.
module tb_latency_pred;
  import sched_pkg::*;
  logic clk = 0, rst_n = 0;
  ts_t now = '0;
  logic rd_en = 0;
  pc_t rd_pc = '0;
  lat_t pred_lat;
  logic [1:0] pred_src;
  level_t pred_level;
  addr_t pred_addr;
  logic ap_upd_en = 0, lht_upd_en = 0, fill_en = 0, silo_alloc_en = 0;
  pc_t ap_upd_pc = '0, lht_upd_pc = '0;
  addr_t ap_upd_addr = '0, fill_addr = '0, silo_alloc_addr = '0;
  lat_t lht_upd_lat = '0, silo_alloc_lat = '0;
  level_t fill_level = LVL_L1;
  int checks = 0, failures = 0;

  latency_pred dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  task automatic train_addr(pc_t pc, addr_t a);
    repeat (2) begin
      ap_upd_en = 1; ap_upd_pc = pc; ap_upd_addr = a;
      @(posedge clk); #1;
    end
    ap_upd_en = 0;
  endtask

  task automatic do_fill(level_t l, addr_t a);
    fill_en = 1; fill_level = l; fill_addr = a;
    @(posedge clk); #1;
    fill_en = 0;
  endtask

  task automatic predict(pc_t pc, int exp_lat, int exp_src, string what);
    rd_en = 1; rd_pc = pc;
    @(posedge clk); #1;
    rd_en = 0;
    checks++;
    if (pred_lat !== lat_t'(exp_lat) || pred_src !== 2'(exp_src)) begin
      failures++;
      $display("FAIL %s: lat=%0d src=%0d exp %0d/%0d", what, pred_lat, pred_src, exp_lat, exp_src);
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pc_t pc;
    addr_t a;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    pc = 32'h0040_1000;
    a  = 32'h0123_4560;
    train_addr(pc, a);
    predict(pc, MEM_LAT, 2, "unknown address");
    checks++;
    if (pred_addr !== a) begin failures++; $display("FAIL predicted address %h", pred_addr); end
    do_fill(LVL_L2, a);
    predict(pc, L2_LAT, 2, "L2 resident");
    do_fill(LVL_L1, a);
    predict(pc, L1_LAT, 2, "L1 resident");
    // the held prediction follows the sub-tables while rd_en is low
    a = 32'h0777_0000;
    train_addr(pc, a);
    predict(pc, MEM_LAT, 2, "new address");
    silo_alloc_en = 1; silo_alloc_addr = a; silo_alloc_lat = 10'd80;
    @(posedge clk); #1;
    silo_alloc_en = 0;
    repeat (5) @(posedge clk); #1;
    predict(pc, 80 - 7, 1, "in flight");
    repeat (100) @(posedge clk); #1;
    predict(pc, L1_LAT, 1, "in flight, due");
    // the LHT overrides once it has seen the same latency three times
    repeat (3) begin
      lht_upd_en = 1; lht_upd_pc = pc; lht_upd_lat = 10'd57;
      @(posedge clk); #1;
    end
    lht_upd_en = 0;
    predict(pc, 57, 0, "LHT confident");
    predict(pc + 4, MEM_LAT, 2, "other PC");
    // random cases: 120 loads with their own PC and address (no two share a
    // table entry), each put in one of six situations; the expected answer
    // follows from the situation alone
    for (int i = 0; i < 120; i++) begin
      int r, lat, k, exp_lat, exp_src;
      pc = 32'h0010_0000 + 32'(i * 4);
      a  = 32'h3000_0000 + 32'(i * 64);
      train_addr(pc, a);
      r = $urandom_range(0, 5);
      exp_src = 2;
      exp_lat = MEM_LAT;
      case (r)
        1: begin do_fill(LVL_L2, a); exp_lat = L2_LAT; end
        2: begin do_fill(LVL_L2, a); do_fill(LVL_L1, a); exp_lat = L1_LAT; end
        3: begin
          lat = $urandom_range(20, 300);
          k   = $urandom_range(0, 10);
          silo_alloc_en = 1; silo_alloc_addr = a; silo_alloc_lat = lat_t'(lat);
          @(posedge clk); #1;
          silo_alloc_en = 0;
          repeat (k) @(posedge clk); #1;
          exp_lat = lat - (k + 2);
          exp_src = 1;
        end
        4, 5: begin
          lat = $urandom_range(1, 900);
          repeat (r == 4 ? 3 : 2) begin
            lht_upd_en = 1; lht_upd_pc = pc; lht_upd_lat = lat_t'(lat);
            @(posedge clk); #1;
          end
          lht_upd_en = 0;
          if (r == 4) begin exp_lat = lat; exp_src = 0; end
        end
        default: ;
      endcase
      predict(pc, exp_lat, exp_src, $sformatf("random case %0d (situation %0d)", i, r));
      checks++;
      if (pred_addr !== a) begin failures++; $display("FAIL predicted address of case %0d", i); end
      if (r == 3) do_fill(LVL_L1, a);   // the block arrives: frees its SILO entry
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
