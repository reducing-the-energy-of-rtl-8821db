// tb_dup_regfile: self-checking testbench of the duplicated register file.
// Every cycle up to 8 random writes and 16 random reads; a model array gives
// the expected data.  Because every read port 0..7 reads copy 0 and 8..15
// copy 1, both copies are checked to hold every write.  Also checks that a
// read in the cycle of a write still returns the old value and that the
// higher-numbered port wins when two writes name one register.
module tb_dup_regfile;
  import sched_pkg::*;
  localparam int unsigned REGS = 192, DW = 64;
  logic clk = 0;
  preg_t rd_addr [16];
  logic [DW-1:0] rd_data [16];
  logic wr_en [8];
  preg_t wr_addr [8];
  logic [DW-1:0] wr_data [8];
  int checks = 0, failures = 0;

  dup_regfile dut (.*);
  always #5 clk = ~clk;

  logic [DW-1:0] m [REGS];

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int w = 0; w < 8; w++) begin wr_en[w] = 0; wr_addr[w] = '0; wr_data[w] = '0; end
    for (int r = 0; r < 16; r++) rd_addr[r] = '0;
    // initialise every register through all ports
    for (int base = 0; base < REGS; base += 8) begin
      for (int w = 0; w < 8; w++) begin
        wr_en[w] = 1; wr_addr[w] = preg_t'(base + w); wr_data[w] = {$urandom, $urandom};
        m[base + w] = wr_data[w];
      end
      @(posedge clk); #1;
    end
    for (int n = 0; n < 3000; n++) begin
      for (int w = 0; w < 8; w++) begin
        wr_en[w] = $urandom_range(0, 1);
        wr_addr[w] = preg_t'($urandom_range(0, (n % 10 == 0) ? 3 : REGS - 1));
        wr_data[w] = {$urandom, $urandom};
      end
      for (int r = 0; r < 16; r++) rd_addr[r] = preg_t'($urandom_range(0, REGS - 1));
      #1;
      for (int r = 0; r < 16; r++) begin
        checks++;
        if (rd_data[r] !== m[rd_addr[r]]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d reg %0d", r, rd_addr[r]);
        end
      end
      @(posedge clk); #1;
      for (int w = 0; w < 8; w++) if (wr_en[w]) m[wr_addr[w]] = wr_data[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
