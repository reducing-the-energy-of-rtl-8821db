// tb_lp_sched_iq64: the end-to-end test of the latency-predicting scheduler
// on the larger of the two issue-queue sizes, 64 entries instead of 32.
//
// It runs tb_lp_sched_top with IQ_ENTRIES = 64: the same four synthetic loops
// (memory-bound, compute-bound, mispredicted load, L2 hits), the same checks
// of every replay flag, every operand value and exactly-once execution, and
// the same report of issue-queue occupancy and replays per loop.  Those loops
// do not fill a 64-entry queue, so the two mechanisms that need a full issue
// queue are only reported here, not required; the 32-entry test requires them.
// Evaluating both queue sizes follows the design; the loops are this
// testbench's own.
module tb_lp_sched_iq64;
  tb_lp_sched_top #(.IQ_ENTRIES(64)) u_tb ();

  // outer watchdog, later than the inner test's own: the test reports and
  // finishes by itself, so reaching this is a failure
  initial begin
    #30000000;
    $display("TB_RESULT checks=%0d failures=%0d", u_tb.checks, u_tb.failures + 1);
    $finish;
  end
endmodule
