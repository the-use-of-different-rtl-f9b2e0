// tb_dm_top_sizes - dm_top on the two other frame sizes of the study,
// 668 x 1002 and 2672 x 4008 raw pixels (rows x columns), side by side in
// one simulation.  The smaller size goes through a one-shot and a
// continuous-mode run, the larger one, to bound the run time, through a
// one-shot run only.  1002 is not a multiple of the binning factor: the
// binned frame is 167 x 251, its last column made of two raw columns and two
// columns of zero padding.  Each instance checks its outputs against its own
// reference model; this module adds up the results.
module tb_dm_top_sizes;
  dm_size_run #(.W(1002), .H(668),  .N_FIELD(60),  .CONT_RUN(1'b1), .MAX_CYCLES(20000000))  s668 ();
  dm_size_run #(.W(4008), .H(2672), .N_FIELD(500), .CONT_RUN(1'b0), .MAX_CYCLES(150000000)) s2672 ();

  initial begin
    wait (s668.harness.fin && s2672.harness.fin);
    $display("TB_RESULT checks=%0d failures=%0d",
             s668.harness.checks + s2672.harness.checks,
             s668.harness.failures + s2672.harness.failures);
    $finish;
  end

  // Each harness has a watchdog of its own that sets 'fin'; this one only
  // guards against a harness that never returns.
  initial begin
    #2000000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d",
             s668.harness.checks + s2672.harness.checks,
             s668.harness.failures + s2672.harness.failures + 1);
    $finish;
  end
endmodule
