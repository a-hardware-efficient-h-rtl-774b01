// tb_me_top_720p: end-to-end bench of the 720p configuration.
//
// The 720p buffer budget keeps 5-bit instead of 6-bit samples in the level-1
// and level-2 windows (39x40x5 and 67x68x5 bits); everything else is the same
// as the default engine. The bench runs the shared macroblock sequence of
// tb_me_run on me_top with TRUNC_W = 5, so the coarse levels must still find
// the large motions from the coarser samples. The watchdog counts a failure
// and stops the run if it has not finished within ten million clock periods.
module tb_me_top_720p;
  tb_me_run #(.TRUNC_W(5)) run ();

  initial begin
    #100000000;
    run.failures++;
    $display("TB_RESULT checks=%0d failures=%0d", run.checks, run.failures);
    $finish;
  end
endmodule
