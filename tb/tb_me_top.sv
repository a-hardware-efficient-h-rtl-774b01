// tb_me_top: full-size end-to-end bench of the motion-estimation engine.
//
// Runs the shared macroblock sequence of tb_me_run on me_top with every
// parameter at its default (6-bit coarse-level samples, the buffer budget of
// the 1080p configuration): eight macroblocks on two macroblock rows and one
// drain step, checking every decision and counting every mechanism. The
// stimulus, expected results and TB_RESULT line come from tb_me_run; this
// wrapper adds the watchdog, which counts a failure and stops the run if it
// has not finished within ten million clock periods.
module tb_me_top;
  tb_me_run run ();

  initial begin
    #100000000;
    run.failures++;
    $display("TB_RESULT checks=%0d failures=%0d", run.checks, run.failures);
    $finish;
  end
endmodule
