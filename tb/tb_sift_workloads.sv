// tb_sift_workloads: the detector at the image sizes and octave/scale counts
// of the evaluation configurations, each run end to end through the same
// checks as the default-size test (every output compared with the stream
// reference model, every mechanism counted):
//   - 1024x768, four octaves, six scales (the profiling configuration);
//   - 800x640, six octaves, five scales (the accuracy configuration; the
//     image size is that of the usual test images for local features);
//   - 512x512, seven octaves, five scales (the largest configuration of the
//     area study, which varies the octave count from three to seven).
// The deepest octaves trail the input by several frames (each octave waits
// for the filter fill of all octaves above it: for 512x512 with seven
// octaves, octave 6 starts to produce results in the fourth frame), so the
// seven-octave case streams five frames, the six-octave case two and the
// four-octave case one (rows still in the pipeline at the end are not
// checked). The three bodies
// run side by side; the test ends when all are done and reports the summed
// counts. A watchdog ends it if one never finishes.
module tb_sift_workloads;
  sift_tb_body #(.W(1024), .H(768), .O(4), .S(6), .K(7), .NF(1), .SOLO(1'b0)) prof ();
  sift_tb_body #(.W(800),  .H(640), .O(6), .S(5), .K(7), .NF(2), .SOLO(1'b0)) accu ();
  sift_tb_body #(.W(512),  .H(512), .O(7), .S(5), .K(7), .NF(5), .SOLO(1'b0)) area ();

  initial begin
    wait (prof.done && accu.done && area.done);
    $display("TB_RESULT checks=%0d failures=%0d",
             prof.checks + accu.checks + area.checks,
             prof.failures + accu.failures + area.failures);
    $finish;
  end

  // watchdog: twice the cycles of the longest stream (10 time units per
  // cycle); the bodies' clocks stop when they are done
  initial begin
    #(64'd10 * 64'd2 * (64'd2 * 5 * 512 * 512 + 64'd4 * 512 * 512 + 64'd20000));
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d",
             prof.checks + accu.checks + area.checks,
             prof.failures + accu.failures + area.failures + 1);
    $finish;
  end
endmodule
