// tb_is_local_ext: random 3x3 neighbourhoods drawn from a narrow value range
// (so that ties are frequent) through isLocalMin and isLocalMax; the
// expected result is a strict comparison with all eight neighbours, gated
// by the beta flag.
module tb_is_local_ext;
  import sift_pkg::*;

  dog_t center;
  dog_t nb [8];
  logic beta, hit_min, hit_max;

  is_local_ext #(.IS_MAX(1'b0)) dut_min (.center, .nb, .beta, .hit(hit_min));
  is_local_ext #(.IS_MAX(1'b1)) dut_max (.center, .nb, .beta, .hit(hit_max));

  int checks = 0, failures = 0, n_min = 0, n_max = 0;

  initial begin
    for (int t = 0; t < 4000; t++) begin
      bit emin, emax;
      int range;
      range  = (t % 2) ? 4 : 512;
      center = dog_t'(int'($urandom % range) - range / 2);
      beta   = ($urandom % 4) != 0;
      emin = beta;
      emax = beta;
      for (int i = 0; i < 8; i++) begin
        nb[i] = dog_t'(int'($urandom % range) - range / 2);
        if (t % 7 == 0) nb[i] = dog_t'(int'(center) + 1 + int'($urandom % 3));
        if (t % 7 == 1) nb[i] = dog_t'(int'(center) - 1 - int'($urandom % 3));
      end
      for (int i = 0; i < 8; i++) begin
        if (!(int'(center) < int'(nb[i]))) emin = 0;
        if (!(int'(center) > int'(nb[i]))) emax = 0;
      end
      #1;
      checks += 2;
      if (hit_min != emin) failures++;
      if (hit_max != emax) failures++;
      n_min += emin;
      n_max += emax;
    end
    checks++;
    if (n_min == 0 || n_max == 0) failures++;
    $display("minima %0d maxima %0d", n_min, n_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
