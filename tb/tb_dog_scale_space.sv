// tb_dog_scale_space: streams twelve 32x24 frames (three octaves, six
// scales, 7-tap kernel) into the DoG generator and compares every DoG value
// of every octave with the reference scale space: sample n of octave o is
// image position n - S*((K/2)*(W>>o) + K/2). Also checks that pixels are
// taken every second cycle, that the octave streams never collide in the
// shared filters, and that the subscalers never overflow.
module tb_dog_scale_space;
  import sift_pkg::*;
  import sift_ref_pkg::*;
  localparam int O = 3, S = 6, K = 7, W = 32, H = 24, NF = 12;
  localparam int NPIX = NF * W * H;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         pix_valid, pix_ready;
  pix_t         pix;
  logic [O-1:0] dog_valid, hsb_overflow;
  dog_t         dog [O][S-1];

  dog_scale_space #(.O(O), .S(S), .K(K), .W(W), .H(H)) dut (
    .clk, .rst_n, .pix_valid, .pix, .pix_ready, .dog_valid, .dog, .hsb_overflow);

  int checks = 0, failures = 0;
  int img [];
  int sent = 0;
  int got [O][$];
  int nout [O];
  longint cyc = 0;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (pix_valid && pix_ready) sent <= sent + 1;
      for (int o = 0; o < O; o++)
        if (dog_valid[o])
          for (int s = 0; s < S - 1; s++) got[o].push_back(int'(dog[o][s]));
    end
  end

  always @(negedge clk) begin
    pix_valid <= rst_n && sent < NPIX;
    pix       <= (sent < NPIX) ? pix_t'(img[sent]) : '0;
  end

  initial begin
    arr_t gauss [];
    arr_t dogs [];
    arr_t img_a;
    longint t0;
    img = new[NPIX];
    foreach (img[i]) img[i] = ((i / 3) % 5 == 0) ? 200 + $urandom % 56 : $urandom % 120;
    pix_valid = 0;
    pix = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    t0 = cyc;
    wait (sent == NPIX);
    checks++;
    if (cyc - t0 > 2 * NPIX + 2) begin
      failures++;
      $display("FAIL: %0d pixels took %0d cycles", NPIX, cyc - t0);
    end
    repeat (100) @(posedge clk);
    checks++;
    if (hsb_overflow != '0) failures++;

    img_a = new[NPIX];
    foreach (img_a[i]) img_a[i] = img[i];
    scale_space(img_a, O, S, K, W, H, gauss, dogs);
    for (int o = 0; o < O; o++) begin
      int off, n_ok;
      off = S * ((K / 2) * (W >> o) + K / 2);
      n_ok = 0;
      for (int i = 0; i < got[o].size(); i++) begin
        int n, s, e;
        n = i / (S - 1);
        s = i % (S - 1);
        e = at(dogs[o * (S - 1) + s], n - off);
        if (n >= off && e != UNK) begin
          checks++;
          n_ok++;
          if (got[o][i] != e) begin
            failures++;
            if (failures < 10)
              $display("FAIL: octave %0d sample %0d scale %0d: %0d expected %0d", o, n, s, got[o][i], e);
          end
        end
      end
      checks++;
      if (n_ok == 0) failures++;
      $display("octave %0d: %0d DoG samples, %0d compared", o, got[o].size() / (S - 1), n_ok);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NPIX + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
