// sift_tb_body: end-to-end test of sift_detector_top, shared by the reduced
// test (small image) and the full-size test (default parameters, which
// instantiates the detector with no parameter overrides).
//
// NF frames of a synthetic image (blocky random texture plus noise) are
// streamed in; the first half frame (first quarter with NF = 1) has random
// gaps on pix_valid. Every keypoint
// output of every octave is checked against the stream reference model in
// sift_ref_pkg: its coordinates, the keypoint bit and the per-scale
// minimum/maximum bits (where the reference is fully known). The test also
// checks the rate (one pixel accepted every two cycles, one octave-0 result
// every two cycles once the input runs without gaps) and counts the
// mechanisms of the design: octave interleaving, input stalls, subscaling
// buffer occupancy, empty octave slots, minima, maxima and ties rejected by
// the beta flag. A mechanism that never occurs is a failure.
// With SOLO = 0 the body does not end the simulation: it raises done and
// leaves checks/failures to an enclosing testbench that runs several bodies.
module sift_tb_body
  import sift_pkg::*;
  import sift_ref_pkg::*;
#(
  parameter bit          FULL = 1'b0,
  parameter int unsigned W    = 32,
  parameter int unsigned H    = 24,
  parameter int unsigned O    = 3,
  parameter int unsigned S    = 6,
  parameter int unsigned K    = 7,
  parameter int unsigned NF   = 4,
  parameter bit          SOLO = 1'b1
) ();
  localparam int unsigned WW = FULL ? W_DEF : W;
  localparam int unsigned HH = FULL ? H_DEF : H;
  localparam int unsigned OO = FULL ? O_DEF : O;
  localparam int unsigned SS = FULL ? S_DEF : S;
  localparam int unsigned KK = FULL ? K_DEF : K;
  localparam int unsigned NPIX = NF * WW * HH;
  localparam int unsigned MAXCYC = 2 * NPIX + 4 * WW * HH + 20000;
  // input gaps during the first part of the stream; the output-rate check
  // starts once those gaps have left the pipeline
  localparam int unsigned GAP_END   = (NF == 1) ? WW * HH / 4 : WW * HH / 2;
  localparam int unsigned RATE_FROM = (NF == 1) ? WW * HH / 2 : WW * HH;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bit done = 1'b0;
  // the clock stops once the body is done, so that an enclosing testbench
  // running several bodies does not keep simulating finished ones
  always #5 if (!done) clk = ~clk;

  logic             pix_valid;
  pix_t             pix;
  logic             pix_ready;
  logic [OO-1:0]    kp_valid, kp, hsb_overflow;
  logic [SS-4:0]    kp_min [OO];
  logic [SS-4:0]    kp_max [OO];
  logic [XY_W-1:0]  kp_x [OO];
  logic [XY_W-1:0]  kp_y [OO];

  if (FULL) begin : g_full
    sift_detector_top dut (
      .clk, .rst_n, .pix_valid, .pix, .pix_ready,
      .kp_valid, .kp, .kp_min, .kp_max, .kp_x, .kp_y, .hsb_overflow
    );
  end else begin : g_small
    sift_detector_top #(.O(OO), .S(SS), .K(KK), .W(WW), .H(HH)) dut (
      .clk, .rst_n, .pix_valid, .pix, .pix_ready,
      .kp_valid, .kp, .kp_min, .kp_max, .kp_x, .kp_y, .hsb_overflow
    );
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- stimulus ----------------
  int img [];
  initial begin
    img = new[NPIX];
    for (int n = 0; n < NPIX; n++) img[n] = 118 + ($urandom % 21);
    // bright and dark spots of random size on a noisy grey background
    for (int f = 0; f < NF; f++)
      for (int cy = 0; cy + 8 <= HH; cy += 8)
        for (int cx = 0; cx + 8 <= WW; cx += 8) begin
          int kind, sz, ox, oy, v;
          kind = $urandom % 3;
          sz   = 1 + $urandom % 4;
          ox   = cx + $urandom % (8 - sz + 1);
          oy   = cy + $urandom % (8 - sz + 1);
          v    = (kind == 0) ? 230 + $urandom % 26 : 10 + $urandom % 26;
          if (kind != 2)
            for (int y = oy; y < oy + sz; y++)
              for (int x = ox; x < ox + sz; x++)
                img[f * WW * HH + y * WW + x] = v;
        end
  end

  int  sent = 0;
  int  stalls = 0;
  bit  gaps_on;
  longint cyc = 0;
  longint first_nogap_cycle = -1;

  always_comb gaps_on = (sent < GAP_END);

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (pix_valid && pix_ready) sent <= sent + 1;
      if (!pix_valid && pix_ready && sent < NPIX) stalls <= stalls + 1;
    end
  end

  always @(negedge clk) begin
    if (rst_n && sent < NPIX) begin
      pix_valid <= gaps_on ? ($urandom % 4 != 0) : 1'b1;
      pix       <= pix_t'(img[sent]);
    end else begin
      pix_valid <= 1'b0;
      pix       <= '0;
    end
  end

  // ---------------- output collection ----------------
  typedef struct {
    int x, y;
    bit kp;
    int mn, mx;
  } out_t;
  out_t got [OO][$];

  // rate: octave-0 results every two cycles while the input has no gaps
  longint last_o0 = -1;
  int gap_bad = 0, gap_seen = 0;
  int ready_bad = 0;
  logic ready_q = 1'b0;

  int slot_ev [OO];
  int empty_slots = 0;
  int hsb_max [OO];

  always_ff @(posedge clk) if (rst_n) begin
    for (int o = 0; o < OO; o++)
      if (kp_valid[o])
        got[o].push_back('{x: int'(kp_x[o]), y: int'(kp_y[o]), kp: kp[o],
                           mn: int'(kp_min[o]), mx: int'(kp_max[o])});
    if (kp_valid[0]) begin
      if (last_o0 >= 0 && sent > RATE_FROM && sent < NPIX - 10) begin
        gap_seen++;
        if (cyc - last_o0 != 2) gap_bad++;
      end
      last_o0 <= cyc;
    end
    ready_q <= pix_ready;
    if (ready_q == pix_ready) ready_bad++;
  end

  // mechanism observation inside the design
  if (FULL) begin : g_obs_full
    always_ff @(posedge clk) if (rst_n)
      for (int o = 0; o < OO; o++)
        if (g_full.dut.u_dog.in_valid[o]) slot_ev[o]++;
  end else begin : g_obs_small
    always_ff @(posedge clk) if (rst_n)
      for (int o = 0; o < OO; o++)
        if (g_small.dut.u_dog.in_valid[o]) slot_ev[o]++;
  end

  for (genvar o = 1; o < OO; o++) begin : g_hsbobs
    if (FULL) begin : g_f
      always_ff @(posedge clk) if (rst_n) begin
        if (int'(g_full.dut.u_dog.g_hsb[o].u_hsb.level) > hsb_max[o])
          hsb_max[o] <= int'(g_full.dut.u_dog.g_hsb[o].u_hsb.level);
        if (g_full.dut.u_dog.slot[o] && g_full.dut.u_dog.g_hsb[o].u_hsb.level == 0 &&
            g_full.dut.u_dog.g_hsb[o].u_hsb.primed)
          empty_slots++;
      end
    end else begin : g_s
      always_ff @(posedge clk) if (rst_n) begin
        if (int'(g_small.dut.u_dog.g_hsb[o].u_hsb.level) > hsb_max[o])
          hsb_max[o] <= int'(g_small.dut.u_dog.g_hsb[o].u_hsb.level);
        if (g_small.dut.u_dog.slot[o] && g_small.dut.u_dog.g_hsb[o].u_hsb.level == 0 &&
            g_small.dut.u_dog.g_hsb[o].u_hsb.primed)
          empty_slots++;
      end
    end
  end

  // ---------------- run and compare ----------------
  initial begin
    arr_t gauss [];
    arr_t dogs [];
    arr_t img_a;
    int n_min = 0, n_max = 0, n_tie = 0, n_known = 0;
    longint t_start, t_end;

    foreach (slot_ev[o]) slot_ev[o] = 0;
    foreach (hsb_max[o]) hsb_max[o] = 0;
    pix_valid = 1'b0;
    pix = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    t_start = cyc;
    wait (sent == NPIX);
    t_end = cyc;
    repeat (200) @(posedge clk);

    // one pixel per two cycles, plus the gaps of the first half frame
    check(t_end - t_start <= 2 * NPIX + 2 * stalls + 4, "input rate: one pixel per two cycles");
    check(ready_bad == 0, "pix_ready alternates every cycle");
    check(gap_seen > 0 && gap_bad == 0, "octave-0 results every two cycles");
    check(hsb_overflow == '0, "no subscaling overflow");
    $display("frames=%0d pixels=%0d cycles=%0d stalls=%0d", NF, NPIX, t_end - t_start, stalls);

    img_a = new[NPIX];
    foreach (img_a[i]) img_a[i] = img[i];
    scale_space(img_a, OO, SS, KK, WW, HH, gauss, dogs);

    for (int o = 0; o < OO; o++) begin
      int wo, ho;
      wo = WW >> o;
      ho = HH >> o;
      check(got[o].size() > 0, $sformatf("octave %0d produced output", o));
      for (int i = 0; i < got[o].size(); i++) begin
        bit any_kp, any_unk;
        int emn, emx;
        check(got[o][i].x == i % wo && got[o][i].y == (i / wo) % ho,
              $sformatf("octave %0d output %0d position (%0d,%0d)", o, i, got[o][i].x, got[o][i].y));
        any_kp = 0;
        any_unk = 0;
        emn = 0;
        emx = 0;
        for (int c = 1; c <= SS - 3; c++) begin
          int r;
          bit tie;
          r = kp_test(dogs, o * (SS - 1), c, i, wo, ho, tie);
          if (r < 0) any_unk = 1;
          else begin
            emn |= (r & 1) << (c - 1);
            emx |= ((r >> 1) & 1) << (c - 1);
            if (tie && r == 0) n_tie++;
          end
        end
        if (!any_unk) begin
          n_known++;
          any_kp = (emn | emx) != 0;
          check(got[o][i].mn == emn && got[o][i].mx == emx && got[o][i].kp == any_kp,
                $sformatf("octave %0d (%0d,%0d) min %b/%b max %b/%b", o, i % wo, (i / wo) % ho,
                          got[o][i].mn, emn, got[o][i].mx, emx));
          if (emn != 0) n_min++;
          if (emx != 0) n_max++;
        end
      end
      $display("octave %0d: %0d outputs", o, got[o].size());
    end

    $display("known=%0d minima=%0d maxima=%0d ties_rejected=%0d stalls=%0d empty_slots=%0d",
             n_known, n_min, n_max, n_tie, stalls, empty_slots);
    for (int o = 0; o < OO; o++) begin
      $display("octave %0d slots used=%0d hsb_max_level=%0d", o, slot_ev[o], hsb_max[o]);
      check(slot_ev[o] > 0, $sformatf("octave %0d interleaved into the shared filters", o));
      if (o > 0) check(hsb_max[o] > 1, $sformatf("subscaling buffer %0d absorbed a burst", o));
    end
    check(n_known > 0, "reference comparisons made");
    check(n_min > 0, "minimum keypoints occurred");
    check(n_max > 0, "maximum keypoints occurred");
    check(n_tie > 0, "ties rejected by the beta flag occurred");
    check(stalls > 0, "input stalls occurred");
    check(empty_slots > 0, "empty octave slots occurred");
    done = 1'b1;
    if (SOLO) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    wait (cyc > MAXCYC);
    wait (SOLO);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
