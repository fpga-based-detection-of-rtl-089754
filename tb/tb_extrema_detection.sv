// tb_extrema_detection: two octaves (24x16 and 12x8, five DoG scales, 3-tap
// filter offsets) fed with independent random DoG streams at the rates of
// the interleaved scale space (octave 0 every second cycle, octave 1 one
// cycle in eight), four frames each, with planted peaks, pits and ties.
// Each octave's keypoint outputs are compared with a direct 26-neighbour
// test on its own stream, with that octave's stream offset.
module tb_extrema_detection;
  import sift_pkg::*;
  import sift_ref_pkg::*;
  localparam int O = 2, S = 6, K = 3, W = 24, H = 16;
  localparam int NEV = 4 * W * H;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [O-1:0] dog_valid, kp_valid, kp;
  dog_t dog [O][S-1];
  logic [S-4:0] kp_min [O];
  logic [S-4:0] kp_max [O];
  logic [XY_W-1:0] kp_x [O];
  logic [XY_W-1:0] kp_y [O];

  extrema_detection #(.O(O), .S(S), .K(K), .W(W), .H(H)) dut (
    .clk, .rst_n, .dog_valid, .dog, .kp_valid, .kp, .kp_min, .kp_max, .kp_x, .kp_y);

  int checks = 0, failures = 0, n_min = 0, n_max = 0, n_tie = 0;
  typedef struct { int x, y; bit kp; int mn, mx; } out_t;
  out_t got [O][$];

  always_ff @(posedge clk)
    for (int o = 0; o < O; o++)
      if (rst_n && kp_valid[o])
        got[o].push_back('{x: int'(kp_x[o]), y: int'(kp_y[o]), kp: kp[o],
                           mn: int'(kp_min[o]), mx: int'(kp_max[o])});

  // compare the outputs of one octave with the 26-neighbour reference
  task automatic check_octave(int o, int wo, int ho, int off, arr_t st [], out_t got [$]);
    arr_t d [];
    int   n_kp;
    d = new[S - 1];
    for (int s = 0; s < S - 1; s++) d[s] = to_pos(st[s], off);
    n_kp = 0;
    checks++;
    if (got.size() == 0) failures++;
    for (int i = 0; i < got.size(); i++) begin
      int emn, emx;
      bit unk;
      emn = 0;
      emx = 0;
      unk = 0;
      for (int c = 1; c <= S - 3; c++) begin
        int r;
        bit tie;
        r = kp_test(d, 0, c, i, wo, ho, tie);
        if (r < 0) unk = 1;
        else begin
          emn |= (r & 1) << (c - 1);
          emx |= ((r >> 1) & 1) << (c - 1);
          if (tie && r == 0) n_tie++;
        end
      end
      checks++;
      if (got[i].x != i % wo || got[i].y != (i / wo) % ho ||
          (!unk && (got[i].mn != emn || got[i].mx != emx || got[i].kp != ((emn | emx) != 0)))) begin
        failures++;
        if (failures < 10)
          $display("FAIL: octave %0d output %0d at (%0d,%0d): min %b/%b max %b/%b", o, i,
                   got[i].x, got[i].y, got[i].mn, emn, got[i].mx, emx);
      end
      if (!unk && emn != 0) n_min++;
      if (!unk && emx != 0) n_max++;
    end
  endtask

  initial begin
    arr_t st [O][];
    int   cnt [O];
    for (int o = 0; o < O; o++) begin
      st[o] = new[S - 1];
      foreach (st[o][s]) st[o][s] = new[NEV];
      cnt[o] = 0;
    end
    dog_valid = '0;
    foreach (dog[o, s]) dog[o][s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; cnt[0] < NEV || cnt[1] < NEV; c++) begin
      int o;
      o = (c % 2 == 0) ? 0 : 1;
      dog_valid = '0;
      if ((o == 0 && cnt[0] < NEV) || (c % 8 == 1 && cnt[1] < NEV)) begin
        int plant;
        plant = $urandom % 24;
        for (int s = 0; s < S - 1; s++) begin
          int v;
          v = int'($urandom % 5) - 2;
          if (plant == 0 && s == 2) v = 40;
          if (plant == 1 && s == 3) v = -40;
          if (plant == 2 && (s == 2 || s == 3)) v = -40;
          if (plant == 3 && (s == 1 || s == 2)) v = 40;
          st[o][s][cnt[o]] = v;
          dog[o][s] = dog_t'(v);
        end
        dog_valid[o] = 1'b1;
        cnt[o]++;
      end
      @(negedge clk);
    end
    dog_valid = '0;
    repeat (10) @(negedge clk);
    for (int o = 0; o < O; o++) begin
      for (int s = 0; s < S - 1; s++) st[o][s] = new[cnt[o]](st[o][s]);
      check_octave(o, W >> o, H >> o, S * filt_shift(K, W >> o), st[o], got[o]);
      checks++;
      if (got[o].size() != cnt[o] - S * filt_shift(K, W >> o) - (W >> o) - 1) begin
        failures++;
        $display("FAIL: octave %0d gave %0d outputs for %0d samples", o, got[o].size(), cnt[o]);
      end
      $display("octave %0d: %0d outputs", o, got[o].size());
    end
    checks++;
    if (n_min == 0 || n_max == 0) failures++;
    $display("minima %0d maxima %0d ties %0d", n_min, n_max, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
