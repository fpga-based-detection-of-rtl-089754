// tb_is_extremum: random DoG streams of a 12x8 octave (five DoG scales,
// values drawn from a narrow range so that ties are common, plus planted
// peaks and pits) enter one sample every two or three cycles. Every output
// is compared with a direct 26-neighbour test on the same data: its
// position, the per-scale minimum/maximum bits and the keypoint bit.
module tb_is_extremum;
  import sift_pkg::*;
  import sift_ref_pkg::*;
  localparam int S = 6, WO = 12, HO = 8, OFF = 7;
  localparam int NEV = 4 * WO * HO + OFF + 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, kp_valid, kp;
  dog_t dog [S-1];
  logic [S-4:0] kp_min, kp_max;
  logic [XY_W-1:0] kp_x, kp_y;

  is_extremum #(.S(S), .W_O(WO), .H_O(HO), .OFF(OFF)) dut (
    .clk, .rst_n, .in_valid, .dog, .kp_valid, .kp, .kp_min, .kp_max, .kp_x, .kp_y);

  int checks = 0, failures = 0, n_min = 0, n_max = 0, n_tie = 0;
  typedef struct { int x, y; bit kp; int mn, mx; } out_t;
  out_t got [$];

  always_ff @(posedge clk)
    if (rst_n && kp_valid)
      got.push_back('{x: int'(kp_x), y: int'(kp_y), kp: kp, mn: int'(kp_min), mx: int'(kp_max)});

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
    arr_t st [];
    st = new[S - 1];
    foreach (st[s]) st[s] = new[NEV];
    in_valid = 0;
    foreach (dog[s]) dog[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NEV; n++) begin
      int plant;
      plant = $urandom % 24;
      for (int s = 0; s < S - 1; s++) begin
        int v;
        v = int'($urandom % 5) - 2;
        if (plant == 0 && s == 2) v = 40;
        if (plant == 1 && s == 3) v = -40;
        if (plant == 2 && (s == 2 || s == 3)) v = -40;
        if (plant == 3 && (s == 1 || s == 2)) v = 40;
        st[s][n] = v;
        dog[s] = dog_t'(v);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat (1 + $urandom % 2) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check_octave(0, WO, HO, OFF, st, got);
    checks++;
    if (got.size() != NEV - OFF - WO - 1) begin
      failures++;
      $display("FAIL: %0d outputs for %0d samples", got.size(), NEV);
    end
    checks++;
    if (n_min == 0 || n_max == 0 || n_tie == 0) failures++;
    $display("outputs %0d minima %0d maxima %0d ties %0d", got.size(), n_min, n_max, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
