// tb_hsb: feeds a 16x8 image stream (after 5 junk samples) into the
// subscaler at the octave-0 rate (one sample every two cycles) and reads it
// in the slots of octave 1 (one cycle in eight). The output must be exactly
// the pixels at even column and even row, in raster order, with no
// overflow. A second instance with a two-entry buffer must raise its sticky
// overflow flag, since the even rows deliver pixels faster than they drain.
module tb_hsb;
  import sift_pkg::*;
  localparam int WI = 16, HI = 8, SK = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, rd_slot, out_valid, overflow, s_valid, s_over;
  pix_t in_pix, out_pix, s_pix;
  logic [$clog2(WI/4+4+1)-1:0] level;
  logic [1:0] s_level;

  hsb #(.W_IN(WI), .H_IN(HI), .SKIP(SK)) dut (
    .clk, .rst_n, .in_valid, .in_pix, .rd_slot,
    .out_valid, .out_pix, .overflow, .level);
  hsb #(.W_IN(WI), .H_IN(HI), .SKIP(SK), .DEPTH(2)) dut_small (
    .clk, .rst_n, .in_valid, .in_pix, .rd_slot,
    .out_valid(s_valid), .out_pix(s_pix), .overflow(s_over), .level(s_level));

  int checks = 0, failures = 0;
  int expq [$];
  int got [$];
  int maxlev = 0;

  always_ff @(posedge clk) if (rst_n) begin
    if (out_valid) got.push_back(int'(out_pix));
    if (int'(level) > maxlev) maxlev <= int'(level);
  end

  initial begin
    int n, c;
    in_valid = 0;
    rd_slot = 0;
    in_pix = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    n = 0;
    for (c = 1; c <= 2 * (SK + 3 * WI * HI) + 200; c++) begin
      in_valid = (c % 2 == 1) && (n < SK + 3 * WI * HI);
      rd_slot  = (c % 8 == 2);
      in_pix   = pix_t'($urandom);
      if (in_valid) begin
        if (n >= SK) begin
          int p;
          p = n - SK;
          if ((p % WI) % 2 == 0 && ((p / WI) % HI) % 2 == 0) expq.push_back(int'(in_pix));
        end
        n++;
      end
      @(negedge clk);
    end
    checks++;
    if (got.size() != expq.size()) begin
      failures++;
      $display("FAIL: %0d outputs, expected %0d", got.size(), expq.size());
    end
    for (int i = 0; i < got.size() && i < expq.size(); i++) begin
      checks++;
      if (got[i] != expq[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: output %0d = %0d expected %0d", i, got[i], expq[i]);
      end
    end
    checks++;
    if (overflow) begin failures++; $display("FAIL: overflow"); end
    checks++;
    if (maxlev < WI / 4 || maxlev > WI / 4 + 4) begin
      failures++;
      $display("FAIL: peak occupancy %0d", maxlev);
    end
    checks++;
    if (!s_over) begin failures++; $display("FAIL: small buffer did not overflow"); end
    $display("outputs %0d, peak occupancy %0d", got.size(), maxlev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
