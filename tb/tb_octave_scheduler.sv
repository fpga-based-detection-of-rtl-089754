// tb_octave_scheduler: checks the interleaving order against the closed
// form of Proposition 1: counting cycles from 1 after reset, octave 0 owns
// the odd cycles and octave o > 0 owns the cycles c with
// c mod 2*4^o == 2*o. Checked for the default three octaves and for five.
module tb_octave_scheduler;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] slot3;
  logic [4:0] slot5;

  octave_scheduler dut3 (.clk, .rst_n, .slot(slot3));
  octave_scheduler #(.O(5)) dut5 (.clk, .rst_n, .slot(slot5));

  int checks = 0, failures = 0;
  int used [5];
  int idle = 0;

  function automatic bit expect_slot(int c, int o);
    if (o == 0) return (c % 2) == 1;
    return (c % (2 * (4 ** o))) == 2 * o;
  endfunction

  initial begin
    foreach (used[i]) used[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 1; c <= 4096; c++) begin
      #1;
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (slot5[o] != expect_slot(c, o)) begin
          failures++;
          if (failures < 10) $display("FAIL: O=5 cycle %0d octave %0d slot=%b", c, o, slot5[o]);
        end
        if (slot5[o]) used[o]++;
      end
      for (int o = 0; o < 3; o++) begin
        checks++;
        if (slot3[o] != expect_slot(c, o)) begin
          failures++;
          if (failures < 10) $display("FAIL: O=3 cycle %0d octave %0d", c, o);
        end
      end
      checks++;
      if (!$onehot0(slot5)) failures++;
      if (slot5 == '0) idle++;
      @(negedge clk);
    end
    // occupancy: 1/2 + 1/8 + 1/32 + 1/128 + 1/512 of the cycles
    checks++;
    if (used[0] != 2048 || used[1] != 512 || used[2] != 128 || used[3] != 32 || used[4] != 8)
      failures++;
    $display("slots per octave %0d %0d %0d %0d %0d, idle %0d", used[0], used[1], used[2],
             used[3], used[4], idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
