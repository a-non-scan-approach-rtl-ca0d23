// tb_clock_gate: check of the clock gate used for hold mode.
//
// Part 1: en is changed on the falling clock edge; the gated clock must
// pulse in exactly the cycles where en was 1. Part 2: en is toggled in the
// middle of the high phase; the gated clock must neither start nor end a
// pulse there, so an edge appears only with the real clock edge.
module tb_clock_gate;
  logic clk = 1'b0;
  logic en;
  logic gclk;
  int   checks = 0, failures = 0;
  int   edges = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) edges++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_before;
    bit want;
    en = 1'b0;
    // Part 1: cycle-by-cycle enable.
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      want = $urandom_range(0, 1) == 1;
      en = want;
      n_before = edges;
      @(posedge clk);
      #1;
      checks += 2;
      if ((edges - n_before) != (want ? 1 : 0)) begin
        failures++;
        $display("cycle %0d: en=%0d gave %0d edges", i, want, edges - n_before);
      end
      if (gclk !== (want ? 1'b1 : 1'b0)) begin
        failures++;
        $display("cycle %0d: gated clock level %0d with en=%0d", i, gclk, want);
      end
    end
    // Part 2: enable changes while the clock is high.
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      en = logic'(i % 2);
      @(posedge clk);
      #2;
      n_before = edges;
      en = ~en;
      #1;
      checks++;
      if (edges != n_before || gclk !== logic'(i % 2)) begin
        failures++;
        $display("glitch: en toggled in high phase, gclk=%0d", gclk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
