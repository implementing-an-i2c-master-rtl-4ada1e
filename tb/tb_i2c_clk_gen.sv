// tb_i2c_clk_gen: checks the quarter-period tick generator.
//
// With a 4 MHz clock and 100 kHz SCL the divider is 10: ticks must come
// exactly every 10 clocks while run is high, the first one 10 clocks after
// run rises, none while run is low, and none while hold is high; after hold
// drops the tick comes on the very next clock.
module tb_i2c_clk_gen;
  logic clk = 1'b0, rst = 1'b1, run = 1'b0, hold = 1'b0, tick;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  i2c_clk_gen #(.CLK_FREQ_HZ(4_000_000), .SCL_FREQ_HZ(100_000)) dut (.clk, .rst, .run, .hold, .tick);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int gap, nt;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    // no ticks while stopped
    nt = 0;
    repeat (30) begin @(posedge clk); if (tick) nt++; end
    check(nt == 0, "no tick while run is low");
    // first tick and spacing
    run <= 1'b1;
    gap = 0;
    do begin @(posedge clk); gap++; end while (!tick);
    check(gap == 10, $sformatf("first tick after %0d clocks", gap));
    for (int k = 0; k < 8; k++) begin
      gap = 0;
      do begin @(posedge clk); gap++; end while (!tick);
      check(gap == 10, $sformatf("tick spacing %0d", gap));
    end
    // hold: the tick is withheld for as long as hold stays high
    @(negedge clk) hold = 1'b1;
    nt = 0;
    repeat (35) begin @(posedge clk); if (tick) nt++; end
    check(nt == 0, "no tick while held");
    @(negedge clk) hold = 1'b0;
    #1 check(tick == 1'b1, "tick right after hold drops");
    @(posedge clk);
    gap = 0;
    do begin @(posedge clk); gap++; end while (!tick);
    check(gap == 10, $sformatf("spacing after hold %0d", gap));
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
