// tb_clock_gate: checks the latch-based clock gate. With a random enable it
// counts gated pulses against the enable sampled at each rising clock edge,
// and it toggles the enable while the clock is high to show that such changes
// neither cut nor create a pulse (no glitches on gclk).
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, expect_pulses = 0, glitches = 0;
  clock_gate dut (.clk, .en, .gclk);

  always #5 clk = ~clk;
  always @(posedge gclk) pulses++;
  // a rising gclk must coincide with a rising clk
  always @(posedge gclk) if (!clk) glitches++;
  always @(negedge gclk) if (clk) glitches++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic en_at_edge;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      en = 1'($urandom_range(0, 1));        // set in the low phase
      en_at_edge = en;
      @(posedge clk);
      #1;
      check(gclk == en_at_edge, $sformatf("cycle %0d: gclk=%0b en=%0b", i, gclk, en_at_edge));
      if (en_at_edge) expect_pulses++;
      #2 en = ~en;                          // disturb during the high phase
      #1 check(gclk == en_at_edge, "enable change in high phase reached gclk");
      @(negedge clk);
    end
    check(pulses == expect_pulses, $sformatf("%0d pulses, expected %0d", pulses, expect_pulses));
    check(glitches == 0, $sformatf("%0d glitches", glitches));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
