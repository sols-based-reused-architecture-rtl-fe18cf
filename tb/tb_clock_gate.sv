// tb_clock_gate: checks both clock-gate variants against a cycle model.
// en changes at random times, including during the phase in which the gated
// clock could change. For FALLING = 0 the enable seen at each rising edge of
// clk is the value en had at the preceding falling edge, and gclk must be
// clk & that value at all times; for FALLING = 1 it is the value at the
// preceding rising edge and gclk must be clk | ~value. gclk is sampled every
// time unit, so a glitch from a mid-phase en change is caught.
module tb_clock_gate;
  logic clk = 1'b0;
  logic en_r, en_f;
  logic gclk_r, gclk_f;
  logic held_r, held_f;   // reference enable of each gate
  int checks = 0, failures = 0, cycles = 0, pulses_r = 0, pulses_f = 0;

  clock_gate #(.FALLING(1'b0)) dut_r (.clk(clk), .en(en_r), .gclk(gclk_r));
  clock_gate #(.FALLING(1'b1)) dut_f (.clk(clk), .en(en_f), .gclk(gclk_f));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // The reference latches: open in the phase where the gated clock is idle.
  always @(negedge clk) held_r = en_r;
  always @(posedge clk) held_f = en_f;

  always @(posedge gclk_r) pulses_r++;
  always @(negedge gclk_f) pulses_f++;

  initial begin
    en_r = 1'b0; en_f = 1'b0;
    #7;            // clk high: prime the FALLING = 1 reference
    held_f = en_f;
    #5;            // clk low: prime the FALLING = 0 reference
    held_r = en_r;
    for (int i = 0; i < 4000; i++) begin
      #1;
      if ($time % 5 == 0) continue;   // keep en away from clock edges
      if ($urandom_range(0, 6) == 0) en_r = 1'($urandom);
      if ($urandom_range(0, 6) == 0) en_f = 1'($urandom);
      #0;
      checks += 2;
      if (!clk) held_r = en_r;   // transparent phase of the reference
      if (clk)  held_f = en_f;
      if (gclk_r !== (clk & held_r)) begin
        failures++;
        $display("FAIL rising-gate t=%0t clk=%0b en=%0b gclk=%0b", $time, clk, en_r, gclk_r);
      end
      if (gclk_f !== (clk | ~held_f)) begin
        failures++;
        $display("FAIL falling-gate t=%0t clk=%0b en=%0b gclk=%0b", $time, clk, en_f, gclk_f);
      end
    end
    // Both gates must have passed and blocked edges during the run.
    checks += 2;
    if (pulses_r == 0 || pulses_r >= cycles) failures++;
    if (pulses_f == 0 || pulses_f >= cycles) failures++;
    $display("gated rising edges passed %0d of %0d, falling %0d", pulses_r, cycles, pulses_f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
