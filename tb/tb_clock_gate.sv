// tb_clock_gate: toggles the enable of the clock gate at random instants,
// including while the clock is high, and checks that the gated clock is low
// whenever the enable latched during the last low phase is 0, that every high
// pulse of the gated clock lasts a whole high phase of the input clock (no
// glitches), and that the number of gated pulses equals the number of rising
// edges seen with the enable sampled before the edge.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clock_gate dut (.clk, .en, .gclk);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // enable changes at random times, in both clock phases but never on an edge
  initial begin
    #2;
    forever begin
      #(5 * $urandom_range(1, 7));
      en = 1'($urandom_range(0, 1));
    end
  end

  int expected = 0, pulses = 0;
  realtime rise_t;
  bit go = 0;                 // the latch holds an unknown value until its first low phase
  initial #12 go = 1;
  always @(clk) if (clk && go) begin
    // rising edge of clk: the enable held at the end of the low phase decides
    if (en) expected++;
  end
  always @(posedge gclk) if (go) begin pulses++; rise_t = $realtime; end
  always @(negedge gclk) if (go && pulses > 0) check($realtime - rise_t == 5, "full-width pulse");

  initial begin
    repeat (5000) @(posedge clk);
    check(pulses == expected, $sformatf("pulses %0d expected %0d", pulses, expected));
    check(pulses > 100 && pulses < 4900, "gating both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
