// tb_sensor_event_unit: drives the sampling and event generation module with a
// sequence of ADC values (steps, ramps, noise, values below the previous one)
// and compares, for every step, the event flag, the sign of x - x_le and the
// sample shifted out on an event against a reference model of the same
// arithmetic (x = u on the first step, then ALPHA_SHIFT rounds of
// t = (t + x) >> 1; event when |x - x_le| > threshold). The number of clocks
// per step is checked against the formula in the module header.
module tb_sensor_event_unit;
  import wsn_pkg::*;
  localparam int unsigned BITS = 12, LEAD = 3, ASH = 3;
  localparam int unsigned NSTEPS = 200;

  logic clk = 0, rst_n = 0, start = 0, thr_load = 0;
  logic [15:0] threshold = 16'd40;
  logic adc_cs_n, adc_sclk, adc_mosi, adc_miso;
  logic [7:0] adc_command;
  logic busy, done, event_o, dx_negative, dout, dout_valid;
  logic [BITS-1:0] adc_value = '0;
  int unsigned conversions;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sensor_event_unit #(.ADC_BITS(BITS), .ADC_LEAD(LEAD), .ALPHA_SHIFT(ASH)) dut (
    .clk, .rst_n, .start, .thr_load, .threshold, .adc_cs_n, .adc_sclk, .adc_mosi, .adc_miso,
    .busy, .done, .event_o, .dx_negative, .dout, .dout_valid);

  adc_model #(.BITS(BITS), .LEAD(LEAD)) adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .mosi(adc_mosi),
    .value(adc_value), .miso(adc_miso), .conversions(conversions), .command(adc_command));

  // collect shifted-out sample
  logic [15:0] shifted;
  int          nbits;
  always @(posedge clk) if (dout_valid) begin
    shifted = {dout, shifted[15:1]};
    nbits++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (NSTEPS * 400 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x, xle, t, u, d, nev, nneg, cyc, expect_cyc;
  bit first, ev;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); thr_load <= 1; @(posedge clk); thr_load <= 0;
    first = 1; xle = 0; x = 0; nev = 0; nneg = 0;
    for (int k = 0; k < NSTEPS; k++) begin
      // test signal: steps up and down with noise
      if (k < 20)       u = 1000 + ($urandom % 7);
      else if (k < 60)  u = 3000 + ($urandom % 31);
      else if (k < 100) u = 500 + ($urandom % 31);
      else              u = $urandom % 4096;
      adc_value = u[BITS-1:0];
      // reference model
      if (first) x = u;
      else begin
        t = u;
        for (int i = 0; i < ASH; i++) t = (t + x) >> 1;
        x = t;
      end
      first = 0;
      d  = x - xle;
      ev = ((d < 0) ? -d : d) > int'(threshold);
      // run one step
      nbits = 0;
      @(posedge clk); start <= 1; @(posedge clk); start <= 0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      check(event_o == ev, $sformatf("step %0d event %0b expected %0b (x=%0d xle=%0d)", k, event_o, ev, x, xle));
      check(dx_negative == (d < 0), $sformatf("step %0d sign", k));
      check(adc_command == 8'(3'b110), "ADC command bits");
      expect_cyc = 2*(LEAD+BITS) + (16-BITS) + (k == 0 ? 0 : 17*ASH) + 16*(3 + ((d<0)?1:0) + (ev?3:0)) + 2;
      check(cyc == expect_cyc, $sformatf("step %0d cycles %0d expected %0d", k, cyc, expect_cyc));
      if (ev) begin
        check(nbits == 16 && int'(shifted) == x, $sformatf("step %0d dout %0d expected %0d", k, shifted, x));
        xle = x; nev++;
      end else check(nbits == 0, "no output without event");
      if (d < 0) nneg++;
      @(posedge clk);
    end
    check(conversions == NSTEPS, "ADC conversion count");
    check(nev > 5 && nev < NSTEPS, "events both fired and withheld");
    check(nneg > 0, "negative delta seen");
    $display("events=%0d negative=%0d", nev, nneg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
