// tb_spi_master: sends random bytes through the SPI master into a loop-back
// slave model (mode 0: the slave shifts in MOSI on rising SCLK and drives the
// next MISO bit after the falling edge) and checks the byte received by each
// side, that SCLK idles low, and the byte time of 16*HALF_DIV clocks, for
// HALF_DIV = 1 and 3.
module tb_spi_master;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic start [2];
  logic [7:0] tx [2], rx [2];
  logic busy [2], done [2], sclk [2], mosi [2], miso [2];
  logic [7:0] sl_in [2], sl_out [2];

  spi_master #(.HALF_DIV(1)) m1 (.clk, .rst_n, .start(start[0]), .tx_byte(tx[0]), .rx_byte(rx[0]),
    .busy(busy[0]), .done(done[0]), .sclk(sclk[0]), .mosi(mosi[0]), .miso(miso[0]));
  spi_master #(.HALF_DIV(3)) m3 (.clk, .rst_n, .start(start[1]), .tx_byte(tx[1]), .rx_byte(rx[1]),
    .busy(busy[1]), .done(done[1]), .sclk(sclk[1]), .mosi(mosi[1]), .miso(miso[1]));

  for (genvar g = 0; g < 2; g++) begin : g_slave
    always @(posedge sclk[g]) sl_in[g] = {sl_in[g][6:0], mosi[g]};
    always @(negedge sclk[g]) begin sl_out[g] = {sl_out[g][6:0], 1'b0}; miso[g] = sl_out[g][7]; end
  end

  initial begin
    int n;
    logic [7:0] sb;
    start[0] = 0; start[1] = 0; tx[0] = 0; tx[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 2; g++) begin
      for (int it = 0; it < 100; it++) begin
        tx[g] = 8'($urandom); sb = 8'($urandom);
        sl_out[g] = sb; miso[g] = sb[7];
        @(negedge clk); start[g] = 1; @(negedge clk); start[g] = 0;
        n = 1;
        while (!done[g]) begin @(negedge clk); n++; end
        check(n == 16 * (g == 0 ? 1 : 3) + 1, $sformatf("byte time %0d", n));
        check(rx[g] == sb, "master received");
        check(sl_in[g] == tx[g], "slave received");
        check(sclk[g] == 0, "SCLK idles low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
