// tb_trx_cmd_rom: reads the three command sequences out of the ROM, splits
// them into instructions at the end-of-instruction markers and compares them
// with the expected CC2520 instruction lists written out here: INIT (crystal
// oscillator on, three REGWR and nine MEMWR register settings), TX and RX.
// Also checks the one-clock read latency and that each sequence ends with
// both markers set.
module tb_trx_cmd_rom;
  import wsn_pkg::*;
  logic clk = 0;
  logic [ROM_AW-1:0] addr = '0;
  rom_word_t data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  trx_cmd_rom dut (.clk, .addr, .data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected instructions, one per string of bytes, packed MSB first, length in [31:24]
  typedef logic [31:0] instr_t;
  function automatic instr_t I1(input logic [7:0] a); return {8'd1, a, 16'h0}; endfunction
  function automatic instr_t I2(input logic [7:0] a, b); return {8'd2, a, b, 8'h0}; endfunction
  function automatic instr_t I3(input logic [7:0] a, b, c); return {8'd3, a, b, c}; endfunction

  instr_t exp_init [13];
  instr_t exp_tx [1];
  instr_t exp_rx [2];

  task automatic play(input logic [ROM_AW-1:0] start, input instr_t exp [], input string name);
    instr_t got;
    int n, k;
    logic [7:0] bytes [3];
    addr <= start; k = 0; n = 0;
    forever begin
      @(posedge clk); #1;
      check(data.data !== 8'hxx, "data");
      if (n < 3) bytes[n] = data.data;
      n++;
      if (data.last_of_instr) begin
        got = {8'(n), bytes[0], (n > 1) ? bytes[1] : 8'h0, (n > 2) ? bytes[2] : 8'h0};
        check(k < exp.size() && got == exp[k], $sformatf("%s instruction %0d: %h", name, k, got));
        k++; n = 0;
      end
      if (data.last_of_seq) begin
        check(data.last_of_instr, $sformatf("%s ends on an instruction boundary", name));
        break;
      end
      addr <= addr + 1;
    end
    check(k == exp.size(), $sformatf("%s length %0d", name, k));
  endtask

  initial begin
    exp_init = '{I1(8'h40), I2(8'hF0, 8'h32), I2(8'hF6, 8'hF8), I2(8'hEE, 8'h56),
                 I3(8'h20, 8'h46, 8'h85), I3(8'h20, 8'h47, 8'h14), I3(8'h20, 8'h4A, 8'h3F),
                 I3(8'h20, 8'h4C, 8'h5A), I3(8'h20, 8'h4F, 8'h2B), I3(8'h20, 8'h53, 8'h11),
                 I3(8'h20, 8'h56, 8'h10), I3(8'h20, 8'h57, 8'h0E), I3(8'h20, 8'h58, 8'h03)};
    exp_tx = '{I1(8'h48)};
    exp_rx = '{I1(8'h47), I1(8'h42)};
    @(posedge clk);
    play(SEQ_INIT, exp_init, "INIT");
    play(SEQ_TX, exp_tx, "TX");
    play(SEQ_RX, exp_rx, "RX");
    // read latency: data follows addr by one clock
    addr <= SEQ_TX; @(posedge clk); addr <= SEQ_INIT; #1;
    check(data.data == 8'h48, "registered read");
    @(posedge clk); #1;
    check(data.data == 8'h40, "next read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
