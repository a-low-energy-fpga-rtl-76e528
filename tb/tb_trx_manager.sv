// tb_trx_manager: wakes the transceiver manager for transmit and receive jobs
// against the CC2520 model. Checks the power-up order, the instruction
// sequence sent (INIT then the job's sequence, then TXBUF/RXBUF), the register
// values written by INIT, the frame in the transmit buffer, that the frame is
// sent only after slot_go, the SPI byte time, the master time read back from a
// received frame, and that done/rx_ok follow.
module tb_trx_manager;
  import wsn_pkg::*;
  logic clk = 0, rst_n = 0, slot_go = 0;
  hp_cmd_e cmd = HP_TX;
  logic [7:0] node_id = 8'h5A;
  logic [31:0] tx_time = 32'h1234_5678;
  logic [15:0] tx_sample = 16'h0ABC;
  logic done, rx_ok;
  logic [31:0] rx_time;
  logic vreg_en, radio_rst_n, cs_n, sclk, mosi, miso, stxon, sfd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trx_manager #(.T_VREG(20), .T_OSC(30), .TX_TIMEOUT(2000)) dut (.*);
  cc2520_model radio (.clk, .vreg_en, .resetn(radio_rst_n), .cs_n, .sclk, .mosi,
                      .miso, .stxon, .sfd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected INIT register writes
  task automatic check_init();
    check(radio.xosc_on == 1, "oscillator started");
    check(radio.regs[8'h30] == 8'h32, "TXPOWER");
    check(radio.regs[8'h36] == 8'hF8, "CCACTRL0");
    check(radio.regs[8'h2E] == 8'h56, "FREQCTRL");
    check(radio.regs[8'h46] == 8'h85, "MDMCTRL0");
    check(radio.regs[8'h47] == 8'h14, "MDMCTRL1");
    check(radio.regs[8'h4A] == 8'h3F, "RXCTRL");
    check(radio.regs[8'h4C] == 8'h5A, "FSCTRL");
    check(radio.regs[8'h4F] == 8'h2B, "FSCAL1");
    check(radio.regs[8'h53] == 8'h11, "AGCCTRL1");
    check(radio.regs[8'h56] == 8'h10 && radio.regs[8'h57] == 8'h0E && radio.regs[8'h58] == 8'h03, "ADCTEST");
    check(radio.first_op[0] == OP_SXOSCON, "first instruction SXOSCON");
  endtask

  int t0, t1;
  logic [7:0] f [];
  initial begin
    // ---------------- transmit job ----------------
    repeat (3) @(posedge clk);
    check(vreg_en == 0 && radio_rst_n == 0, "radio off in reset");
    rst_n = 1;
    @(posedge clk);
    check(vreg_en == 1 && radio_rst_n == 0, "regulator first, radio still in reset");
    wait (cs_n == 0);
    t0 = $time;
    wait (cs_n == 1);
    t1 = $time;
    check((t1 - t0) >= 160 && (t1 - t0) <= 180, $sformatf("one-byte instruction time %0d", t1 - t0));
    wait (radio.txlen == 2 + TX_PAYLOAD - 1 && cs_n == 1);
    repeat (200) @(posedge clk);
    check(radio.frames_sent == 0 && !done, "waits for the slot");
    check_init();
    check(radio.first_op[13] == OP_SFLUSHTX, "TX sequence after INIT");
    check(radio.first_op[14] == OP_TXBUF, "TXBUF after TX sequence");
    slot_go = 1;
    wait (done);
    check(radio.frames_sent == 1, "frame sent");
    check(radio.sent_len == 8 && radio.sent[0] == 8'(TX_PAYLOAD + FCS_BYTES) && radio.sent[1] == 8'h5A
          && radio.sent[2] == 8'h12 && radio.sent[5] == 8'h78 && radio.sent[6] == 8'h0A
          && radio.sent[7] == 8'hBC, "frame contents");
    check(rx_ok == 0, "no rx_ok on transmit");
    // ---------------- sleep, then receive job ----------------
    @(posedge clk); rst_n = 0; slot_go = 0; cmd = HP_RX;
    repeat (5) @(posedge clk);
    check(vreg_en == 0, "radio powered down in sleep");
    foreach (radio.regs[i]) radio.regs[i] = '0;
    rst_n = 1;
    wait (radio.rx_on == 1);
    repeat (5) @(posedge clk);
    check_init();
    check(radio.powerups == 2, "re-initialised after power-up");
    check(radio.first_op[13] == OP_SFLUSHRX && radio.first_op[14] == OP_SRXON, "RX sequence");
    repeat (50) @(posedge clk);
    check(!done, "waits for a frame");
    f = new [5];
    f[0] = 8'(RX_PAYLOAD + FCS_BYTES); f[1] = 8'hDE; f[2] = 8'hAD; f[3] = 8'hBE; f[4] = 8'hEF;
    radio.deliver(f, 5);
    wait (done);
    check(rx_ok == 1, "rx_ok");
    check(rx_time == 32'hDEADBEEF, $sformatf("master time %h", rx_time));
    check(radio.first_op[15] == OP_RXBUF, "RXBUF read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
