// cc2520_model: behavioural model of the CC2520 802.15.4 radio, as far as the
// node's transceiver manager uses it. Not synthesizable; testbenches only.
// It is an SPI slave (mode 0, most significant bit first) that is held in
// reset while VREG_EN is low or RESETn is low. It records every instruction:
// the opcodes seen, register writes (REGWR to 0x00-0x3F, MEMWR to 0x000-0x0FF),
// the transmit buffer written by TXBUF, and it answers RXBUF with the receive
// buffer. SRXON turns the receiver on, SFLUSHRX/SFLUSHTX empty the buffers.
// A rising edge on the STXON pin with a loaded transmit buffer sends the frame:
// SFD goes high SFD_LAT clocks later and stays high for BYTE_CLKS clocks per
// byte, the on-air time of the frame at 250 kbit/s.
// deliver() makes a frame arrive while the receiver is on, with the same SFD
// pulse, and fills the receive buffer. The status byte returned during every
// opcode is 0x00.
module cc2520_model #(
  parameter int unsigned SFD_LAT   = 6,
  parameter int unsigned BYTE_CLKS = 256   // 32 us per byte (250 kbit/s) at 8 MHz
) (
  input  logic clk,
  input  logic vreg_en,
  input  logic resetn,
  input  logic cs_n,
  input  logic sclk,
  input  logic mosi,
  output logic miso,
  input  logic stxon,
  output logic sfd
);
  logic [7:0] regs [256];
  logic [7:0] txbuf [128];
  logic [7:0] rxbuf [128];
  int txlen = 0, rxlen = 0, rxrd = 0;
  int sent_len = 0;
  logic [7:0] sent [128];
  int frames_sent = 0, instr_count = 0, xosc_on = 0, rx_on = 0, powerups = 0;
  logic [7:0] first_op [64];
  int nbytes = 0;
  bit mute_tx = 0;  // testbench switch: ignore the next STXON (lost transmission)
  logic [7:0] cur_op, addr_hi, addr_lo, shin, shout;
  int bitc = 0;

  initial begin
    miso = 0; sfd = 0;
    foreach (regs[i]) regs[i] = '0;
  end

  wire alive = vreg_en && resetn;

  always @(posedge resetn) if (vreg_en) begin
    powerups++; xosc_on = 0; rx_on = 0; txlen = 0; rxlen = 0; rxrd = 0; instr_count = 0;
  end

  function automatic logic [7:0] reply(input int n);
    if (n == 0) return 8'h00;
    if (cur_op == 8'h30) return (rxrd < rxlen) ? rxbuf[rxrd] : 8'h00;
    return 8'h00;
  endfunction

  always @(negedge cs_n) if (alive) begin
    nbytes = 0; bitc = 0; shout = reply(0); miso = shout[7];
  end

  always @(posedge sclk) if (alive && !cs_n) begin
    shin = {shin[6:0], mosi};
    bitc++;
    if (bitc == 8) begin
      bitc = 0;
      byte_in(shin);
      nbytes++;
    end
  end

  always @(negedge sclk) if (alive && !cs_n) begin
    if (bitc == 0) shout = reply(nbytes);
    else shout = {shout[6:0], 1'b0};
    miso = shout[7];
  end

  task automatic byte_in(input logic [7:0] b);
    if (nbytes == 0) begin
      cur_op = b;
      if (instr_count < 64) first_op[instr_count] = b;
      instr_count++;
      case (b)
        8'h40: xosc_on = 1;
        8'h42: rx_on = 1;
        8'h45: rx_on = 0;
        8'h47: begin rxlen = 0; rxrd = 0; end
        8'h48: txlen = 0;
        default: ;
      endcase
    end else begin
      if (cur_op[7:6] == 2'b11 && nbytes == 1) regs[cur_op[5:0]] = b;
      if (cur_op[7:4] == 4'h2) begin
        if (nbytes == 1) addr_lo = b;
        if (nbytes == 2) regs[addr_lo] = b;
      end
      if (cur_op == 8'h3A && txlen < 128) begin txbuf[txlen] = b; txlen++; end
      if (cur_op == 8'h30) rxrd++;
    end
  endtask

  // transmit on the dedicated send-packet line
  always @(posedge stxon) if (mute_tx) mute_tx = 0;
  else if (alive && xosc_on && txlen > 0) begin
    repeat (SFD_LAT) @(posedge clk);
    sfd = 1;
    sent_len = txlen;
    for (int i = 0; i < txlen; i++) sent[i] = txbuf[i];
    repeat (BYTE_CLKS * txlen) @(posedge clk);
    sfd = 0;
    frames_sent++;
  end

  task automatic deliver(input logic [7:0] frame [], input int n);
    if (alive && rx_on) begin
      sfd = 1;
      repeat (BYTE_CLKS * n) @(posedge clk);
      for (int i = 0; i < n; i++) rxbuf[i] = frame[i];
      rxlen = n; rxrd = 0;
      sfd = 0;
    end
  endtask
endmodule
