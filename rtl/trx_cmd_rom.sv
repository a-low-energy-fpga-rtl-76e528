// trx_cmd_rom: read-only memory with the transceiver command sequences.
// Each word is one byte for the SPI bus plus two markers: end of instruction
// (the manager raises CSn after it) and end of sequence. Three sequences are
// stored: INIT, played after every power-up of the radio, then TX (flush the
// transmit buffer) or RX (flush the receive buffer and turn the receiver on).
// The document says that the command sequences live in a dedicated ROM and are
// chosen by the supervisor's command; the contents are this design's, taken
// from the CC2520's published recommended register settings (transmit power,
// CCA, modem, receiver, synthesiser and ADC test registers) and channel 26.
// They should be checked against the CC2520 datasheet before use with a chip.
// Registered read: data is valid one clock after addr.
module trx_cmd_rom
  import wsn_pkg::*;
(
  input  logic              clk,
  input  logic [ROM_AW-1:0] addr,
  output rom_word_t         data
);

  // One register write: 1 = end of instruction, 0 = more bytes follow.
  function automatic rom_word_t w(input logic [7:0] b, input logic eoi, input logic eos);
    rom_word_t r;
    r.last_of_instr = eoi;
    r.last_of_seq   = eos;
    r.data          = b;
    return r;
  endfunction

  function automatic rom_word_t rom_at(input logic [ROM_AW-1:0] a);
    unique case (a)
      // INIT: crystal oscillator on
      6'd0:  return w(OP_SXOSCON, 1, 0);
      // REGWR TXPOWER (0x30) = 0x32
      6'd1:  return w(OP_REGWR | 8'h30, 0, 0);
      6'd2:  return w(8'h32, 1, 0);
      // REGWR CCACTRL0 (0x36) = 0xF8
      6'd3:  return w(OP_REGWR | 8'h36, 0, 0);
      6'd4:  return w(8'hF8, 1, 0);
      // REGWR FREQCTRL (0x2E) = 11 + 5*(26-11) = 0x56, channel 26
      6'd5:  return w(OP_REGWR | 8'h2E, 0, 0);
      6'd6:  return w(8'h56, 1, 0);
      // MEMWR MDMCTRL0 (0x046) = 0x85
      6'd7:  return w(OP_MEMWR, 0, 0);
      6'd8:  return w(8'h46, 0, 0);
      6'd9:  return w(8'h85, 1, 0);
      // MEMWR MDMCTRL1 (0x047) = 0x14
      6'd10: return w(OP_MEMWR, 0, 0);
      6'd11: return w(8'h47, 0, 0);
      6'd12: return w(8'h14, 1, 0);
      // MEMWR RXCTRL (0x04A) = 0x3F
      6'd13: return w(OP_MEMWR, 0, 0);
      6'd14: return w(8'h4A, 0, 0);
      6'd15: return w(8'h3F, 1, 0);
      // MEMWR FSCTRL (0x04C) = 0x5A
      6'd16: return w(OP_MEMWR, 0, 0);
      6'd17: return w(8'h4C, 0, 0);
      6'd18: return w(8'h5A, 1, 0);
      // MEMWR FSCAL1 (0x04F) = 0x2B
      6'd19: return w(OP_MEMWR, 0, 0);
      6'd20: return w(8'h4F, 0, 0);
      6'd21: return w(8'h2B, 1, 0);
      // MEMWR AGCCTRL1 (0x053) = 0x11
      6'd22: return w(OP_MEMWR, 0, 0);
      6'd23: return w(8'h53, 0, 0);
      6'd24: return w(8'h11, 1, 0);
      // MEMWR ADCTEST0..2 (0x056..0x058) = 0x10, 0x0E, 0x03
      6'd25: return w(OP_MEMWR, 0, 0);
      6'd26: return w(8'h56, 0, 0);
      6'd27: return w(8'h10, 1, 0);
      6'd28: return w(OP_MEMWR, 0, 0);
      6'd29: return w(8'h57, 0, 0);
      6'd30: return w(8'h0E, 1, 0);
      6'd31: return w(OP_MEMWR, 0, 0);
      6'd32: return w(8'h58, 0, 0);
      6'd33: return w(8'h03, 1, 1);
      // TX: flush transmit buffer
      6'd34: return w(OP_SFLUSHTX, 1, 1);
      // RX: flush receive buffer, receiver on
      6'd35: return w(OP_SFLUSHRX, 1, 0);
      6'd36: return w(OP_SRXON, 1, 1);
      default: return w(OP_SNOP, 1, 1);
    endcase
  endfunction

  always_ff @(posedge clk) data <= rom_at(addr);

endmodule
