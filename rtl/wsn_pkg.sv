// wsn_pkg: types and constants shared by the event-based sensor node.
// Holds the operand/write-back select encodings of the bit-serial datapath,
// the command that the node supervisor gives to the transceiver manager,
// the layout of a command-ROM word, and the CC2520 instruction opcodes used
// by the command sequences. The opcodes come from the CC2520 instruction set,
// not from the node's own design description.
package wsn_pkg;

  // Width of the datapath registers R0..R3 (four 16-bit registers).
  localparam int unsigned DP_W = 16;

  // Adder operand A: R0 serial output or constant 0.
  typedef enum logic {A_R0 = 1'b0, A_ZERO = 1'b1} a_sel_e;

  // Carry-in source of the one-bit adder.
  typedef enum logic [1:0] {CIN_Q = 2'd0, CIN_0 = 2'd1, CIN_1 = 2'd2} cin_sel_e;

  // Source of the bit written back into the destination register.
  typedef enum logic [1:0] {WB_SUM = 2'd0, WB_DIN = 2'd1, WB_ZERO = 2'd2} wb_sel_e;

  // Destination of the write-back bit (demultiplexer). R3 is never written.
  typedef enum logic [1:0] {DST_NONE = 2'd0, DST_R0 = 2'd1, DST_R1 = 2'd2, DST_R2 = 2'd3} dst_e;

  // Operation the node supervisor asks the transceiver manager to perform.
  typedef enum logic {HP_TX = 1'b0, HP_RX = 1'b1} hp_cmd_e;

  // One word of the transceiver command ROM: a byte plus two markers.
  typedef struct packed {
    logic       last_of_instr;  // raise CSn after this byte
    logic       last_of_seq;    // sequence ends after this byte
    logic [7:0] data;           // byte sent on MOSI
  } rom_word_t;

  localparam int unsigned ROM_AW = 6;

  // Sequence start addresses inside the command ROM.
  localparam logic [ROM_AW-1:0] SEQ_INIT = 6'd0;
  localparam logic [ROM_AW-1:0] SEQ_TX   = 6'd34;
  localparam logic [ROM_AW-1:0] SEQ_RX   = 6'd35;

  // CC2520 opcodes.
  localparam logic [7:0] OP_SNOP     = 8'h00;
  localparam logic [7:0] OP_MEMWR    = 8'h20;  // | addr[11:8]
  localparam logic [7:0] OP_RXBUF    = 8'h30;
  localparam logic [7:0] OP_TXBUF    = 8'h3A;
  localparam logic [7:0] OP_SXOSCON  = 8'h40;
  localparam logic [7:0] OP_SRXON    = 8'h42;
  localparam logic [7:0] OP_SRFOFF   = 8'h45;
  localparam logic [7:0] OP_SFLUSHRX = 8'h47;
  localparam logic [7:0] OP_SFLUSHTX = 8'h48;
  localparam logic [7:0] OP_REGWR    = 8'hC0;  // | addr[5:0]

  // Data frame sent on an event: node id, 32-bit timestamp, 16-bit sample.
  localparam int unsigned TX_PAYLOAD = 7;
  localparam int unsigned FCS_BYTES  = 2;
  // Synchronisation frame received from the master: 32-bit master time.
  localparam int unsigned RX_PAYLOAD = 4;

endpackage
