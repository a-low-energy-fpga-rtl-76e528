// trx_manager: transceiver manager of the high-power section. One state machine
// runs the CC2520 radio for a single job each time the section is woken up:
//
//   power-up   regulator enable, wait T_VREG clocks, release RESETn, wait T_OSC
//   INIT       play the INIT command sequence from trx_cmd_rom over SPI
//   TX job     play the TX sequence, write the frame into the radio's transmit
//              buffer (TXBUF instruction: length, node id, 32-bit timestamp,
//              16-bit sample, most significant byte first), wait for the
//              supervisor's slot_go, pulse the dedicated send-packet line for
//              STXON_W clocks, then wait for the start-of-frame (SFD) line to
//              rise and fall (or TX_TIMEOUT clocks) and report done
//   RX job     play the RX sequence, wait for SFD to rise and fall (a frame has
//              arrived), read the receive buffer (RXBUF: length and a 32-bit
//              master time) and report done, with rx_ok if the length matched
//
// The document gives the single state machine, the SPI link, the sequences
// held in a ROM and chosen by the supervisor's command, initialisation at every
// power-up, buffer transfers, and the two dedicated lines (send packet and
// start of frame). The power-up timing, frame layout and job structure are
// this design's choices.
//
// Interface: clk is the gated fast clock; rst_n is held low while the section
// is asleep, so each wake-up starts from S_PWR. cmd, node_id, tx_time and
// tx_sample must be stable while rst_n is high. slot_go and sfd are
// asynchronous and synchronised here. done stays high until reset.
module trx_manager
  import wsn_pkg::*;
#(
  parameter int unsigned T_VREG     = 800,     // 100 us at 8 MHz
  parameter int unsigned T_OSC      = 2400,    // 300 us at 8 MHz
  parameter int unsigned STXON_W    = 4,
  parameter int unsigned TX_TIMEOUT = 65535,
  parameter int unsigned SPI_HALF   = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  hp_cmd_e     cmd,
  input  logic        slot_go,
  input  logic [7:0]  node_id,
  input  logic [31:0] tx_time,
  input  logic [15:0] tx_sample,
  output logic        done,
  output logic        rx_ok,
  output logic [31:0] rx_time,
  // CC2520 pins
  output logic        vreg_en,
  output logic        radio_rst_n,
  output logic        cs_n,
  output logic        sclk,
  output logic        mosi,
  input  logic        miso,
  output logic        stxon,
  input  logic        sfd
);

  typedef enum logic [3:0] {
    S_PWR, S_OSC, S_FETCH, S_SEND, S_CSH, S_BUF, S_BUF_CSH,
    S_WAIT_SLOT, S_STXON, S_SFD_HI, S_SFD_LO, S_DONE
  } state_e;

  localparam int unsigned TX_BYTES = 2 + TX_PAYLOAD;  // opcode, length, payload
  localparam int unsigned RX_BYTES = 2 + RX_PAYLOAD;  // opcode, length, payload
  localparam int unsigned CW = 17;

  state_e            state;
  logic [CW-1:0]     cnt;
  logic              in_init;     // playing INIT (else the job's own sequence)
  logic [ROM_AW-1:0] addr;
  rom_word_t         rom_q;
  logic [3:0]        bidx;        // byte index in a buffer transfer
  logic [7:0]        rx_len;
  logic              spi_start, spi_done;
  logic [7:0]        spi_tx, spi_rx;
  logic              slot_go_s, sfd_s;

  sync_2ff u_sync_slot (.clk, .rst_n, .d(slot_go), .q(slot_go_s));
  sync_2ff u_sync_sfd  (.clk, .rst_n, .d(sfd),     .q(sfd_s));

  trx_cmd_rom u_rom (.clk, .addr, .data(rom_q));

  spi_master #(.HALF_DIV(SPI_HALF)) u_spi (
    .clk, .rst_n, .start(spi_start), .tx_byte(spi_tx), .rx_byte(spi_rx),
    .busy(), .done(spi_done), .sclk, .mosi, .miso);

  // Byte bidx of the buffer instruction of this job.
  function automatic logic [7:0] buf_byte(input hp_cmd_e c, input logic [3:0] i);
    if (c == HP_RX) return (i == 0) ? OP_RXBUF : 8'h00;
    unique case (i)
      4'd0:    return OP_TXBUF;
      4'd1:    return 8'(TX_PAYLOAD + FCS_BYTES);
      4'd2:    return node_id;
      4'd3:    return tx_time[31:24];
      4'd4:    return tx_time[23:16];
      4'd5:    return tx_time[15:8];
      4'd6:    return tx_time[7:0];
      4'd7:    return tx_sample[15:8];
      default: return tx_sample[7:0];
    endcase
  endfunction

  logic [3:0] buf_last;
  assign buf_last = (cmd == HP_RX) ? 4'(RX_BYTES - 1) : 4'(TX_BYTES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_PWR;
      cnt         <= '0;
      in_init     <= 1'b1;
      addr        <= SEQ_INIT;
      bidx        <= '0;
      rx_len      <= '0;
      rx_time     <= '0;
      rx_ok       <= 1'b0;
      done        <= 1'b0;
      vreg_en     <= 1'b0;
      radio_rst_n <= 1'b0;
      cs_n        <= 1'b1;
      stxon       <= 1'b0;
      spi_start   <= 1'b0;
      spi_tx      <= '0;
    end else begin
      spi_start <= 1'b0;
      unique case (state)
        S_PWR: begin
          vreg_en <= 1'b1;
          cnt     <= cnt + CW'(1);
          if (cnt == CW'(T_VREG)) begin
            radio_rst_n <= 1'b1;
            cnt         <= '0;
            state       <= S_OSC;
          end
        end
        S_OSC: begin
          cnt <= cnt + CW'(1);
          if (cnt == CW'(T_OSC)) begin
            cnt   <= '0;
            state <= S_FETCH;
          end
        end
        // ROM data is registered: one clock after addr it is valid.
        S_FETCH: begin
          cnt <= cnt + CW'(1);
          if (cnt == CW'(1)) begin
            cnt       <= '0;
            cs_n      <= 1'b0;
            spi_tx    <= rom_q.data;
            spi_start <= 1'b1;
            state     <= S_SEND;
          end
        end
        S_SEND: if (spi_done) begin
          if (rom_q.last_of_instr) begin
            cs_n  <= 1'b1;
            state <= S_CSH;
          end else begin
            addr  <= addr + ROM_AW'(1);
            state <= S_FETCH;
          end
        end
        S_CSH: begin
          if (!rom_q.last_of_seq) begin
            addr  <= addr + ROM_AW'(1);
            state <= S_FETCH;
          end else if (in_init) begin
            in_init <= 1'b0;
            addr    <= (cmd == HP_TX) ? SEQ_TX : SEQ_RX;
            state   <= S_FETCH;
          end else if (cmd == HP_TX) begin
            bidx      <= '0;
            cs_n      <= 1'b0;
            spi_tx    <= buf_byte(cmd, 4'd0);
            spi_start <= 1'b1;
            state     <= S_BUF;
          end else begin
            state <= S_SFD_HI;             // receiver on: wait for a frame
          end
        end
        S_BUF: if (spi_done) begin
          if (cmd == HP_RX) begin
            if (bidx == 4'd1) rx_len <= spi_rx;
            if (bidx >= 4'd2) rx_time <= {rx_time[23:0], spi_rx};
          end
          if (bidx == buf_last) begin
            cs_n  <= 1'b1;
            state <= S_BUF_CSH;
          end else begin
            bidx      <= bidx + 4'd1;
            spi_tx    <= buf_byte(cmd, bidx + 4'd1);
            spi_start <= 1'b1;
          end
        end
        S_BUF_CSH: begin
          if (cmd == HP_TX) state <= S_WAIT_SLOT;
          else begin
            rx_ok <= (rx_len == 8'(RX_PAYLOAD + FCS_BYTES));
            done  <= 1'b1;
            state <= S_DONE;
          end
        end
        S_WAIT_SLOT: if (slot_go_s) begin
          stxon <= 1'b1;
          cnt   <= '0;
          state <= S_STXON;
        end
        S_STXON: begin
          cnt <= cnt + CW'(1);
          if (cnt == CW'(STXON_W - 1)) begin
            stxon <= 1'b0;
            cnt   <= '0;
            state <= S_SFD_HI;
          end
        end
        S_SFD_HI: begin
          if (cmd == HP_TX) cnt <= cnt + CW'(1);
          if (sfd_s) begin
            cnt   <= '0;
            state <= S_SFD_LO;
          end else if (cmd == HP_TX && cnt == CW'(TX_TIMEOUT)) begin
            done  <= 1'b1;
            state <= S_DONE;
          end
        end
        S_SFD_LO: if (!sfd_s) begin
          if (cmd == HP_TX) begin
            done  <= 1'b1;
            state <= S_DONE;
          end else begin
            bidx      <= '0;
            cs_n      <= 1'b0;
            spi_tx    <= buf_byte(cmd, 4'd0);
            spi_start <= 1'b1;
            state     <= S_BUF;
          end
        end
        S_DONE: ;
        default: state <= S_PWR;
      endcase
    end
  end

  // the send-packet line is only pulsed for a transmit job
  a_stxon_tx: assert property (@(posedge clk) disable iff (!rst_n) stxon |-> cmd == HP_TX);

endmodule
