// spi_master: byte-wide SPI master (mode 0) towards the radio transceiver.
// A one-clock `start` sends tx_byte most significant bit first while the
// byte from MISO is collected; `done` pulses for one clock when the eighth
// bit has been sampled and rx_byte is valid. SCLK idles low; MOSI changes
// after a falling edge and MISO is sampled on the rising edge. The SCLK half
// period is HALF_DIV clocks. Chip select is not handled here: the caller holds
// CSn low across the bytes of one instruction. The document only names the SPI
// link; the mode, bit order (that of the CC2520) and framing are this design's.
// A byte takes 16*HALF_DIV clocks from start to done.
module spi_master #(
  parameter int unsigned HALF_DIV = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tx_byte,
  output logic [7:0] rx_byte,
  output logic       busy,
  output logic       done,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso
);
  localparam int unsigned DW = (HALF_DIV > 1) ? $clog2(HALF_DIV) : 1;

  logic [7:0]    sh_tx;
  logic [2:0]    bitn;
  logic [DW-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_tx   <= '0;
      rx_byte <= '0;
      bitn    <= '0;
      div     <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      sclk    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          sh_tx <= tx_byte;
          bitn  <= '0;
          div   <= '0;
        end
      end else if (div == DW'(HALF_DIV - 1)) begin
        div  <= '0;
        sclk <= ~sclk;
        if (!sclk) begin
          rx_byte <= {rx_byte[6:0], miso};     // rising edge: sample
        end else begin                          // falling edge: next bit
          sh_tx <= {sh_tx[6:0], 1'b0};
          bitn  <= bitn + 3'd1;
          if (bitn == 3'd7) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end else begin
        div <= div + DW'(1);
      end
    end
  end

  assign mosi = sh_tx[7];

  // start is only honoured while idle
  property p_no_start_busy;
    @(posedge clk) disable iff (!rst_n) start |-> !busy;
  endproperty
  a_no_start_busy: assert property (p_no_start_busy);
endmodule
