// adc_model: behavioural model of the serial ADC that acts as the sensing unit.
// Not synthesizable logic of the node; used only by testbenches. When CSn
// falls the model latches `value`; it then drives LEAD zero bits (the clocks
// that run the conversion) followed by BITS data bits, least significant bit
// first, and it shifts in the command bits sent on MOSI during the LEAD
// clocks. Each bit is valid from the falling SCLK edge that precedes it (or
// from CSn falling for the first bit) so that the master samples it on the
// rising edge. It counts completed conversions.
module adc_model #(
  parameter int unsigned BITS = 12,
  parameter int unsigned LEAD = 3
) (
  input  logic            cs_n,
  input  logic            sclk,
  input  logic            mosi,
  input  logic [BITS-1:0] value,
  output logic            miso,
  output int unsigned     conversions,
  output logic [7:0]      command        // bits received during the LEAD clocks
);
  logic [BITS-1:0] held = '0;
  int unsigned     idx  = 0;

  initial begin
    command     = '0;
    miso        = 1'b0;
    conversions = 0;
  end

  function automatic logic bit_at(int unsigned i);
    return (i < LEAD || i >= LEAD + BITS) ? 1'b0 : held[i - LEAD];
  endfunction

  logic [7:0] cmd_sh = '0;
  always @(posedge sclk) if (!cs_n && idx < LEAD) cmd_sh = {cmd_sh[6:0], mosi};
  always @(posedge cs_n) command = cmd_sh;

  always @(negedge cs_n) begin
    cmd_sh = '0;
    held = value;
    idx  = 0;
    miso = bit_at(0);
  end

  always @(negedge sclk) begin
    if (!cs_n) begin
      idx  = idx + 1;
      miso = bit_at(idx);
    end
  end

  always @(posedge cs_n) if (idx > 0) conversions = conversions + 1;
endmodule
