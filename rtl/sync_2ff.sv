// sync_2ff: two-flip-flop synchroniser for a level that crosses into the clk
// domain (between the 32 kHz and MHz sections, and for the radio's SFD pin).
// The output follows the input two to three clk edges later; the reset value
// is RST_VAL. The crossing scheme is this design's choice; the document only
// says that the two sections run on different clocks.
module sync_2ff #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
