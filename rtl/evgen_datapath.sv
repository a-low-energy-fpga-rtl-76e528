// evgen_datapath: one-bit-wide datapath of the sampling and event generation
// module. Four 16-bit shift registers R0..R3 hold, in two's complement, the
// working value (R0), the previous filter output x(k-1) (R1), the filter output
// at the last event x_le (R2) and the send-on-delta threshold (R3). Each
// register shifts right by one place per enabled clock, least significant bit
// first out of bit 0; its new top bit is either its own bit 0 (recirculation)
// or the write-back bit, when the write-back demultiplexer selects it.
//
// One full 16-clock pass with all registers enabled therefore computes
//   dst = A + (B or ~B) + cin
// serially: A is R0 or 0, B is any register chosen by a 4:1 multiplexer and
// optionally inverted, the carry-in of bit 0 is 0 or 1 and later bits take the
// carry flip-flop, which stores the adder's carry-out every enabled clock.
// The write-back bit is the adder sum, the serial input din, or 0. All of this
// is the structure of the document's datapath figure. Per-register shift
// enables are this design's choice: they let R0 take ADC bits one at a time and
// be shifted right by one place (a logical shift: write back 0) on its own.
//
// Interface: all controls are sampled on the rising clk edge; `sum` and `cout`
// are combinational from the current register bits and controls; `dout` is R0
// bit 0. R3 is loaded in parallel by `thr_load` (configuration, own choice).
module evgen_datapath
  import wsn_pkg::*;
#(
  parameter int unsigned W = DP_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [3:0]    shift_en,   // per-register shift enable, bit i = Ri
  input  a_sel_e        a_sel,
  input  logic [1:0]    b_sel,      // register driving adder input B
  input  logic          b_inv,      // invert B (subtraction)
  input  cin_sel_e      cin_sel,
  input  wb_sel_e       wb_sel,
  input  dst_e          dst,
  input  logic          din,        // serial input (ADC data)
  input  logic          thr_load,
  input  logic [W-1:0]  thr_value,
  output logic          sum,
  output logic          cout,
  output logic          dout
);

  logic [W-1:0] r [4];
  logic         carry_q;
  logic         a_bit, b_mux, b_bit, cin, wb_bit;

  always_comb begin
    a_bit  = (a_sel == A_R0) ? r[0][0] : 1'b0;
    b_mux  = r[b_sel][0];
    b_bit  = b_inv ? ~b_mux : b_mux;
    unique case (cin_sel)
      CIN_0:   cin = 1'b0;
      CIN_1:   cin = 1'b1;
      default: cin = carry_q;
    endcase
    sum  = a_bit ^ b_bit ^ cin;
    cout = (a_bit & b_bit) | (a_bit & cin) | (b_bit & cin);
    unique case (wb_sel)
      WB_DIN:  wb_bit = din;
      WB_ZERO: wb_bit = 1'b0;
      default: wb_bit = sum;
    endcase
  end

  assign dout = r[0][0];

  // R0..R2: recirculate or take the write-back bit.
  for (genvar i = 0; i < 3; i++) begin : g_rw
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r[i] <= '0;
      end else if (shift_en[i]) begin
        r[i] <= {(dst == dst_e'(i + 1)) ? wb_bit : r[i][0], r[i][W-1:1]};
      end
    end
  end

  // R3: threshold, recirculates only; parallel load for configuration.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r[3] <= '0;
    end else if (thr_load) begin
      r[3] <= thr_value;
    end else if (shift_en[3]) begin
      r[3] <= {r[3][0], r[3][W-1:1]};
    end
  end

  // Carry flip-flop: D = adder carry-out.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) carry_q <= 1'b0;
    else if (shift_en[0]) carry_q <= cout;
  end

endmodule
