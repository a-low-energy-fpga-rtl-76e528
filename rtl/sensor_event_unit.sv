// sensor_event_unit: sampling and event generation module (sensor manager and
// event trigger in one block). One state machine drives the bit-serial
// evgen_datapath through a fixed sequence for every sampling step q:
//
//   1. ADC read over SPI: CSn low, ADC_LEAD conversion clocks during which the
//      command bits ADC_CMD go out on MOSI (most significant first), then
//      ADC_BITS data bits, least significant first, shifted straight into R0
//      through the datapath's serial input; R0 is then filled with zeros (u(k)).
//   2. Low-pass filter x(k) = (1-a) x(k-1) + a u(k) with a = 2^-ALPHA_SHIFT,
//      by ALPHA_SHIFT rounds of t <- (t + x(k-1)) / 2 starting from t = u(k):
//      a 16-clock serial add into R0 and a one-clock right shift of R0.
//      The first sample after reset sets x directly (x(0) = u(0)).
//   3. R1 <- x(k).  R0 <- x(k) - x_le, sign taken from the last sum bit;
//      if negative R0 <- -R0.  Then |dx| - threshold - 1 is formed without
//      write-back; its sign bit clear means |dx| > threshold: event.
//   4. On an event: R2 <- x(k) (new x_le), R0 <- x(k), and R0 is shifted out
//      on dout for 16 clocks with dout_valid high, least significant bit first.
//
// The filter structure, the send-on-delta rule, the register roles and the
// datapath come from the document, as does an SPI link that carries commands
// and data and clocks the conversion; the SPI framing, the command value, the bit order, the
// iteration that realises the power-of-two filter, the first-sample rule and
// the strict "greater than" compare are this design's choices. The right shift
// is logical, which is exact because ADC samples are zero-extended and so every
// filter value is non-negative (ADC_BITS must stay below 16).
//
// Timing (clk is the always-on slow clock): start is a one-clock pulse; from
// the clock that samples start to the clock with done, inclusive, a step takes
// 2*(ADC_LEAD+ADC_BITS) + (16-ADC_BITS) + 17*ALPHA_SHIFT + 16*k + 2 clocks,
// k = 3 (no event, x >= x_le), +1 if x < x_le, +3 on an event; the first step
// after reset skips the 17*ALPHA_SHIFT filter rounds. done pulses for one clock at the end, with `event_o` in the same
// clock. The threshold is loaded into R3 with thr_load while idle.
module sensor_event_unit
  import wsn_pkg::*;
#(
  parameter int unsigned ADC_BITS    = 12,
  parameter int unsigned ADC_LEAD    = 3,
  parameter int unsigned ALPHA_SHIFT = 3,
  parameter logic [7:0]  ADC_CMD     = 8'h06   // low ADC_LEAD bits are sent
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            thr_load,
  input  logic [DP_W-1:0] threshold,
  // ADC SPI
  output logic            adc_cs_n,
  output logic            adc_sclk,
  output logic            adc_mosi,
  input  logic            adc_miso,
  // status and serial sample output
  output logic            busy,
  output logic            done,
  output logic            event_o,
  output logic            dx_negative,  // x(k) < x_le in this step (valid with done)
  output logic            dout,
  output logic            dout_valid
);

  localparam int unsigned NCLK = ADC_LEAD + ADC_BITS;

  typedef enum logic [3:0] {
    S_IDLE, S_CONV, S_PAD, S_INIT, S_FADD, S_FSHR, S_COPY,
    S_DELTA, S_NEG, S_CMP, S_UPD, S_LOAD, S_OUT, S_DONE
  } state_e;

  state_e      state;
  logic [4:0]  cnt;       // bit counter inside a pass / SPI clock counter
  logic [3:0]  iter;      // filter round counter
  logic        phase;     // SPI half period
  logic        first;     // no filter state yet
  logic        neg_q;     // sign of x - x_le
  logic        evt_q;

  // datapath controls
  logic [3:0]  shift_en;
  a_sel_e      a_sel;
  logic [1:0]  b_sel;
  logic        b_inv;
  cin_sel_e    cin_sel;
  wb_sel_e     wb_sel;
  dst_e        dst;
  logic        sum, cout_unused;

  logic last_bit;
  assign last_bit = (cnt == 5'(DP_W - 1));

  evgen_datapath #(.W(DP_W)) u_dp (
    .clk, .rst_n, .shift_en, .a_sel, .b_sel, .b_inv, .cin_sel, .wb_sel, .dst,
    .din(adc_miso), .thr_load(thr_load && state == S_IDLE), .thr_value(threshold),
    .sum, .cout(cout_unused), .dout
  );

  // Datapath control decode.
  always_comb begin
    shift_en = 4'b1111;
    a_sel    = A_ZERO;
    b_sel    = 2'd0;
    b_inv    = 1'b0;
    cin_sel  = (cnt == '0) ? CIN_0 : CIN_Q;
    wb_sel   = WB_SUM;
    dst      = DST_NONE;
    unique case (state)
      S_CONV: begin
        shift_en = (phase == 1'b0 && cnt >= 5'(ADC_LEAD)) ? 4'b0001 : 4'b0000;
        wb_sel   = WB_DIN;
        dst      = DST_R0;
      end
      S_PAD, S_FSHR: begin
        shift_en = 4'b0001;
        wb_sel   = WB_ZERO;
        dst      = DST_R0;
      end
      S_INIT: begin b_sel = 2'd0; dst = DST_R1; end              // R1 <- R0
      S_FADD: begin a_sel = A_R0; b_sel = 2'd1; dst = DST_R0; end // R0 <- R0 + R1
      S_COPY: begin b_sel = 2'd0; dst = DST_R1; end              // R1 <- R0
      S_DELTA: begin                                              // R0 <- R0 - R2
        a_sel = A_R0; b_sel = 2'd2; b_inv = 1'b1; dst = DST_R0;
        cin_sel = (cnt == '0) ? CIN_1 : CIN_Q;
      end
      S_NEG: begin                                                // R0 <- -R0
        b_sel = 2'd0; b_inv = 1'b1; dst = DST_R0;
        cin_sel = (cnt == '0) ? CIN_1 : CIN_Q;
      end
      S_CMP: begin a_sel = A_R0; b_sel = 2'd3; b_inv = 1'b1; end  // R0 + ~R3
      S_UPD:  begin b_sel = 2'd1; dst = DST_R2; end              // R2 <- R1
      S_LOAD: begin b_sel = 2'd1; dst = DST_R0; end              // R0 <- R1
      S_OUT:  begin end                                           // rotate all
      default: shift_en = 4'b0000;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      iter     <= '0;
      phase    <= 1'b0;
      first    <= 1'b1;
      neg_q    <= 1'b0;
      evt_q    <= 1'b0;
      adc_cs_n <= 1'b1;
      adc_sclk <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_CONV;
          adc_cs_n <= 1'b0;
          cnt      <= '0;
          phase    <= 1'b0;
          evt_q    <= 1'b0;
          neg_q    <= 1'b0;
        end
        S_CONV: begin
          phase    <= ~phase;
          adc_sclk <= ~phase;   // rising edge here, data sampled on it
          if (phase) begin
            if (cnt == 5'(NCLK - 1)) begin
              adc_cs_n <= 1'b1;
              cnt      <= '0;
              state    <= (ADC_BITS < DP_W) ? S_PAD : (first ? S_INIT : S_FADD);
            end else begin
              cnt <= cnt + 5'd1;
            end
          end
        end
        S_PAD: begin
          if (cnt == 5'(DP_W - ADC_BITS - 1)) begin
            cnt   <= '0;
            iter  <= '0;
            state <= first ? S_INIT : S_FADD;
          end else cnt <= cnt + 5'd1;
        end
        S_FADD: begin
          cnt <= cnt + 5'd1;
          if (last_bit) begin cnt <= '0; state <= S_FSHR; end
        end
        S_FSHR: begin
          if (iter == 4'(ALPHA_SHIFT - 1)) state <= S_COPY;
          else state <= S_FADD;
          iter <= iter + 4'd1;
        end
        S_INIT, S_COPY, S_UPD, S_LOAD: begin
          cnt <= cnt + 5'd1;
          if (last_bit) begin
            cnt <= '0;
            unique case (state)
              S_INIT, S_COPY: state <= S_DELTA;
              S_UPD:          state <= S_LOAD;
              default:        state <= S_OUT;
            endcase
            if (state == S_INIT) first <= 1'b0;
          end
        end
        S_DELTA: begin
          cnt <= cnt + 5'd1;
          if (last_bit) begin
            cnt   <= '0;
            neg_q <= sum;
            state <= sum ? S_NEG : S_CMP;
          end
        end
        S_NEG: begin
          cnt <= cnt + 5'd1;
          if (last_bit) begin cnt <= '0; state <= S_CMP; end
        end
        S_CMP: begin
          cnt <= cnt + 5'd1;
          if (last_bit) begin
            cnt   <= '0;
            evt_q <= ~sum;
            state <= sum ? S_DONE : S_UPD;
          end
        end
        S_OUT: begin
          cnt <= cnt + 5'd1;
          if (last_bit) begin cnt <= '0; state <= S_DONE; end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // command bit k of the read is valid from the falling edge before rising edge k
  assign adc_mosi = (state == S_CONV && cnt < 5'(ADC_LEAD)) ? ADC_CMD[3'(ADC_LEAD - 1) - cnt[2:0]] : 1'b0;

  assign busy       = (state != S_IDLE);
  assign done       = (state == S_DONE);
  assign event_o    = (state == S_DONE) && evt_q;
  assign dout_valid = (state == S_OUT);
  assign dx_negative = neg_q;

  // The ADC must deliver at most 16 bits and the filter at least one round.
  initial begin
    assert (ADC_BITS < DP_W && ADC_BITS > 0) else $error("ADC_BITS out of range");
    assert (ALPHA_SHIFT > 0 && ALPHA_SHIFT < 16) else $error("ALPHA_SHIFT out of range");
    assert (ADC_LEAD > 0 && ADC_LEAD <= 8) else $error("ADC_LEAD out of range");
  end

endmodule
