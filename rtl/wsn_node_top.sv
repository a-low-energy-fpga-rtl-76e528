// wsn_node_top: control logic of the event-based wireless sensor node.
//
// Low-power section (clk_slow, about 32 kHz, always running):
//   sensor_event_unit  reads the ADC, low-pass filters the samples and applies
//                      the send-on-delta rule through a one-bit-wide datapath
//   node_supervisor    sampling period, reference clock and timestamps, TDMA
//                      slot timing, clock synchronisation, and wake-up of the
//                      high-power section
// High-power section (clk_fast, MHz range, clock gated off while asleep):
//   trx_manager        powers up and initialises the CC2520 radio from its
//                      command ROM, sends the event frame in the node's slot or
//                      receives the master's synchronisation frame
//
// The supervisor's hp_en crosses into the fast domain through a two-flip-flop
// synchroniser clocked by the free-running fast clock; its output both enables
// the clock gate and releases the manager's reset, so every wake-up starts the
// manager from power-up and every sleep resets it and stops its clock. The
// manager's done/rx_ok levels and the radio's SFD line cross back through
// synchronisers in the supervisor; multi-bit values that cross are held stable
// while they are read. The partition into the two sections and the blocks in
// them follow the document; the crossing scheme is this design's.
//
// The ADC and the radio are external chips; their pins are ports here.
module wsn_node_top
  import wsn_pkg::*;
#(
  parameter int unsigned ADC_BITS     = 12,
  parameter int unsigned ADC_LEAD     = 3,
  parameter int unsigned ALPHA_SHIFT  = 3,
  parameter logic [7:0]  ADC_CMD      = 8'h06,
  parameter int unsigned PERIOD_TICKS = 3277,
  parameter int unsigned FRAME_LOG2   = 12,
  parameter int unsigned SLOT_OFFSET  = 1024,
  parameter int unsigned WAKE_LEAD    = 64,
  parameter int unsigned TX_ABORT     = 256,
  parameter int unsigned RX_WINDOW    = 64,
  parameter int unsigned SYNC_TICKS   = 1966080,
  parameter int unsigned T_VREG       = 800,
  parameter int unsigned T_OSC        = 2400
) (
  input  logic            clk_slow,
  input  logic            clk_fast,
  input  logic            rst_n,
  // configuration
  input  logic [7:0]      node_id,
  input  logic            thr_load,
  input  logic [DP_W-1:0] threshold,
  // ADC
  output logic            adc_cs_n,
  output logic            adc_sclk,
  output logic            adc_mosi,
  input  logic            adc_miso,
  // CC2520 radio
  output logic            radio_vreg_en,
  output logic            radio_rst_n,
  output logic            radio_cs_n,
  output logic            radio_sclk,
  output logic            radio_mosi,
  input  logic            radio_miso,
  output logic            radio_stxon,
  input  logic            radio_sfd,
  // status
  output logic [31:0]     local_time,
  output logic            synced,
  output logic            hp_awake,
  output logic            sample_event,  // one slow clock: the step fired an event
  output logic            sample_dx_neg  // with sample_event's step: x < x_le
);

  // low-power section
  logic    sample_start, step_done, step_event, dx_negative, dout, dout_valid;
  logic    hp_en, slot_go, hp_done, hp_rx_ok;
  hp_cmd_e hp_cmd;
  logic [31:0] tx_time, rx_time;
  logic [15:0] tx_sample;

  sensor_event_unit #(
    .ADC_BITS(ADC_BITS), .ADC_LEAD(ADC_LEAD), .ALPHA_SHIFT(ALPHA_SHIFT),
    .ADC_CMD(ADC_CMD)
  ) u_sensor (
    .clk(clk_slow), .rst_n, .start(sample_start), .thr_load, .threshold,
    .adc_cs_n, .adc_sclk, .adc_mosi, .adc_miso,
    .busy(), .done(step_done), .event_o(step_event), .dx_negative, .dout, .dout_valid
  );

  node_supervisor #(
    .PERIOD_TICKS(PERIOD_TICKS), .FRAME_LOG2(FRAME_LOG2), .SLOT_OFFSET(SLOT_OFFSET),
    .WAKE_LEAD(WAKE_LEAD), .TX_ABORT(TX_ABORT), .RX_WINDOW(RX_WINDOW),
    .SYNC_TICKS(SYNC_TICKS)
  ) u_super (
    .clk(clk_slow), .rst_n, .sample_start, .step_done, .step_event, .dout, .dout_valid,
    .hp_en, .hp_cmd, .slot_go, .tx_time, .tx_sample, .hp_done, .hp_rx_ok, .rx_time,
    .sfd(radio_sfd), .local_time, .synced
  );

  assign sample_event  = step_event;
  assign sample_dx_neg = step_done & dx_negative;

  // high-power section
  logic hp_en_f, gclk, hp_rst_n;

  sync_2ff u_sync_en (.clk(clk_fast), .rst_n, .d(hp_en), .q(hp_en_f));
  clock_gate u_cg (.clk(clk_fast), .en(hp_en_f), .gclk);
  assign hp_rst_n = rst_n & hp_en_f;
  assign hp_awake = hp_en_f;

  trx_manager #(.T_VREG(T_VREG), .T_OSC(T_OSC)) u_trx (
    .clk(gclk), .rst_n(hp_rst_n), .cmd(hp_cmd), .slot_go, .node_id,
    .tx_time, .tx_sample, .done(hp_done), .rx_ok(hp_rx_ok), .rx_time,
    .vreg_en(radio_vreg_en), .radio_rst_n, .cs_n(radio_cs_n), .sclk(radio_sclk),
    .mosi(radio_mosi), .miso(radio_miso), .stxon(radio_stxon), .sfd(radio_sfd)
  );

endmodule
