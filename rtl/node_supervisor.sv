// node_supervisor: always-on coordinator of the sensor node (slow clock).
//
//   reference clock  local_time counts slow-clock ticks; it is the timestamp of
//                    every measurement and defines the TDMA frame: the frame
//                    phase is local_time modulo 2^FRAME_LOG2.
//   sampling         every PERIOD_TICKS ticks it starts one step of the
//                    sensor_event_unit and stamps it with local_time.
//   event handling   it collects the filtered sample shifted out on an event
//                    and marks it pending (a newer event replaces an older one).
//   transmit         with a sample pending, it wakes the high-power section
//                    WAKE_LEAD ticks before the node's slot (phase SLOT_OFFSET),
//                    asks for a TX job, raises slot_go when the slot starts and
//                    puts the section back to sleep when the job reports done
//                    (or after TX_ABORT ticks).
//   synchronisation  every SYNC_TICKS ticks it wakes the section for an RX job
//                    WAKE_LEAD ticks before frame phase 0, latches local_time
//                    when the radio's start-of-frame line rises, and when the
//                    job returns the master's time t_m carried by that frame it
//                    corrects the clock so that the SFD instant reads t_m:
//                    local_time += t_m - t_sfd. Without a frame within
//                    WAKE_LEAD + RX_WINDOW ticks the section is put to sleep.
//
// The document gives the supervisor's roles: sampling period, sending samples
// on events, waking the high-power section, keeping the reference clock
// synchronised with the master and timestamping. The TDMA timing, the wake-up
// lead, the correction rule (the document's synchronisation scheme is taken
// from elsewhere and not described) and all handshakes are this design's.
//
// Interface: hp_en is the request to power the high-power section; hp_cmd,
// tx_sample and tx_time are stable while it is high. hp_done, hp_rx_ok and
// sfd are asynchronous and synchronised here; rx_time is read only after
// hp_done has been seen, when it is stable.
module node_supervisor
  import wsn_pkg::*;
#(
  parameter int unsigned PERIOD_TICKS = 3277,     // about 100 ms at 32.768 kHz
  parameter int unsigned FRAME_LOG2   = 12,       // 4096 ticks = 125 ms frame
  parameter int unsigned SLOT_OFFSET  = 1024,
  parameter int unsigned WAKE_LEAD    = 64,
  parameter int unsigned TX_ABORT     = 256,
  parameter int unsigned RX_WINDOW    = 64,
  parameter int unsigned SYNC_TICKS   = 1966080   // 60 s at 32.768 kHz
) (
  input  logic        clk,
  input  logic        rst_n,
  // sensor_event_unit
  output logic        sample_start,
  input  logic        step_done,
  input  logic        step_event,
  input  logic        dout,
  input  logic        dout_valid,
  // high-power section
  output logic        hp_en,
  output hp_cmd_e     hp_cmd,
  output logic        slot_go,
  output logic [31:0] tx_time,
  output logic [15:0] tx_sample,
  input  logic        hp_done,
  input  logic        hp_rx_ok,
  input  logic [31:0] rx_time,
  input  logic        sfd,
  // status
  output logic [31:0] local_time,
  output logic        synced
);

  typedef enum logic [1:0] {H_IDLE, H_TX, H_RX, H_OFF} hp_state_e;

  localparam logic [FRAME_LOG2-1:0] TX_WAKE_PHASE = FRAME_LOG2'(SLOT_OFFSET - WAKE_LEAD);
  localparam logic [FRAME_LOG2-1:0] RX_WAKE_PHASE = FRAME_LOG2'((1 << FRAME_LOG2) - WAKE_LEAD);

  hp_state_e   hstate;
  logic [31:0] period_cnt;
  logic [31:0] sync_cnt;
  logic [31:0] hp_cnt;
  logic [31:0] step_time;
  logic [15:0] shreg;
  logic [31:0] pend_time, sfd_time;
  logic [15:0] pend_sample;
  logic        pending, sync_due, sfd_seen, sfd_q;
  logic        done_s, rx_ok_s, sfd_s;
  logic [FRAME_LOG2-1:0] phase;

  assign phase = local_time[FRAME_LOG2-1:0];

  sync_2ff u_sync_done (.clk, .rst_n, .d(hp_done),  .q(done_s));
  sync_2ff u_sync_rxok (.clk, .rst_n, .d(hp_rx_ok), .q(rx_ok_s));
  sync_2ff u_sync_sfd  (.clk, .rst_n, .d(sfd),      .q(sfd_s));

  // sampling period and sample collection
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_cnt   <= '0;
      sample_start <= 1'b0;
      step_time    <= '0;
      shreg        <= '0;
    end else begin
      sample_start <= 1'b0;
      if (period_cnt == 32'(PERIOD_TICKS - 1)) begin
        period_cnt   <= '0;
        sample_start <= 1'b1;
        step_time    <= local_time;
      end else begin
        period_cnt <= period_cnt + 32'd1;
      end
      if (dout_valid) shreg <= {dout, shreg[15:1]};
    end
  end

  // reference clock, pending event, high-power section control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      local_time  <= '0;
      hstate      <= H_IDLE;
      hp_en       <= 1'b0;
      hp_cmd      <= HP_TX;
      slot_go     <= 1'b0;
      tx_time     <= '0;
      tx_sample   <= '0;
      pend_time   <= '0;
      pend_sample <= '0;
      pending     <= 1'b0;
      sync_cnt    <= '0;
      sync_due    <= 1'b1;     // synchronise once right after reset
      synced      <= 1'b0;
      hp_cnt      <= '0;
      sfd_time    <= '0;
      sfd_seen    <= 1'b0;
      sfd_q       <= 1'b0;
    end else begin
      local_time <= local_time + 32'd1;
      sfd_q      <= sfd_s;

      if (sync_cnt == 32'(SYNC_TICKS - 1)) begin
        sync_cnt <= '0;
        sync_due <= 1'b1;
      end else begin
        sync_cnt <= sync_cnt + 32'd1;
      end

      if (step_done && step_event) begin
        pending     <= 1'b1;
        pend_sample <= shreg;
        pend_time   <= step_time;
      end

      unique case (hstate)
        H_IDLE: begin
          hp_cnt <= '0;
          if (pending && phase == TX_WAKE_PHASE) begin
            hp_en     <= 1'b1;
            hp_cmd    <= HP_TX;
            tx_sample <= pend_sample;
            tx_time   <= pend_time;
            if (!(step_done && step_event)) pending <= 1'b0;
            hstate    <= H_TX;
          end else if (sync_due && phase == RX_WAKE_PHASE) begin
            hp_en    <= 1'b1;
            hp_cmd   <= HP_RX;
            sfd_seen <= 1'b0;
            hstate   <= H_RX;
          end
        end
        H_TX: begin
          hp_cnt <= hp_cnt + 32'd1;
          if (phase == FRAME_LOG2'(SLOT_OFFSET)) slot_go <= 1'b1;
          if (done_s || hp_cnt == 32'(TX_ABORT)) begin
            hp_en   <= 1'b0;
            slot_go <= 1'b0;
            hstate  <= H_OFF;
          end
        end
        H_RX: begin
          hp_cnt <= hp_cnt + 32'd1;
          if (sfd_s && !sfd_q && !sfd_seen) begin
            sfd_seen <= 1'b1;
            sfd_time <= local_time;
          end
          if (done_s) begin
            if (rx_ok_s && sfd_seen) begin
              local_time <= local_time + 32'd1 - sfd_time + rx_time;
              synced     <= 1'b1;
              sync_due   <= 1'b0;
            end
            hp_en  <= 1'b0;
            hstate <= H_OFF;
          end else if (hp_cnt == 32'(WAKE_LEAD + RX_WINDOW) && !sfd_seen) begin
            hp_en  <= 1'b0;
            hstate <= H_OFF;
          end
        end
        H_OFF: if (!done_s) hstate <= H_IDLE;   // wait for the section to reset
        default: hstate <= H_IDLE;
      endcase
    end
  end

  a_stable_tx: assert property (@(posedge clk) disable iff (!rst_n)
    hp_en && $past(hp_en) |-> $stable(tx_sample) && $stable(hp_cmd));

endmodule
