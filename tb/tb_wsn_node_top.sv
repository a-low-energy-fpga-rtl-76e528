// tb_wsn_node_top: end-to-end test of the sensor node with shortened timing
// (sampling period 256 ticks, 1024-tick TDMA frame, synchronisation every
// 8192 ticks). A serial ADC model plays a temperature-like signal (flat,
// steps up and down, noise) and a CC2520 model stands for the radio; the
// testbench plays the network master, answering each receive window with a
// synchronisation frame that carries its own clock.
//
// Checked: every conversion against a reference model of the filter and the
// send-on-delta rule (event flags, sign of the change); every transmitted frame
// (length, node id, a sample that is the filtered value of an event, and its
// timestamp); that the send-packet line fires at the node's slot; that the
// local clock agrees with the master within a few ticks after synchronisation;
// that the fast clock is stopped while the high-power section sleeps.
// Mechanisms counted, each required at least once: events, steps without an
// event, negative changes, a pending sample replaced by a newer one, frames
// sent, a lost transmission ended by the supervisor's abort, successful
// synchronisations, a missed synchronisation frame, and sleep/wake cycles.
module tb_wsn_node_top;
  import wsn_pkg::*;
  localparam int unsigned PERIOD = 256, FLOG2 = 10, SLOT = 512, LEAD = 16;
  localparam int unsigned SYNC = 8192, RUN_TICKS = 40000;
  localparam int unsigned ABITS = 12, ALEAD = 3, ASH = 3;

  logic clk_slow = 0, clk_fast = 0, rst_n = 0;
  logic [7:0] node_id = 8'h2C;
  logic thr_load = 0;
  logic [15:0] threshold = 16'd60;
  logic adc_cs_n, adc_sclk, adc_mosi, adc_miso;
  logic [7:0] adc_command;
  logic radio_vreg_en, radio_rst_n, radio_cs_n, radio_sclk, radio_mosi, radio_miso;
  logic radio_stxon, radio_sfd;
  logic [31:0] local_time;
  logic synced, hp_awake, sample_event, sample_dx_neg;
  logic [ABITS-1:0] adc_value = '0;
  int unsigned conversions;
  int checks = 0, failures = 0;

  always #15259 clk_slow = ~clk_slow;   // 32.768 kHz
  always #62    clk_fast = ~clk_fast;   // about 8 MHz

  wsn_node_top #(
    .ADC_BITS(ABITS), .ADC_LEAD(ALEAD), .ALPHA_SHIFT(ASH), .PERIOD_TICKS(PERIOD),
    .FRAME_LOG2(FLOG2), .SLOT_OFFSET(SLOT), .WAKE_LEAD(LEAD), .TX_ABORT(64),
    .RX_WINDOW(32), .SYNC_TICKS(SYNC), .T_VREG(20), .T_OSC(30)
  ) dut (.*);

  adc_model #(.BITS(ABITS), .LEAD(ALEAD)) adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .mosi(adc_mosi),
    .value(adc_value), .miso(adc_miso), .conversions(conversions), .command(adc_command));

  cc2520_model radio (.clk(clk_fast), .vreg_en(radio_vreg_en), .resetn(radio_rst_n),
    .cs_n(radio_cs_n), .sclk(radio_sclk), .mosi(radio_mosi), .miso(radio_miso),
    .stxon(radio_stxon), .sfd(radio_sfd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (RUN_TICKS + 2000) @(posedge clk_slow);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // master clock: slow ticks plus an offset the node does not know
  int master_time = 0;
  always @(posedge clk_slow) master_time <= (master_time == 0) ? 70000 : master_time + 1;

  // ---------------- reference model of the low-power section ----------------
  int tick = 0;
  always @(posedge clk_slow) tick <= tick + 1;
  int x = 0, xle = 0, ref_first = 1, n_ev = 0, n_noev = 0, n_neg = 0, n_replaced = 0;
  int ev_since_tx = 0;
  bit exp_ev, exp_neg;
  int ev_x [int];           // timestamp of the step -> filtered value
  int step_ts;

  always @(negedge adc_cs_n) step_ts = int'(local_time) - 1;

  always @(posedge adc_cs_n) if (rst_n) begin
    int u, t, d;
    u = int'(adc.held);
    if (ref_first) x = u;
    else begin
      t = u;
      for (int i = 0; i < ASH; i++) t = (t + x) >> 1;
      x = t;
    end
    ref_first = 0;
    d = x - xle;
    exp_neg = d < 0;
    exp_ev  = (d < 0 ? -d : d) > int'(threshold);
    if (exp_ev) begin xle = x; ev_x[step_ts] = x; end
  end

  // compare the node's step results
  always @(posedge clk_slow) if (dut.u_sensor.done) begin
    check(sample_event == exp_ev, $sformatf("event flag at tick %0d", tick));
    check(dut.u_sensor.dx_negative == exp_neg, "sign of change");
    if (exp_ev) begin
      n_ev++;
      if (ev_since_tx > 0) n_replaced++;
      ev_since_tx++;
    end else n_noev++;
    if (sample_dx_neg) n_neg++;
  end

  // ---------------- radio side ----------------
  int n_tx = 0, n_abort = 0, n_sync = 0, n_sync_missed = 0, n_wake = 0;
  int n_frames_checked = 0, last_frames = 0;
  bit skip_next_sync = 0, mute_done = 0;

  always @(posedge radio_stxon) begin
    check(local_time[FLOG2-1:0] >= SLOT && local_time[FLOG2-1:0] <= SLOT + 3,
          $sformatf("send-packet line at frame phase %0d", local_time[FLOG2-1:0]));
    ev_since_tx = 0;
  end

  always @(negedge radio_sfd) if (radio.frames_sent != last_frames) begin
    int ts, smp;
    last_frames = radio.frames_sent;
    n_tx++;
    ts  = {radio.sent[2], radio.sent[3], radio.sent[4], radio.sent[5]};
    smp = {radio.sent[6], radio.sent[7]};
    check(radio.sent_len == 8 && radio.sent[0] == 8'(TX_PAYLOAD + FCS_BYTES), "frame length");
    check(radio.sent[1] == node_id, "node id");
    begin
      bit found = 0;
      // the step time is known to the testbench only to within a few ticks
      for (int k = ts - 2; k <= ts + 2; k++) if (ev_x.exists(k) && ev_x[k] == smp) found = 1;
      check(found, $sformatf("frame sample %0d at time %0d", smp, ts));
    end
    n_frames_checked++;
  end

  // wake/sleep and clock gating
  always @(posedge hp_awake) n_wake++;
  int gclk_asleep = 0;
  always @(posedge dut.gclk) if (!dut.hp_en_f) gclk_asleep++;

  // the master answers each receive window, except one
  logic [7:0] frame [];
  initial frame = new [5];
  always @(posedge radio.rx_on) begin
    if (skip_next_sync) begin
      skip_next_sync = 0;
      n_sync_missed++;
    end else begin
      repeat (40) @(posedge clk_fast);
      frame[0] = 8'(RX_PAYLOAD + FCS_BYTES);
      {frame[1], frame[2], frame[3], frame[4]} = 32'(master_time);
      radio.deliver(frame, 5);
    end
  end

  always @(posedge clk_slow) begin
    if (dut.u_super.hstate == 2'd2 && dut.u_super.done_s && dut.u_super.rx_ok_s) n_sync++;
    if (dut.u_super.hstate == 2'd1 && dut.u_super.hp_cnt == 64) n_abort++;
  end

  // ADC signal
  always @(posedge clk_slow) begin
    int base;
    if (tick < 6000)       base = 1500;
    else if (tick < 14000) base = 2600;
    else if (tick < 24000) base = 900;
    else                   base = 1800 + ((tick / 300) % 2) * 400;
    adc_value <= ABITS'(base + ($urandom % 41) - 20);
  end

  initial begin
    repeat (3) @(posedge clk_slow);
    rst_n = 1;
    @(posedge clk_slow); thr_load <= 1; @(posedge clk_slow); thr_load <= 0;
    // first synchronisation
    wait (synced);
    $display("synced at tick %0d", tick);
    repeat (3) @(posedge clk_slow);
    check(local_time >= 32'(master_time) - 4 && local_time <= 32'(master_time),
          $sformatf("clock after sync %0d master %0d", local_time, master_time));
    // lose one transmission and one synchronisation frame
    wait (tick > 10000);
    radio.mute_tx = 1;
    wait (tick > 17000);
    $display("tick %0d", tick);
    skip_next_sync = 1;
    wait (tick > RUN_TICKS);
    check(local_time >= 32'(master_time) - 4 && local_time <= 32'(master_time) + 4,
          $sformatf("clock at end %0d master %0d", local_time, master_time));
    check(gclk_asleep == 0, "no fast clock edges while asleep");
    check(conversions > RUN_TICKS / PERIOD - 3, "sampling period");
    $display("events=%0d no_event=%0d negative=%0d replaced=%0d frames=%0d aborts=%0d syncs=%0d missed_syncs=%0d wakes=%0d",
             n_ev, n_noev, n_neg, n_replaced, n_tx, n_abort, n_sync, n_sync_missed, n_wake);
    check(n_ev > 0, "event mechanism");
    check(n_noev > 0, "no-event steps");
    check(n_neg > 0, "negative change (absolute value path)");
    check(n_replaced > 0, "pending sample replaced");
    check(n_tx > 0 && n_frames_checked == n_tx, "frames sent");
    check(n_abort > 0, "transmit abort");
    check(n_sync > 1, "synchronisations");
    check(n_sync_missed > 0, "missed synchronisation");
    check(n_wake > n_tx, "wake/sleep cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
