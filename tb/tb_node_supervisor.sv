// tb_node_supervisor: drives the supervisor with short timing (50-tick period,
// 256-tick frame, slot at 128, wake lead 8) and plays both the sensor unit and
// the transceiver manager by hand. Checked: the sampling period; the first
// synchronisation window (wake at frame phase 248 with an RX job) and the clock
// correction computed from the SFD instant and the master time; a receive
// window that times out; an event's sample and timestamp handed to a TX job
// woken 8 ticks before the slot, slot_go at the slot, sleep after done; a
// transmit abort when done never comes; and a newer event replacing a pending
// one.
module tb_node_supervisor;
  import wsn_pkg::*;
  localparam int unsigned PERIOD = 50, FLOG2 = 8, SLOT = 128, LEAD = 8, ABORT = 40, RXW = 16;
  logic clk = 0, rst_n = 0;
  logic sample_start, step_done = 0, step_event = 0, dout = 0, dout_valid = 0;
  logic hp_en, slot_go, hp_done = 0, hp_rx_ok = 0, sfd = 0, synced;
  hp_cmd_e hp_cmd;
  logic [31:0] tx_time, rx_time = '0, local_time;
  logic [15:0] tx_sample;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  node_supervisor #(.PERIOD_TICKS(PERIOD), .FRAME_LOG2(FLOG2), .SLOT_OFFSET(SLOT),
    .WAKE_LEAD(LEAD), .TX_ABORT(ABORT), .RX_WINDOW(RXW), .SYNC_TICKS(1200)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sampling period and the time stamp of each step
  int tick = 0, last_start = -1, nstart = 0;
  always @(posedge clk) begin
    tick <= tick + 1;
    if (sample_start && rst_n) begin
      if (last_start >= 0) check(tick - last_start == PERIOD, "sampling period");
      last_start <= tick;
      nstart++;
    end
  end

  task automatic sensor_event(input logic [15:0] v);
    for (int i = 0; i < 16; i++) begin
      dout <= v[i]; dout_valid <= 1; @(posedge clk);
    end
    dout_valid <= 0; step_done <= 1; step_event <= 1; @(posedge clk);
    step_done <= 0; step_event <= 0;
  endtask

  int t_sfd, n;
  logic [31:0] stamp;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- first synchronisation: wake at phase 256-8 ----
    wait (hp_en);
    check(hp_cmd == HP_RX && local_time[FLOG2-1:0] == 8'(256 - LEAD + 1), "RX wake phase");
    repeat (4) @(posedge clk);
    sfd <= 1; t_sfd = tick;
    repeat (3) @(posedge clk);
    sfd <= 0;
    rx_time <= 32'd50000;
    hp_rx_ok <= 1; hp_done <= 1;
    wait (!hp_en);
    @(posedge clk); #1;
    // local time at the SFD detection (2 synchroniser clocks + edge) reads 50000
    check(local_time == 32'd50000 + 32'(tick - t_sfd) - 32'd2 ||
          local_time == 32'd50000 + 32'(tick - t_sfd) - 32'd3,
          $sformatf("corrected clock %0d (tick %0d sfd %0d)", local_time, tick, t_sfd));
    check(synced, "synced");
    hp_done <= 0; hp_rx_ok <= 0;
    // ---- event: sample handed to a TX job in the slot ----
    wait (sample_start);
    stamp = local_time - 32'd1;   // the step is stamped with the clock before the start edge
    @(posedge clk);
    sensor_event(16'hBEEF);
    wait (hp_en);
    check(hp_cmd == HP_TX, "TX job");
    check(local_time[FLOG2-1:0] == 8'(SLOT - LEAD + 1), "TX wake phase");
    check(tx_sample == 16'hBEEF && tx_time == stamp, $sformatf("sample and timestamp handed over %h %0d %0d", tx_sample, tx_time, stamp));
    check(!slot_go, "no slot_go before the slot");
    wait (slot_go);
    check(local_time[FLOG2-1:0] == 8'(SLOT + 1), "slot_go at the slot");
    repeat (5) @(posedge clk);
    hp_done <= 1;
    n = 0;
    while (hp_en) begin @(posedge clk); n++; end
    check(n >= 2 && n <= 4, "sleep after done");
    hp_done <= 0;
    // ---- two events before the slot: the newer one is sent; no done: abort ----
    wait (sample_start); @(posedge clk); sensor_event(16'h1111);
    wait (sample_start); stamp = local_time - 32'd1; @(posedge clk); sensor_event(16'h2222);
    wait (hp_en);
    check(tx_sample == 16'h2222 && tx_time == stamp, "newer event replaces pending one");
    n = 0;
    while (hp_en) begin @(posedge clk); n++; end
    check(n == ABORT + 2, $sformatf("transmit abort after %0d", n));
    // ---- receive window that times out (next periodic synchronisation) ----
    wait (hp_en && hp_cmd == HP_RX);
    n = 0;
    while (hp_en) begin @(posedge clk); n++; end
    check(n == LEAD + RXW + 2, $sformatf("receive window %0d", n));
    check(nstart > 5, "sampling running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
