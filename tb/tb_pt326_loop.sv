// tb_pt326_loop: closed-loop workload in the style of a load-disturbance
// rejection run on a PT 326 thermal process trainer. The node runs at its
// default sampling, TDMA and filter settings; only the fast clock is 2 MHz (so
// the radio power-up waits are scaled to the same microseconds) to keep the
// simulation short. The testbench models:
//   * the thermal process: dT/dt = (25 + g*u - T) / 2 s, T in deg C, heater
//     power u in %, gain g = 0.5 deg C/% that drops to 0.3 when the blower
//     speed steps up at 10 s and returns to 0.5 when it steps back at 60 s
//     (the unmeasured load disturbance);
//   * the sensor: ADC code = 40 * T (0.025 deg C per LSB) plus noise of
//     +-4 LSB, read by the node through the ADC model;
//   * the master: it answers the node's synchronisation window and runs an
//     event-based PI controller (Kp = 4 %/deg C, Ki = 2 %/(deg C s), set point
//     42 deg C) only when a frame arrives, using the frame's temperature and
//     the time between frame timestamps.
// The send-on-delta threshold is 8 LSB (0.2 deg C). Checked over 100 s: each
// disturbance step moves the temperature by more than 0.5 deg C, the loop
// brings it back within 0.4 deg C of the set point, far fewer frames are sent
// than samples are taken, frame timestamps rise, and every frame leaves in
// the node's slot.
module tb_pt326_loop;
  import wsn_pkg::*;
  localparam real SETPOINT = 42.0;
  localparam int unsigned RUN_S = 100;

  logic clk_slow = 0, clk_fast = 0, rst_n = 0;
  logic [7:0] node_id = 8'h01;
  logic thr_load = 0;
  logic [15:0] threshold = 16'd8;
  logic adc_cs_n, adc_sclk, adc_mosi, adc_miso;
  logic [7:0] adc_command;
  logic radio_vreg_en, radio_rst_n, radio_cs_n, radio_sclk, radio_mosi, radio_miso;
  logic radio_stxon, radio_sfd;
  logic [31:0] local_time;
  logic synced, hp_awake, sample_event, sample_dx_neg;
  logic [11:0] adc_value = '0;
  int unsigned conversions;
  int checks = 0, failures = 0;

  always #15259 clk_slow = ~clk_slow;   // 32.768 kHz
  always #250   clk_fast = ~clk_fast;   // 2 MHz

  wsn_node_top #(.T_VREG(200), .T_OSC(600)) dut (.*);

  adc_model #(.BITS(12), .LEAD(3)) adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .mosi(adc_mosi),
    .value(adc_value), .miso(adc_miso), .conversions(conversions), .command(adc_command));

  cc2520_model #(.BYTE_CLKS(64)) radio (.clk(clk_fast), .vreg_en(radio_vreg_en),
    .resetn(radio_rst_n), .cs_n(radio_cs_n), .sclk(radio_sclk), .mosi(radio_mosi),
    .miso(radio_miso), .stxon(radio_stxon), .sfd(radio_sfd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat ((RUN_S + 2) * 32768) @(posedge clk_slow);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- process and sensor ----------------
  real temp = 42.0, u = 34.0, gain = 0.5;
  int  tick = 0;
  localparam real DT = 1.0 / 32768.0;
  always @(posedge clk_slow) begin
    tick <= tick + 1;
    if (tick == 10 * 32768) gain = 0.3;                // blower speed up
    if (tick == 60 * 32768) gain = 0.5;                // blower speed back
    temp = temp + DT * (25.0 + gain * u - temp) / 2.0;
    adc_value <= 12'($rtoi(temp * 40.0) + int'($urandom % 9) - 4);
  end

  // ---------------- master ----------------
  int master_time = 900000;
  always @(posedge clk_slow) master_time <= master_time + 1;
  logic [7:0] frame [];
  initial frame = new [5];
  always @(posedge radio.rx_on) begin
    repeat (20) @(posedge clk_fast);
    frame[0] = 8'(RX_PAYLOAD + FCS_BYTES);
    {frame[1], frame[2], frame[3], frame[4]} = 32'(master_time);
    radio.deliver(frame, 5);
  end

  int n_frames = 0, last_frames = 0;
  real integ = 34.0, last_ts = -1.0, tmin = 100.0, tmax = 0.0, t_mid = 0.0, u_mid = 0.0;
  always @(negedge radio_sfd) if (radio.frames_sent != last_frames) begin
    real y, e, ts;
    last_frames = radio.frames_sent;
    n_frames++;
    ts = real'({radio.sent[2], radio.sent[3], radio.sent[4], radio.sent[5]}) / 32768.0;
    y  = real'({radio.sent[6], radio.sent[7]}) / 40.0;
    e  = SETPOINT - y;
    if (last_ts >= 0.0) begin
      check(ts > last_ts, "timestamps rise");
      integ = integ + 2.0 * e * (ts - last_ts);
    end
    last_ts = ts;
    u = 4.0 * e + integ;
    if (u < 0.0) u = 0.0;
    if (u > 100.0) u = 100.0;
  end

  always @(posedge radio_stxon)
    check(local_time[11:0] >= 12'd1024 && local_time[11:0] <= 12'd1027, "frame in the node's slot");

  always @(posedge clk_slow) begin
    if (tick > 10 * 32768 && tick < 60 * 32768 && temp < tmin) tmin = temp;
    if (tick > 60 * 32768 && temp > tmax) tmax = temp;
    if (tick == 59 * 32768) begin t_mid = temp; u_mid = u; end
  end

  initial begin
    repeat (3) @(posedge clk_slow);
    rst_n = 1;
    @(posedge clk_slow); thr_load <= 1; @(posedge clk_slow); thr_load <= 0;
    for (int s = 1; s <= RUN_S; s++) begin
      repeat (32768) @(posedge clk_slow);
      if (s % 5 == 0) $display("t=%0d s  T=%0.2f C  u=%0.1f %%  frames=%0d samples=%0d", s, temp, u, n_frames, conversions);
    end
    check(synced, "clock synchronised to the master");
    check(SETPOINT - tmin > 0.5, $sformatf("first step visible: minimum %0.2f C", tmin));
    check(tmax - SETPOINT > 0.5, $sformatf("second step visible: maximum %0.2f C", tmax));
    check(t_mid > SETPOINT - 0.4 && t_mid < SETPOINT + 0.4, $sformatf("at set point before 60 s: %0.2f C", t_mid));
    check(u_mid > 45.0, $sformatf("controller compensated the first step: u = %0.1f %%", u_mid));
    check(temp > SETPOINT - 0.4 && temp < SETPOINT + 0.4, $sformatf("back at set point: %0.2f C", temp));
    check(u < 45.0, $sformatf("controller compensated the second step: u = %0.1f %%", u));
    check(n_frames > 5, "frames sent");
    check(n_frames * 3 < int'(conversions), $sformatf("send on delta: %0d frames for %0d samples", n_frames, conversions));
    check(conversions >= RUN_S * 10 - 2, "sampling at 100 ms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
