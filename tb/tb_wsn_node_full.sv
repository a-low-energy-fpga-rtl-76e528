// tb_wsn_node_full: one complete operation of the sensor node with every
// parameter at its default: 32.768 kHz slow clock, 8 MHz fast clock, 100 ms
// sampling period, 4096-tick TDMA frame with the node's slot at phase 1024,
// synchronisation right after reset. The master answers the first receive
// window; then the ADC value steps so that the first sample fires an event,
// and the testbench waits until the frame has been sent in the slot. Checked:
// the clock correction, the frame's contents against the filter's first
// output (x = u), the slot timing, and that the radio is powered down again.
module tb_wsn_node_full;
  import wsn_pkg::*;
  logic clk_slow = 0, clk_fast = 0, rst_n = 0;
  logic [7:0] node_id = 8'h07;
  logic thr_load = 0;
  logic [15:0] threshold = 16'd50;
  logic adc_cs_n, adc_sclk, adc_mosi, adc_miso;
  logic [7:0] adc_command;
  logic radio_vreg_en, radio_rst_n, radio_cs_n, radio_sclk, radio_mosi, radio_miso;
  logic radio_stxon, radio_sfd;
  logic [31:0] local_time;
  logic synced, hp_awake, sample_event, sample_dx_neg;
  logic [11:0] adc_value = 12'd2345;
  int unsigned conversions;
  int checks = 0, failures = 0;
  int master_time = 123456;

  always #15259 clk_slow = ~clk_slow;
  always #62    clk_fast = ~clk_fast;
  always @(posedge clk_slow) master_time <= master_time + 1;

  wsn_node_top dut (.*);

  adc_model #(.BITS(12), .LEAD(3)) adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .mosi(adc_mosi),
    .value(adc_value), .miso(adc_miso), .conversions(conversions), .command(adc_command));

  cc2520_model radio (.clk(clk_fast), .vreg_en(radio_vreg_en), .resetn(radio_rst_n),
    .cs_n(radio_cs_n), .sclk(radio_sclk), .mosi(radio_mosi), .miso(radio_miso),
    .stxon(radio_stxon), .sfd(radio_sfd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (12000) @(posedge clk_slow);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] frame [];
  initial frame = new [5];
  always @(posedge radio.rx_on) begin
    repeat (100) @(posedge clk_fast);
    frame[0] = 8'(RX_PAYLOAD + FCS_BYTES);
    {frame[1], frame[2], frame[3], frame[4]} = 32'(master_time);
    radio.deliver(frame, 5);
  end

  int stx_phase = -1;
  always @(posedge radio_stxon) stx_phase = int'(local_time[11:0]);

  initial begin
    repeat (3) @(posedge clk_slow);
    rst_n = 1;
    @(posedge clk_slow); thr_load <= 1; @(posedge clk_slow); thr_load <= 0;
    wait (synced);
    repeat (3) @(posedge clk_slow);
    check(local_time >= 32'(master_time) - 4 && local_time <= 32'(master_time),
          $sformatf("clock after sync %0d master %0d", local_time, master_time));
    wait (radio.frames_sent == 1);
    check(stx_phase >= 1024 && stx_phase <= 1027, $sformatf("send in slot, phase %0d", stx_phase));
    check(radio.sent[1] == node_id, "node id");
    check({radio.sent[6], radio.sent[7]} == 16'd2345, "sample of the first step");
    wait (!hp_awake);
    repeat (5) @(posedge clk_slow);
    check(radio_vreg_en == 0, "radio powered down after the job");
    check(conversions >= 1, "ADC read");
    check(adc_command == 8'h06, "ADC command bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
