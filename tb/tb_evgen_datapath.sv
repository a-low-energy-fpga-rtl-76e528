// tb_evgen_datapath: exercises the bit-serial datapath directly. Values are
// loaded into R0 through the serial input, copied into R1/R2 with 16-clock
// passes, R3 is loaded in parallel, and random additions, subtractions,
// negations, comparisons and right shifts are run and read back through dout
// (a 16-clock rotation), against integer arithmetic modulo 2^16. The sign seen
// on `sum` in the last clock of a pass is checked too.
module tb_evgen_datapath;
  import wsn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] shift_en = '0;
  a_sel_e a_sel = A_ZERO;
  logic [1:0] b_sel = '0;
  logic b_inv = 0;
  cin_sel_e cin_sel = CIN_0;
  wb_sel_e wb_sel = WB_SUM;
  dst_e dst = DST_NONE;
  logic din = 0, thr_load = 0;
  logic [15:0] thr_value = '0;
  logic sum, cout, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  evgen_datapath dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_r0(input logic [15:0] v);
    for (int i = 0; i < 16; i++) begin
      shift_en <= 4'b0001; wb_sel <= WB_DIN; dst <= DST_R0; din <= v[i];
      @(posedge clk);
    end
    shift_en <= '0;
  endtask

  // one 16-clock pass; returns the sign bit seen on sum in the last clock
  task automatic pass(input a_sel_e a, input logic [1:0] b, input logic inv,
                      input logic c0, input dst_e d, output logic sign);
    for (int i = 0; i < 16; i++) begin
      shift_en <= 4'b1111; a_sel <= a; b_sel <= b; b_inv <= inv;
      cin_sel <= (i == 0) ? (c0 ? CIN_1 : CIN_0) : CIN_Q; wb_sel <= WB_SUM; dst <= d;
      #1;
      if (i == 15) sign = sum;
      @(posedge clk);
    end
    shift_en <= '0;
  endtask

  task automatic read_r0(output logic [15:0] v);
    for (int i = 0; i < 16; i++) begin
      shift_en <= 4'b1111; dst <= DST_NONE;
      #1 v[i] = dout;
      @(posedge clk);
    end
    shift_en <= '0;
  endtask

  task automatic shr_r0();
    shift_en <= 4'b0001; wb_sel <= WB_ZERO; dst <= DST_R0;
    @(posedge clk);
    shift_en <= '0;
  endtask

  logic [15:0] a, b, c, th, got, e;
  logic s;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int it = 0; it < 60; it++) begin
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); th = 16'($urandom);
      thr_value <= th; thr_load <= 1; @(posedge clk); thr_load <= 0;
      load_r0(a); pass(A_ZERO, 2'd0, 0, 0, DST_R1, s);        // R1 = a
      load_r0(b); pass(A_ZERO, 2'd0, 0, 0, DST_R2, s);        // R2 = b
      load_r0(c);
      read_r0(got); check(got == c, "serial load");
      pass(A_R0, 2'd1, 0, 0, DST_R0, s); e = c + a;           // R0 = c + a
      check(s == e[15], "sign of add");
      read_r0(got); check(got == e, $sformatf("add %h+%h=%h got %h", c, a, e, got));
      pass(A_R0, 2'd2, 1, 1, DST_R0, s); e = e - b;           // R0 -= b
      check(s == e[15], "sign of subtract");
      read_r0(got); check(got == e, "subtract");
      pass(A_ZERO, 2'd0, 1, 1, DST_R0, s); e = -e;            // R0 = -R0
      read_r0(got); check(got == e, "negate");
      pass(A_R0, 2'd3, 1, 0, DST_NONE, s);                    // R0 + ~R3
      got = e + ~th;
      check(s == got[15], "compare sign");
      read_r0(got); check(got == e, "compare leaves R0");
      shr_r0(); e = e >> 1;
      read_r0(got); check(got == e, "logical right shift");
      read_r0(got); check(got == e, "rotation keeps value");
      // R1, R2 and R3 unchanged by all of this
      pass(A_ZERO, 2'd1, 0, 0, DST_R0, s); read_r0(got); check(got == a, "R1 kept");
      pass(A_ZERO, 2'd2, 0, 0, DST_R0, s); read_r0(got); check(got == b, "R2 kept");
      pass(A_ZERO, 2'd3, 0, 0, DST_R0, s); read_r0(got); check(got == th, "R3 kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
