// tb_adc_controller: checks the conversion-start period for several delta-t
// settings (sample period x CYCLES_PER_US cycles), the R/C# pulse width and
// the static control pins, and that an AD574 model driven by it converts.
module tb_adc_controller;
  import scope_pkg::*;
  localparam int CPU = 3;     // cycles per microsecond, reduced
  localparam int RCP = 2;
  logic clk = 0, rst = 1;
  dt_idx_t dt = DT_RESET;
  logic sample, ce, cs_n, rc_n, a0, b12;
  logic sts;
  logic [11:0] data;
  int conv;
  int checks = 0, failures = 0;

  adc_controller #(.CYCLES_PER_US(CPU), .RC_PULSE(RCP)) dut (
    .clk, .rst, .dt, .sample, .adc_ce(ce), .adc_cs_n(cs_n), .adc_rc_n(rc_n),
    .adc_a0(a0), .adc_12_8(b12));
  ad574_model #(.CONV_CYCLES(30)) u_adc (
    .clk, .ce, .cs_n, .rc_n, .a0, .b12_8(b12), .vin(12'hABC), .sts, .data,
    .conversions(conv));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected period per setting, worked out by hand
  function automatic int expected_period(int i);
    int us [8] = '{100, 100, 100, 100, 200, 500, 1000, 2000};
    return us[i] * CPU;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 8; s++) begin
      int t0, t1, lowc;
      dt <= dt_idx_t'(s);
      // wait for two conversion starts and measure
      @(posedge clk iff sample);
      @(posedge clk iff sample);
      t0 = 0;
      lowc = 0;
      do begin
        @(posedge clk);
        t0++;
        if (!rc_n) lowc++;
      end while (!sample);
      check(t0 == expected_period(s), $sformatf("dt=%0d period %0d exp %0d", s, t0, expected_period(s)));
      check(lowc == RCP, $sformatf("R/C low for %0d cycles", lowc));
      check(ce && !cs_n && !a0 && b12, "static pins");
    end
    check(conv > 10, $sformatf("model converted %0d times", conv));
    check(data == 12'hABC, "model data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
