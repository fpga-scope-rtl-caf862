// tb_workloads: the input patterns an oscilloscope of this kind is tested
// with (square, sawtooth and sine waves) at 50 Hz, 250 Hz and 1 kHz, the
// highest input the 10 kHz sample rate supports with ten samples per period.
// Each runs through the whole design (AD574 model, shortened microsecond of
// 2 clocks) for a full capture; the measured frequency must be exact and the
// peak-to-peak voltage within the range the sampling allows.
module tb_workloads;
  import scope_pkg::*;
  localparam int CPU = 2;
  logic clk = 0, rst = 1;
  logic [3:0] btn_n = 4'hF;
  logic [11:0] adc_data, vin;
  logic adc_sts, ce, cs_n, rc_n, a0, b12;
  logic [7:0] r, g, b;
  logic hs_n, vs_n, blank;
  logic [1:0] editing;
  int conv;
  int checks = 0, failures = 0;
  longint cyc = 0;

  fpga_scope #(.CYCLES_PER_US(CPU), .DEBOUNCE_CYCLES(20)) dut (
    .clk, .rst, .btn_n, .adc_data, .adc_sts, .adc_ce(ce), .adc_cs_n(cs_n),
    .adc_rc_n(rc_n), .adc_a0(a0), .adc_12_8(b12), .vga_r(r), .vga_g(g), .vga_b(b),
    .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_blank(blank), .editing);

  ad574_model #(.CONV_CYCLES(50)) u_adc (
    .clk, .ce, .cs_n, .rc_n, .a0, .b12_8(b12), .vin, .sts(adc_sts), .data(adc_data),
    .conversions(conv));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  int shape = 0;          // 0 square, 1 sawtooth, 2 sine
  int period_us = 4000;
  always_comb begin
    automatic int ph = int'((cyc / CPU) % longint'(period_us));
    automatic real f = real'(ph) / real'(period_us);
    case (shape)
      0:       vin = (f < 0.5) ? 12'd3000 : 12'd1000;
      1:       vin = 12'(1000 + int'(2000.0 * f));
      default: vin = 12'(2000 + int'($floor(1000.0 * $sin(2.0 * 3.14159265358979 * f) + 0.5)));
    endcase
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [3] = '{"square", "sawtooth", "sine"};
    int freqs [3] = '{50, 250, 1000};
    repeat (5) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < 3; k++) begin
        shape = s;
        period_us = 1000000 / freqs[k];
        // a capture that starts after the change, then its statistics
        @(posedge clk iff dut.rearm);
        @(negedge dut.trig_valid);
        @(posedge dut.trig_valid);
        @(posedge clk iff dut.stats_stb);
        #1;
        // 2000 codes = 4882 mV; sampling can miss the very top of the sine and saw,
        // and a 1 kHz saw sampled ten times per period averages 1900 (-361 mV)
        check(dut.freq_hz == 20'(freqs[k]),
              $sformatf("%s %0d Hz: measured %0d Hz", names[s], freqs[k], dut.freq_hz));
        check(dut.vpp_mv >= 4150 && dut.vpp_mv <= 4884,
              $sformatf("%s %0d Hz: peak-to-peak %0d mV", names[s], freqs[k], dut.vpp_mv));
        check(dut.avg_mv >= -400 && dut.avg_mv <= 0,
              $sformatf("%s %0d Hz: average %0d mV", names[s], freqs[k], dut.avg_mv));
        $display("%s %0d Hz: f=%0d Hz vpp=%0d mV avg=%0d mV", names[s], freqs[k], dut.freq_hz, dut.vpp_mv, dut.avg_mv);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
