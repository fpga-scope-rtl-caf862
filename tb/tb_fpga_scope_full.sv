// tb_fpga_scope_full: one complete measurement with every parameter at its
// default (65 clocks per microsecond, 10 ms debounce). A 250 Hz triangle
// between codes 1000 and 3000 is captured at 10 kHz (2992 samples, 0.3 s),
// measured, drawn and shown. Checks the capture time, the trigger, the
// statistics, the swap and the grid and trace on the VGA outputs.
module tb_fpga_scope_full;
  import scope_pkg::*;
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

  fpga_scope dut (
    .clk, .rst, .btn_n, .adc_data, .adc_sts, .adc_ce(ce), .adc_cs_n(cs_n),
    .adc_rc_n(rc_n), .adc_a0(a0), .adc_12_8(b12), .vga_r(r), .vga_g(g), .vga_b(b),
    .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_blank(blank), .editing);

  // AD574 conversion time 25 us at 65 clocks per microsecond
  ad574_model #(.CONV_CYCLES(25 * 65)) u_adc (
    .clk, .ce, .cs_n, .rc_n, .a0, .b12_8(b12), .vin, .sts(adc_sts), .data(adc_data),
    .conversions(conv));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always_comb begin
    automatic int ph = int'((cyc / 65) % 4000);
    vin = 12'((ph < 2000) ? 1000 + ph : 5000 - ph);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t_full = 0;
  bit trig_seen = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.cap_full && t_full == 0) t_full = cyc;
    if (dut.trig_valid && dut.u_math.trig_found) trig_seen = 1;
  end

  initial begin
    int lit, trace;
    repeat (5) @(posedge clk);
    rst <= 0;
    // the first sample is taken at once, the last after 2991 periods plus one conversion
    // statistics are published in the first vertical blank after the capture
    @(posedge clk iff dut.stats_stb);
    #1;
    check(dut.freq_hz == 20'd250, $sformatf("frequency %0d Hz", dut.freq_hz));
    check(dut.vpp_mv >= 4800 && dut.vpp_mv <= 4884, $sformatf("vpp %0d mV", dut.vpp_mv));
    check(dut.avg_mv >= -130 && dut.avg_mv <= -100, $sformatf("avg %0d mV", dut.avg_mv));
    check(trig_seen, "trigger found");
    // the image is drawn and shown from the next frame after it is finished
    @(posedge clk iff dut.swapped);
    check(cyc - t_full >= 748 * 702 && cyc - t_full <= 748 * 702 + 2 * 1344 * 806,
          $sformatf("image shown %0d cycles after the capture", cyc - t_full));
    check(t_full >= 2991 * 6500 && t_full <= 2992 * 6500 + 2000,
          $sformatf("capture complete after %0d cycles", t_full));
    check(conv >= 2992, $sformatf("%0d conversions", conv));
    // watch the next frame: row 70 is a grid line; column 374 crosses the trigger level
    @(negedge vs_n);
    @(posedge vs_n);
    lit = 0;
    trace = 0;
    for (int v = 0, h = 0; v < 768; ) begin
      @(negedge clk);
      if (!blank) begin
        if (v == 70 && h < 748 && g == 8'hFF && r == 8'h00) lit++;
        if (h == 374 && v >= 320 && v < 352 && g == 8'hFF && r == 8'h00) trace++;
        h++;
        if (h == 1024) begin h = 0; v++; end
      end
    end
    check(lit == 748, $sformatf("grid row lit in %0d columns", lit));
    check(trace > 0, "trace crosses the trigger level at the centre");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
