// tb_fpga_scope: end-to-end run of the oscilloscope with an AD574 model on
// its converter pins, a shortened microsecond (2 clocks) and a short debounce.
// The analogue input is a 250 Hz triangle between codes 1000 and 3000, later
// a constant level. The test walks through: capture, trigger, statistics,
// drawing and swapping the waveform image, the picture on the VGA outputs,
// delta-t changes (slower ADC rate and horizontal stretch), a delta-V change
// with its read-out, bouncing buttons, free-running without a trigger, and
// writers held off by the write warning. Each of these mechanisms is counted
// and a mechanism that never happened counts as a failure.
module tb_fpga_scope;
  import scope_pkg::*;
  localparam int CPU = 2;          // clocks per microsecond in this test
  localparam int DEB = 20;         // debounce cycles in this test
  localparam int HT = 1344, VT = 806;
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

  fpga_scope #(.CYCLES_PER_US(CPU), .DEBOUNCE_CYCLES(DEB)) dut (
    .clk, .rst, .btn_n, .adc_data, .adc_sts, .adc_ce(ce), .adc_cs_n(cs_n),
    .adc_rc_n(rc_n), .adc_a0(a0), .adc_12_8(b12), .vga_r(r), .vga_g(g), .vga_b(b),
    .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_blank(blank), .editing);

  ad574_model #(.CONV_CYCLES(50)) u_adc (
    .clk, .ce, .cs_n, .rc_n, .a0, .b12_8(b12), .vin, .sts(adc_sts), .data(adc_data),
    .conversions(conv));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // analogue input: triangle of period 4000 us, or a constant
  bit dc_input = 0;
  always_comb begin
    automatic longint t_us = cyc / CPU;
    automatic int ph = int'(t_us % 4000);
    if (dc_input) vin = 12'd2600;
    else vin = 12'((ph < 2000) ? 1000 + ph : 5000 - ph);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_capture = 0, n_trig = 0, n_freerun = 0, n_swap = 0, n_stats = 0;
  int n_dec_held = 0, n_menu_held = 0, n_zoom_render = 0, n_slow_rate = 0;
  int n_mode_dt = 0, n_mode_dv = 0, n_dt_change = 0, n_dv_change = 0;
  logic full_q = 0;
  dt_idx_t dt_q = DT_RESET;
  dv_idx_t dv_q = DV_RESET;
  logic [1:0] ed_q = 0;
  longint cap_start = 0, cap_len = 0;
  always @(posedge clk) if (!rst) begin
    full_q <= dut.cap_full;
    if (dut.cap_full && !full_q) begin
      n_capture++;
      cap_len = cyc - cap_start;
    end
    if (!dut.cap_full && full_q) cap_start = cyc;
    if (dut.swapped) n_swap++;
    if (dut.stats_stb) n_stats++;
    if (dut.u_decimal.busy && dut.write_warning) n_dec_held++;
    if (dut.u_menu.img_busy && dut.write_warning) n_menu_held++;
    if (dut.u_scaling.st == dut.u_scaling.S_DRAW && dut.u_scaling.zoom > 1 && dut.u_scaling.x == 0 && dut.u_scaling.y == 0)
      n_zoom_render++;
    if (dut.sample_stb && dut.sample_idx == 0 && dt_sample_us(dut.dt) > 100) n_slow_rate++;
    dt_q <= dut.dt;
    dv_q <= dut.dv;
    ed_q <= editing;
    if (dut.dt != dt_q) n_dt_change++;
    if (dut.dv != dv_q) n_dv_change++;
    if (editing != ed_q && editing == 2'd1) n_mode_dt++;
    if (editing != ed_q && editing == 2'd2) n_mode_dv++;
  end

  // one capture finished: classify as triggered or free-running
  logic tv_q = 0;
  always @(posedge clk) begin
    tv_q <= dut.trig_valid;
    if (dut.trig_valid && !tv_q) begin
      if (dut.u_math.trig_found) n_trig++; else n_freerun++;
    end
  end

  // a bouncing press of one button (index 0 delta-t, 1 delta-V, 2 up, 3 down)
  task automatic press(int which);
    for (int k = 0; k < 4; k++) begin
      btn_n[which] <= 1'b0;
      repeat (3 + k) @(posedge clk);
      btn_n[which] <= 1'b1;
      repeat (2) @(posedge clk);
    end
    btn_n[which] <= 1'b0;
    repeat (DEB * 3) @(posedge clk);
    btn_n[which] <= 1'b1;
    repeat (DEB * 3) @(posedge clk);
  endtask

  task automatic wait_swap();
    @(posedge clk iff dut.swapped);
  endtask

  // grab one displayed frame into an array (after the next vsync)
  logic [1:0] frame [768][1024];   // 0 black, 1 green, 2 white, 3 yellow
  task automatic grab_frame();
    int h = 0, v = 0;
    @(negedge vs_n);
    @(posedge vs_n);
    // sample the registered outputs between clock edges
    while (v < 768) begin
      @(negedge clk);
      if (!blank) begin
        frame[v][h] = ({r, g, b} == 24'h00FF00) ? 2'd1 : ({r, g, b} == 24'hFFFFFF) ? 2'd2 :
                      ({r, g, b} == 24'hFFFF00) ? 2'd3 : 2'd0;
        h++;
        if (h == 1024) begin h = 0; v++; end
      end
    end
  endtask

  initial begin
    int lit, nwhite, nyellow, trace_rows;
    repeat (5) @(posedge clk);
    rst <= 0;
    // first capture with the triangle: 250 Hz at 100 us per sample = 40 samples
    wait_swap();
    check(cap_len >= 2991 * 100 * CPU && cap_len <= 2993 * 100 * CPU,
          $sformatf("capture took %0d cycles, expected 2992 x 200", cap_len));
    @(posedge clk iff dut.stats_stb);
    #1;
    check(dut.freq_hz == 20'd250, $sformatf("frequency %0d Hz", dut.freq_hz));
    // triangle 1000..3000: 2000 codes = 4882 mV peak-to-peak, average 2000 = -117 mV
    check(dut.vpp_mv >= 4800 && dut.vpp_mv <= 4884, $sformatf("vpp %0d mV", dut.vpp_mv));
    check(dut.avg_mv >= -130 && dut.avg_mv <= -100, $sformatf("avg %0d mV", dut.avg_mv));
    // the shown picture
    grab_frame();
    lit = 0;
    for (int x = 0; x < 748; x++) if (frame[70][x] == 2'd1) lit++;
    check(lit == 748, $sformatf("grid row 70 lit in %0d columns", lit));
    lit = 0;
    for (int y = 0; y < 700; y++) if (frame[y][50] == 2'd1) lit++;
    check(lit == 700, $sformatf("grid column 50 lit in %0d rows", lit));
    // trace at the trigger (centre column 374): rising through mid + 32
    trace_rows = 0;
    for (int y = 320; y < 352; y++) if (frame[y][374] == 2'd1) trace_rows++;
    check(trace_rows > 0, "trace passes the trigger level at the centre column");
    // triangle spans rows about 350 -/+ 1000*700/4096 = 179..521
    lit = 0;
    for (int y = 0; y < 700; y++) if (y % 70 != 0 && frame[y][373] == 2'd1) lit++;
    check(lit > 0 && lit < 40, $sformatf("one short trace segment in column 373 (%0d)", lit));
    nwhite = 0;
    nyellow = 0;
    for (int y = 0; y < 768; y++)
      for (int x = 0; x < 1024; x++) begin
        if (frame[y][x] == 2'd2) begin
          nwhite++;
          if (x < 748 || x >= 990 || y >= 700) check(0, "white outside numbers area");
        end
        if (frame[y][x] == 2'd3) begin
          nyellow++;
          if (x >= 100 || y < 712 || y >= 746) check(0, "yellow outside delta-t area");
        end
      end
    check(nwhite > 500, $sformatf("numbers drawn (%0d pixels)", nwhite));
    check(nyellow > 100, $sformatf("delta-t drawn (%0d pixels)", nyellow));
    // delta-t: select, one step up (200 us samples), check the ADC rate
    press(0);
    check(editing == 2'd1, "delta-t mode");
    press(2);
    check(dut.dt == 3'd4, $sformatf("delta-t up once despite bounce (%0d)", dut.dt));
    begin
      longint t0;
      @(posedge clk iff dut.sample_unused);
      t0 = cyc;
      @(posedge clk iff dut.sample_unused);
      check(cyc - t0 == 200 * CPU, $sformatf("sample period %0d cycles", cyc - t0));
    end
    wait_swap();
    wait_swap();
    @(posedge clk iff dut.stats_stb);
    #1 check(dut.freq_hz == 20'd250, $sformatf("frequency at 200 us/sample %0d Hz", dut.freq_hz));
    // two steps down: 10 kHz with 2x horizontal stretch
    press(3);
    press(3);
    check(dut.dt == 3'd2, "delta-t stretched setting");
    wait_swap();
    wait_swap();
    // delta-V: select and step up (larger volts per division)
    press(1);
    check(editing == 2'd2, "delta-V mode");
    press(2);
    check(dut.dv == 3'd4 && dut.dt == 3'd2, "delta-V up, delta-t unchanged");
    // constant input: nothing to trigger on, free run
    dc_input = 1;
    wait_swap();
    wait_swap();
    wait_swap();
    @(posedge clk iff dut.stats_stb);
    #1;
    check(dut.freq_hz == 20'd0, $sformatf("no frequency for a constant (%0d)", dut.freq_hz));
    check(dut.vpp_mv == 16'd0, "no peak-to-peak for a constant");
    // (2600 - 2048) * 10000 / 4096 = 1347 mV
    check(dut.avg_mv == 16'sd1347, $sformatf("average of a constant %0d mV", dut.avg_mv));
    // mechanisms
    check(n_capture >= 5, $sformatf("captures %0d", n_capture));
    check(n_trig > 0, $sformatf("triggered captures %0d", n_trig));
    check(n_freerun > 0, $sformatf("free-running captures %0d", n_freerun));
    check(n_swap >= 5, $sformatf("buffer swaps %0d", n_swap));
    check(n_stats >= 3, $sformatf("statistics published %0d", n_stats));
    check(n_dec_held > 0, $sformatf("decimal module held by write warning %0d cycles", n_dec_held));
    check(n_menu_held > 0, $sformatf("menu FSM held by write warning %0d cycles", n_menu_held));
    check(n_zoom_render > 0, $sformatf("stretched renders %0d", n_zoom_render));
    check(n_slow_rate > 0, $sformatf("captures at a reduced sample rate %0d", n_slow_rate));
    check(n_mode_dt > 0 && n_mode_dv > 0, "both menu modes entered");
    check(n_dt_change == 3 && n_dv_change == 1, $sformatf("setting changes dt %0d dv %0d", n_dt_change, n_dv_change));
    $display("mechanisms: captures=%0d triggered=%0d freerun=%0d swaps=%0d stats=%0d dec_held=%0d menu_held=%0d zoom=%0d slow=%0d dt_mode=%0d dv_mode=%0d",
             n_capture, n_trig, n_freerun, n_swap, n_stats, n_dec_held, n_menu_held, n_zoom_render, n_slow_rate, n_mode_dt, n_mode_dv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
