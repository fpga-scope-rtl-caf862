// tb_math_module: feeds three full captures of triangle waves and compares
// average, peak-to-peak, frequency and trigger address with values computed
// here from the same samples. The second capture lies entirely above the
// previous mid level (no trigger, no maxima: free run, 0 Hz); the third uses
// the corrected mid level. Also checks that statistics wait for the write
// warning and that trigger_valid follows the last sample by one cycle.
module tb_math_module;
  import scope_pkg::*;
  localparam int DEPTH = CAPTURE_DEPTH;
  localparam int HALF  = SCREEN_SAMPLES / 2;
  localparam int HYST  = 32;
  localparam int AW    = $clog2(DEPTH);
  logic clk = 0, rst = 1;
  logic stb = 0, ww = 0;
  logic [AW-1:0] idx = '0;
  sample_t val = '0;
  dt_idx_t dt = 3'd3;
  logic [AW-1:0] trig;
  logic trig_valid, stats_stb;
  logic signed [15:0] avg_mv;
  logic [15:0] vpp_mv;
  logic [19:0] freq_hz;
  int checks = 0, failures = 0;

  math_module #(.DEPTH(DEPTH), .HALF(HALF), .HYST(HYST)) dut (
    .clk, .rst, .sample_stb(stb), .sample_idx(idx), .sample_val(val), .dt,
    .write_warning(ww), .trigger_addr(trig), .trigger_valid(trig_valid),
    .avg_mv, .vpp_mv, .freq_hz, .stats_stb);

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

  int x [DEPTH];

  function automatic int tri_wave(int i, int p, int lo, int hi, int ph);
    int t = (i + ph) % p;
    if (t <= p / 2) return lo + (hi - lo) * t / (p / 2);
    return lo + (hi - lo) * (p - t) / (p / 2);
  endfunction

  task automatic run_capture(int p, int lo, int hi, int ph, int mid, int us, bit expect_trig);
    int mx = 0, mn = 4095, sum = 0, avg, e_avg, e_vpp, e_f, e_trig, thr_hi;
    for (int i = 0; i < DEPTH; i++) begin
      x[i] = tri_wave(i, p, lo, hi, ph);
      if (x[i] > mx) mx = x[i];
      if (x[i] < mn) mn = x[i];
      sum += x[i];
    end
    avg   = sum / DEPTH;
    e_avg = ((avg - 2048) * 625) / 256;
    e_vpp = ((mx - mn) * 625) / 256;
    e_f   = expect_trig ? 1000000 / (p * us) : 0;
    thr_hi = mid + HYST;
    e_trig = HALF;
    if (expect_trig)
      for (int i = HALF; i < DEPTH - HALF; i++)
        if (x[i] >= thr_hi && x[i-1] < thr_hi) begin e_trig = i; break; end
    ww <= 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      @(posedge clk);
      stb <= 1'b1;
      idx <= AW'(i);
      val <= sample_t'(x[i]);
      @(posedge clk);
      stb <= 1'b0;
      if (i == 1) check(!trig_valid, "trigger_valid cleared by a new capture");
    end
    @(posedge clk);
    check(trig_valid, "trigger_valid one cycle after last sample");
    check(int'(trig) == e_trig, $sformatf("trigger %0d exp %0d", trig, e_trig));
    // statistics must wait for the write warning to fall
    repeat (200) begin
      @(posedge clk);
      if (stats_stb) begin failures++; $display("FAIL: stats during write warning"); end
    end
    checks++;
    ww <= 1'b0;
    @(posedge clk iff stats_stb);
    #1;
    check(int'(avg_mv) == e_avg, $sformatf("avg %0d exp %0d", avg_mv, e_avg));
    check(int'(vpp_mv) == e_vpp, $sformatf("vpp %0d exp %0d", vpp_mv, e_vpp));
    check(int'(freq_hz) == e_f, $sformatf("freq %0d exp %0d", freq_hz, e_f));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    dt <= 3'd3;
    run_capture(40, 1000, 3000, 7, 2048, 100, 1);
    dt <= 3'd5;
    run_capture(24, 2500, 3500, 3, 2000, 500, 0);
    run_capture(24, 2500, 3500, 3, 3000, 500, 1);
    dt <= 3'd0;
    run_capture(10, 100, 1500, 0, 3000, 100, 0);
    run_capture(10, 100, 1500, 0, 800, 100, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
