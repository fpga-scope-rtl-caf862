// tb_scaling_module: full-size render of captures held in a model of the
// samples memory. The written image is collected and compared pixel by pixel
// with one computed here (trace joined between columns, grid every 50 columns
// and 70 rows, vertical gain from delta-V, horizontal stretch from delta-t,
// window centred on the trigger). Also checks that every pixel is written
// once, the WIDTH * (HEIGHT + 2) cycle count, rearm, and the swap handshake.
module tb_scaling_module;
  import scope_pkg::*;
  localparam int W = WAVE_W, H = WAVE_H, DEPTH = CAPTURE_DEPTH, HALF = SCREEN_SAMPLES / 2;
  localparam int AW = $clog2(W * H);
  localparam int CAW = $clog2(DEPTH);
  logic clk = 0, rst = 1;
  dt_idx_t dt = 3'd3;
  dv_idx_t dv = 3'd3;
  logic cap_full = 0, trig_valid = 0, we, wdata, rearm, done, swapped = 0;
  logic [CAW-1:0] trig = '0, raddr;
  sample_t rdata;
  logic [AW-1:0] waddr;
  int checks = 0, failures = 0;

  sample_t smem [DEPTH];
  always_ff @(posedge clk) rdata <= smem[raddr];

  scaling_module dut (
    .clk, .rst, .dt, .dv, .cap_full, .trigger_addr(trig), .trigger_valid(trig_valid),
    .rd_addr(raddr), .rd_data(rdata), .we, .waddr, .wdata, .rearm,
    .render_done(done), .swapped);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic img [W * H];
  int   nw [W * H];
  int   n_rearm = 0;
  always @(posedge clk) begin
    if (we) begin
      img[waddr] = wdata;
      nw[waddr]++;
    end
    if (rearm) n_rearm++;
  end

  function automatic int row_of(int v, int g);
    int r = 350 - int'($floor(real'((v - 2048) * g) / 4096.0));
    if (r < 0) r = 0;
    if (r > H - 1) r = H - 1;
    return r;
  endfunction

  task automatic render(int t, int dti, int dvi, int per);
    int z, g, start, cycles, bad, prev, cur, lo, hi, wr_errs;
    z = (dti == 0) ? 10 : (dti == 1) ? 5 : (dti == 2) ? 2 : 1;
    g = (dvi == 0) ? 7000 : (dvi == 1) ? 3500 : (dvi == 2) ? 1400 : (dvi == 3) ? 700 : (dvi == 4) ? 350 : 140;
    for (int i = 0; i < DEPTH; i++)
      smem[i] = sample_t'(2048 + int'(1800.0 * $sin(2.0 * 3.14159265 * i / per)));
    for (int i = 0; i < W * H; i++) nw[i] = 0;
    dt <= dt_idx_t'(dti);
    dv <= dv_idx_t'(dvi);
    trig <= CAW'(t);
    @(posedge clk);
    cap_full <= 1'b1;
    trig_valid <= 1'b1;
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (!done);
    #1;
    check(cycles >= W * (H + 2) && cycles <= W * (H + 2) + 2, $sformatf("render took %0d cycles", cycles));
    check(n_rearm == 1, "one rearm pulse");
    n_rearm = 0;
    cap_full <= 1'b0;
    trig_valid <= 1'b0;
    repeat (20) @(posedge clk);
    check(done, "render_done held until swap");
    // compare image
    start = t - HALF / z;
    bad = 0;
    wr_errs = 0;
    prev = 0;
    for (int x = 0; x < W; x++) begin
      cur = row_of(int'(smem[start + x / z]), g);
      if (x == 0) prev = cur;
      lo = (prev < cur) ? prev : cur;
      hi = (prev < cur) ? cur : prev;
      for (int y = 0; y < H; y++) begin
        bit e = (y >= lo && y <= hi) || (y % 70 == 0) || (x % 50 == 0);
        if (img[y * W + x] != e) begin
          if (bad < 5) $display("pixel (%0d,%0d) = %0d exp %0d", x, y, img[y * W + x], e);
          bad++;
        end
        if (nw[y * W + x] != 1) wr_errs++;
      end
      prev = cur;
    end
    check(bad == 0, $sformatf("%0d wrong pixels (dt=%0d dv=%0d)", bad, dti, dvi));
    check(wr_errs == 0, $sformatf("%0d pixels not written exactly once", wr_errs));
    swapped <= 1'b1;
    @(posedge clk);
    swapped <= 1'b0;
    @(posedge clk);
    #1 check(!done, "render_done cleared by swap");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    render(1000, 3, 3, 200);
    render(500, 0, 1, 100);
    render(2600, 1, 5, 37);
    render(374, 2, 0, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
