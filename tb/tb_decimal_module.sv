// tb_decimal_module: publishes statistics, lets the module redraw the numbers
// image while the write warning toggles, then reads every character cell back
// from the collected image and compares it with the glyph of the expected
// text ("AVG", "-1234 mV", ...). Checks that nothing is written while the
// warning is high, one write per free cycle, and redraws on new statistics
// and on a delta-V change.
module tb_decimal_module;
  import scope_pkg::*;
  localparam int W = NUM_W, H = NUM_H;
  localparam int AW = $clog2(W * H);
  logic clk = 0, rst = 1;
  logic signed [15:0] avg_mv = '0;
  logic [15:0] vpp_mv = '0;
  logic [19:0] freq_hz = '0;
  logic stats_stb = 0, ww = 0, we, wdata, busy;
  dv_idx_t dv = DV_RESET;
  logic [AW-1:0] waddr;
  int checks = 0, failures = 0;

  decimal_module dut (
    .clk, .rst, .avg_mv, .vpp_mv, .freq_hz, .stats_stb, .dv,
    .write_warning(ww), .we, .waddr, .wdata, .busy);

  // reference glyphs
  char_t f_ch;
  logic [2:0] f_row;
  logic [7:0] f_bits;
  font_rom u_font (.ch(f_ch), .row(f_row), .bits(f_bits));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic img [W * H];
  int writes = 0, free_busy = 0, ww_writes = 0;
  always @(posedge clk) begin
    if (we) begin
      img[waddr] = wdata;
      writes++;
      if (ww) ww_writes++;
    end
    if (busy && !ww) free_busy++;
  end

  // toggle the write warning like a (much shortened) frame
  bit toggling = 0;
  always @(posedge clk) if (toggling) ww <= ($urandom % 4) != 0;

  string lines [8];

  task automatic compare_image(string tag);
    int bad = 0;
    for (int l = 0; l < 8; l++)
      for (int c = 0; c < 9; c++) begin
        f_ch = char_t'(lines[l][c]);
        for (int r = 0; r < 8; r++) begin
          f_row = 3'(r);
          #1;
          for (int p = 0; p < 8; p++)
            for (int dy = 0; dy < 2; dy++)
              for (int dx = 0; dx < 2; dx++) begin
                int yy = 16 + 24 * l + 2 * r + dy;
                int xx = 16 + 16 * c + 2 * p + dx;
                if (img[yy * W + xx] != f_bits[7 - p]) bad++;
              end
        end
      end
    check(bad == 0, $sformatf("%s: %0d wrong pixels", tag, bad));
  endtask

  task automatic wait_redraw(string tag);
    int t0 = writes;
    free_busy = 0;
    @(posedge clk iff busy);
    @(posedge clk iff !busy);
    toggling = 0;
    ww <= 1'b0;
    repeat (3) @(posedge clk);
    check(writes - t0 == 8 * 9 * 256, $sformatf("%s: %0d writes", tag, writes - t0));
    check(ww_writes == 0, "no write during write warning");
    check(free_busy >= 8 * 9 * 256 && free_busy <= 8 * 9 * 256 + 1,
          $sformatf("%s: one write per free cycle (%0d)", tag, free_busy));
  endtask

  task automatic set_lines(int a, int v, int f, int d);
    lines[0] = "AVG      ";
    lines[1] = $sformatf("%s%5d mV", (a < 0) ? "-" : " ", (a < 0) ? -a : a);
    lines[2] = "VPP      ";
    lines[3] = $sformatf(" %5d mV", v);
    lines[4] = "FREQ     ";
    lines[5] = $sformatf(" %5d Hz", f);
    lines[6] = "V/DIV    ";
    lines[7] = $sformatf(" %5d mV", d);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // redraw after reset with zero statistics
    wait_redraw("reset");
    set_lines(0, 0, 0, 1000);
    compare_image("reset");
    // new statistics
    avg_mv <= -16'sd1234;
    vpp_mv <= 16'd9765;
    freq_hz <= 20'd10000;
    toggling = 1;
    @(posedge clk);
    stats_stb <= 1'b1;
    @(posedge clk);
    stats_stb <= 1'b0;
    wait_redraw("stats");
    set_lines(-1234, 9765, 10000, 1000);
    compare_image("stats");
    // delta-V change alone
    avg_mv <= 16'sd45;
    dv <= 3'd0;
    toggling = 1;
    wait_redraw("dv");
    set_lines(45, 9765, 10000, 100);
    compare_image("dv");
    // random values
    for (int k = 0; k < 3; k++) begin
      automatic int a = int'($urandom % 10000) - 5000, v = $urandom % 10000, f = $urandom % 20000;
      avg_mv <= 16'(a);
      vpp_mv <= 16'(v);
      freq_hz <= 20'(f);
      toggling = 1;
      @(posedge clk);
      stats_stb <= 1'b1;
      @(posedge clk);
      stats_stb <= 1'b0;
      wait_redraw("random");
      set_lines(a, v, f, 100);
      compare_image("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
