// tb_menu_fsm: presses the buttons and checks the delta-t and delta-V
// settings (mode selection, up/down, saturation, one step per press, nothing
// before a mode is chosen) and, after each delta-t change, the time-scale
// image written into a model of the delta-t memory, glyph by glyph.
module tb_menu_fsm;
  import scope_pkg::*;
  localparam int W = DT_W, H = DT_H;
  localparam int AW = $clog2(W * H);
  logic clk = 0, rst = 1;
  logic b_dt = 0, b_dv = 0, b_up = 0, b_dn = 0, ww = 0;
  dt_idx_t dt;
  dv_idx_t dv;
  logic [1:0] editing;
  logic we, wdata, busy;
  logic [AW-1:0] waddr;
  int checks = 0, failures = 0;

  menu_fsm dut (
    .clk, .rst, .btn_dt(b_dt), .btn_dv(b_dv), .btn_up(b_up), .btn_down(b_dn),
    .write_warning(ww), .dt, .dv, .editing, .we, .waddr, .wdata, .img_busy(busy));

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic img [W * H];
  int ww_writes = 0;
  always @(posedge clk) begin
    if (we) begin
      img[waddr] = wdata;
      if (ww) ww_writes++;
    end
    ww <= ($urandom % 3) == 0;
  end

  int div_us [8] = '{500, 1000, 2500, 5000, 10000, 25000, 50000, 100000};

  // which: 0 delta-t, 1 delta-V, 2 up, 3 down
  task automatic press(int which, int hold);
    {b_dn, b_up, b_dv, b_dt} <= 4'(1 << which);
    repeat (hold) @(posedge clk);
    {b_dn, b_up, b_dv, b_dt} <= 4'b0;
    repeat (3) @(posedge clk);
  endtask

  task automatic check_image();
    string lines [2];
    int bad = 0;
    // wait until no redraw is running or queued
    for (int quiet = 0; quiet < 5; ) begin
      @(posedge clk);
      quiet = busy ? 0 : quiet + 1;
    end
    lines[0] = "T/DIV    ";
    lines[1] = $sformatf("%6d us", div_us[dt]);
    for (int l = 0; l < 2; l++)
      for (int c = 0; c < 9; c++) begin
        f_ch = char_t'(lines[l][c]);
        for (int r = 0; r < 8; r++) begin
          f_row = 3'(r);
          #1;
          for (int p = 0; p < 8; p++)
            if (img[(6 + 14 * l + r) * W + 4 + 8 * c + p] != f_bits[7 - p]) bad++;
        end
      end
    check(bad == 0, $sformatf("delta-t image for %0d us: %0d wrong pixels", div_us[dt], bad));
  endtask

  initial begin
    int edt, edv;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    check(dt == 3'd3 && dv == 3'd3 && editing == 2'd0, "reset settings");
    check_image();
    press(2, 5);
    press(3, 5);
    check(dt == 3'd3 && dv == 3'd3, "up/down ignored before a mode is chosen");
    press(0, 2);
    check(editing == 2'd1, "delta-t mode");
    edt = 3;
    edv = 3;
    for (int k = 0; k < 40; k++) begin
      automatic bit up = 1'($urandom % 2);
      if (k == 20) begin
        press(1, 4);
        check(editing == 2'd2, "delta-V mode");
      end
      if (up) press(2, 1 + $urandom % 6); else press(3, 1 + $urandom % 6);
      if (k < 20) edt = up ? ((edt < 7) ? edt + 1 : 7) : ((edt > 0) ? edt - 1 : 0);
      else        edv = up ? ((edv < 5) ? edv + 1 : 5) : ((edv > 0) ? edv - 1 : 0);
      check(int'(dt) == edt && int'(dv) == edv, $sformatf("step %0d: dt %0d/%0d dv %0d/%0d", k, dt, edt, dv, edv));
      if (k < 20 && (k % 4) == 0) check_image();
    end
    // saturation at both ends of delta-t
    press(0, 1);
    repeat (10) press(2, 1);
    check(dt == 3'd7, "delta-t saturates high");
    check_image();
    repeat (10) press(3, 1);
    check(dt == 3'd0, "delta-t saturates low");
    check_image();
    check(ww_writes == 0, "no image write during write warning");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
