// tb_vga_controller: runs the controller for three full 1024x768 frames against
// models of the three image memories holding random pictures. For every
// clock it works out the beam position independently and checks sync pulses,
// blanking, the colour from the image that covers the pixel (waveform green,
// numbers white, delta-t yellow, else black), the write warning (visible
// lines only) and the buffer swap (select toggles and swapped pulses only at
// the first blank line, and only when an image is offered).
module tb_vga_controller;
  import scope_pkg::*;
  localparam int HT = 1344, VT = 806;
  localparam int WAW = $clog2(WAVE_W * WAVE_H), NAW = $clog2(NUM_W * NUM_H), DAW = $clog2(DT_W * DT_H);
  logic clk = 0, rst = 1;
  logic wre, nre, dre, wrd, nrd, drd, ww, render_done = 0, swapped, select;
  logic [WAW-1:0] wra;
  logic [NAW-1:0] nra;
  logic [DAW-1:0] dra;
  logic [7:0] r, g, b;
  logic hs_n, vs_n, blank;
  int checks = 0, failures = 0;

  vga_controller dut (
    .clk, .rst, .wave_re(wre), .wave_raddr(wra), .wave_rdata(wrd),
    .num_re(nre), .num_raddr(nra), .num_rdata(nrd),
    .dt_re(dre), .dt_raddr(dra), .dt_rdata(drd),
    .write_warning(ww), .render_done, .swapped, .select,
    .vga_r(r), .vga_g(g), .vga_b(b), .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_blank(blank));

  bit wimg [WAVE_W * WAVE_H];
  bit nimg [NUM_W * NUM_H];
  bit dimg [DT_W * DT_H];
  always_ff @(posedge clk) begin
    if (wre) wrd <= wimg[wra];
    if (nre) nrd <= nimg[nra];
    if (dre) drd <= dimg[dra];
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int bad_pix = 0, bad_sync = 0, bad_ww = 0, bad_swap = 0, n_swaps = 0, n_pix = 0;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] colour(int h, int v);
    if (h < 748 && v < 700) return wimg[v * 748 + h] ? 24'h00FF00 : 24'h0;
    if (h >= 748 && h < 990 && v < 700) return nimg[v * 242 + h - 748] ? 24'hFFFFFF : 24'h0;
    if (h < 100 && v >= 712 && v < 746) return dimg[(v - 712) * 100 + h] ? 24'hFFFF00 : 24'h0;
    return 24'h0;
  endfunction

  initial begin
    int p;
    logic sel_prev;
    for (int i = 0; i < $size(wimg); i++) wimg[i] = 1'($urandom);
    for (int i = 0; i < $size(nimg); i++) nimg[i] = 1'($urandom);
    for (int i = 0; i < $size(dimg); i++) dimg[i] = 1'($urandom);
    repeat (3) @(posedge clk);
    rst <= 0;
    sel_prev = 0;
    // p counts clock edges since reset; the beam is at position p before edge p
    for (p = 0; p < 3 * HT * VT + 10; p++) begin
      int h, v, q, hq, vq;
      h = p % HT;
      v = (p / HT) % VT;
      // offer an image in frame 0, none during frame 1's blank, another in frame 2
      render_done <= (n_swaps == 0 && p > 1000) || (n_swaps == 1 && p > HT * VT + 770 * HT);
      @(posedge clk);
      #1;
      // write warning is combinational from the counters, now at p + 1
      begin
        automatic int v1 = ((p + 1) / HT) % VT;
        if (ww != (v1 < 768)) bad_ww++;
      end
      // swap happens at the edge where the beam is at (0, 768)
      if (select != sel_prev) begin
        n_swaps++;
        if (!(h == 0 && v == 768) || !swapped) bad_swap++;
      end else if (swapped) bad_swap++;
      sel_prev = select;
      // outputs after edge p show position p - 1
      if (p >= 1) begin
        q  = p - 1;
        hq = q % HT;
        vq = (q / HT) % VT;
        if (hs_n != !(hq >= 1048 && hq < 1184)) bad_sync++;
        if (vs_n != !(vq >= 771 && vq < 777)) bad_sync++;
        if (blank != !(hq < 1024 && vq < 768)) bad_sync++;
        if ({r, g, b} != colour(hq, vq)) begin
          if (bad_pix < 5) $display("pixel (%0d,%0d) %h exp %h", hq, vq, {r, g, b}, colour(hq, vq));
          bad_pix++;
        end
        n_pix++;
      end
      // per frame: one check per kind of output
      if ((p + 1) % (HT * VT) == 0) begin
        automatic int fr = (p + 1) / (HT * VT);
        check(bad_pix == 0,  $sformatf("frame %0d: %0d wrong pixels of %0d", fr, bad_pix, n_pix));
        check(bad_sync == 0, $sformatf("frame %0d: %0d sync/blank errors", fr, bad_sync));
        check(bad_ww == 0,   $sformatf("frame %0d: %0d write warning errors", fr, bad_ww));
        check(bad_swap == 0, $sformatf("frame %0d: %0d misplaced swaps", fr, bad_swap));
        // one swap in frame 1; the second image misses frame 2's blank
        check(n_swaps == (fr < 3 ? 1 : 2), $sformatf("frame %0d: %0d swaps so far", fr, n_swaps));
        bad_pix = 0;
        bad_sync = 0;
        bad_ww = 0;
        bad_swap = 0;
      end
    end
    check(n_swaps == 2, $sformatf("%0d swaps, expected 2", n_swaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
