// vga_controller: scans the monitor and composes the three images.
//
// Generates 1024x768 at 60 Hz timing (65 MHz pixel clock; horizontal 1024
// visible + 24 front porch + 136 sync + 160 back porch, vertical 768 + 3 + 6
// + 29, both sync pulses active low). From the beam position it reads the
// image that covers that pixel:
//   waveform image (748 x 700)  at column 0,   row 0    green
//   numbers image  (242 x 700)  at column 748, row 0    white
//   delta-t image  (100 x 34)   at column 0,   row 712  yellow
// and black elsewhere. Memory reads take one cycle; sync and blank are
// delayed to match, and all outputs are registered, so every output lags the
// beam counters by two cycles.
// Timing for the other modules: write_warning is high while the visible lines
// are scanned (the display memories are being read), so the decimal module and
// the menu FSM write only during vertical blanking. At the first blank line,
// if the scaling module has a finished image (render_done), `select` is
// toggled so the new bank is shown from the next frame on, and `swapped`
// pulses for one cycle.
//
// Combining the images, the write warning and the select signal are the
// document's; the screen mode, the placement and colours of the images and
// the moment of the swap are this design's.
//
// Interface: bram read ports (re/raddr/rdata) for the three images;
// render_done/swapped/select for the double buffer; write_warning;
// vga_r/g/b (8 bits each), vga_hsync_n, vga_vsync_n, vga_blank.
module vga_controller
  import scope_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29,
  parameter int unsigned DT_X     = 0,
  parameter int unsigned DT_Y     = 712
) (
  input  logic        clk,
  input  logic        rst,
  // waveform BRAM
  output logic        wave_re,
  output logic [$clog2(WAVE_W*WAVE_H)-1:0] wave_raddr,
  input  logic        wave_rdata,
  // numbers BRAM
  output logic        num_re,
  output logic [$clog2(NUM_W*NUM_H)-1:0] num_raddr,
  input  logic        num_rdata,
  // delta-t BRAM
  output logic        dt_re,
  output logic [$clog2(DT_W*DT_H)-1:0] dt_raddr,
  input  logic        dt_rdata,
  // timing for the writers
  output logic        write_warning,
  input  logic        render_done,
  output logic        swapped,
  output logic        select,
  // monitor
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hsync_n,
  output logic        vga_vsync_n,
  output logic        vga_blank
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);

  logic [HW-1:0] hc;
  logic [VW-1:0] vc;

  // beam counters
  always_ff @(posedge clk) begin
    if (rst) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == HW'(H_TOTAL - 1)) begin
      hc <= '0;
      vc <= (vc == VW'(V_TOTAL - 1)) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  // stage 0: region decode and read addresses
  logic in_wave, in_num, in_dt, active, hs, vs;
  always_comb begin
    active  = (hc < HW'(H_ACTIVE)) && (vc < VW'(V_ACTIVE));
    in_wave = (hc < HW'(WAVE_W)) && (vc < VW'(WAVE_H));
    in_num  = (hc >= HW'(WAVE_W)) && (hc < HW'(WAVE_W + NUM_W)) && (vc < VW'(NUM_H));
    in_dt   = (int'(hc) >= int'(DT_X)) && (hc < HW'(DT_X + DT_W)) &&
              (vc >= VW'(DT_Y)) && (vc < VW'(DT_Y + DT_H));
    hs = (hc >= HW'(H_ACTIVE + H_FP)) && (hc < HW'(H_ACTIVE + H_FP + H_SYNC));
    vs = (vc >= VW'(V_ACTIVE + V_FP)) && (vc < VW'(V_ACTIVE + V_FP + V_SYNC));
    wave_re    = in_wave;
    num_re     = in_num;
    dt_re      = in_dt;
    wave_raddr = ($clog2(WAVE_W*WAVE_H))'(int'(vc) * WAVE_W + int'(hc));
    num_raddr  = ($clog2(NUM_W*NUM_H))'(int'(vc) * NUM_W + int'(hc) - WAVE_W);
    dt_raddr   = ($clog2(DT_W*DT_H))'((int'(vc) - DT_Y) * DT_W + int'(hc) - DT_X);
  end

  // stage 1: memory data arrives, flags delayed to match
  logic w1, n1, d1, a1, hs1, vs1;
  always_ff @(posedge clk) begin
    if (rst) begin
      {w1, n1, d1, a1, hs1, vs1} <= '0;
    end else begin
      w1  <= in_wave;
      n1  <= in_num;
      d1  <= in_dt;
      a1  <= active;
      hs1 <= hs;
      vs1 <= vs;
    end
  end

  // stage 2: registered outputs
  always_ff @(posedge clk) begin
    if (rst) begin
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      vga_hsync_n <= 1'b1;
      vga_vsync_n <= 1'b1;
      vga_blank   <= 1'b1;
    end else begin
      vga_hsync_n <= !hs1;
      vga_vsync_n <= !vs1;
      vga_blank   <= !a1;
      if (w1 && wave_rdata) begin
        {vga_r, vga_g, vga_b} <= 24'h00FF00;
      end else if (n1 && num_rdata) begin
        {vga_r, vga_g, vga_b} <= 24'hFFFFFF;
      end else if (d1 && dt_rdata) begin
        {vga_r, vga_g, vga_b} <= 24'hFFFF00;
      end else begin
        {vga_r, vga_g, vga_b} <= 24'h000000;
      end
    end
  end

  // write warning and buffer select
  assign write_warning = (vc < VW'(V_ACTIVE));

  always_ff @(posedge clk) begin
    if (rst) begin
      select  <= 1'b0;
      swapped <= 1'b0;
    end else begin
      swapped <= 1'b0;
      if (hc == '0 && vc == VW'(V_ACTIVE) && render_done) begin
        select  <= !select;
        swapped <= 1'b1;
      end
    end
  end

  // The bank swap must happen outside the visible area, and only for a
  // finished image.
  a_swap_in_blank: assert property (@(posedge clk) disable iff (rst)
    swapped |-> !write_warning);
  a_swap_needs_image: assert property (@(posedge clk) disable iff (rst)
    (select != $past(select)) |-> $past(render_done));

endmodule
