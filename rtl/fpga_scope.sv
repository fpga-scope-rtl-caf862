// fpga_scope: a single-channel digital oscilloscope with a VGA display.
//
// Data path: the ADC controller starts AD574 conversions at the rate chosen by
// delta-t; each finished conversion (the converter's status line falling) is
// written into the 2992-sample capture buffer and seen by the math module,
// which measures average, peak-to-peak and frequency and finds a trigger
// point. When the buffer is full the scaling module draws the 748-sample
// window around the trigger, scaled by delta-V and delta-t, with grid lines,
// into the hidden half of the double-buffered waveform memory and then
// re-arms the capture. The VGA controller shows the finished half from the
// next frame on.
// Read-outs: the decimal module writes the statistics and volts per division
// as digits into the numbers memory; the menu FSM writes the time per
// division into the delta-t memory. Both only write during vertical blanking
// (write_warning low).
// Controls: four push buttons, debounced, drive the menu FSM: button one
// selects delta-t, button two selects delta-V, up/down change the selection.
//
// Interface: one clock (the 65 MHz pixel clock), synchronous active-high
// reset; btn_n are the raw active-low push buttons [0] delta-t, [1] delta-V,
// [2] up, [3] down; adc_* connect to the AD574; vga_* to the monitor;
// editing shows which setting the up/down buttons change.
module fpga_scope
  import scope_pkg::*;
#(
  parameter int unsigned CYCLES_PER_US   = 65,
  parameter int unsigned DEBOUNCE_CYCLES = 650_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  btn_n,
  // AD574
  input  sample_t     adc_data,
  input  logic        adc_sts,
  output logic        adc_ce,
  output logic        adc_cs_n,
  output logic        adc_rc_n,
  output logic        adc_a0,
  output logic        adc_12_8,
  // monitor
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hsync_n,
  output logic        vga_vsync_n,
  output logic        vga_blank,
  output logic [1:0]  editing
);
  localparam int unsigned WAVE_AW = $clog2(WAVE_W * WAVE_H);
  localparam int unsigned NUM_AW  = $clog2(NUM_W * NUM_H);
  localparam int unsigned DT_AW   = $clog2(DT_W * DT_H);

  // settings and timing
  dt_idx_t dt;
  dv_idx_t dv;
  logic    write_warning, select, swapped, render_done;
  logic [3:0] btn;

  // capture path
  logic      sample_unused, cap_full, rearm, sample_stb;
  cap_addr_t sample_idx, trig_addr, scale_raddr;
  sample_t   sample_val, scale_rdata;
  logic      trig_valid;

  // statistics
  logic signed [15:0] avg_mv;
  logic [15:0]        vpp_mv;
  logic [19:0]        freq_hz;
  logic               stats_stb;

  // image write and read ports
  logic               wave_we, wave_wd, wave_re, wave_rd;
  logic [WAVE_AW-1:0] wave_wa, wave_ra;
  logic               num_we, num_wd, num_re, num_rd, num_busy;
  logic [NUM_AW-1:0]  num_wa, num_ra;
  logic               dtimg_we, dtimg_wd, dtimg_re, dtimg_rd, dtimg_busy;
  logic [DT_AW-1:0]   dtimg_wa, dtimg_ra;

  debounce #(.N(4), .DELAY(DEBOUNCE_CYCLES)) u_debounce (
    .clk, .rst, .btn_in(~btn_n), .btn_out(btn)
  );

  menu_fsm u_menu (
    .clk, .rst,
    .btn_dt(btn[0]), .btn_dv(btn[1]), .btn_up(btn[2]), .btn_down(btn[3]),
    .write_warning, .dt, .dv, .editing,
    .we(dtimg_we), .waddr(dtimg_wa), .wdata(dtimg_wd), .img_busy(dtimg_busy)
  );

  adc_controller #(.CYCLES_PER_US(CYCLES_PER_US)) u_adc_ctrl (
    .clk, .rst, .dt, .sample(sample_unused),
    .adc_ce, .adc_cs_n, .adc_rc_n, .adc_a0, .adc_12_8
  );

  samples_bram u_samples (
    .clk, .rst, .adc_sts, .adc_data, .rearm, .full(cap_full),
    .sample_stb, .sample_idx, .sample_val,
    .rd_addr(scale_raddr), .rd_data(scale_rdata)
  );

  math_module u_math (
    .clk, .rst, .sample_stb, .sample_idx, .sample_val, .dt, .write_warning,
    .trigger_addr(trig_addr), .trigger_valid(trig_valid),
    .avg_mv, .vpp_mv, .freq_hz, .stats_stb
  );

  decimal_module u_decimal (
    .clk, .rst, .avg_mv, .vpp_mv, .freq_hz, .stats_stb, .dv, .write_warning,
    .we(num_we), .waddr(num_wa), .wdata(num_wd), .busy(num_busy)
  );

  numbers_bram u_numbers (
    .clk, .we(num_we), .waddr(num_wa), .wdata(num_wd),
    .re(num_re), .raddr(num_ra), .rdata(num_rd)
  );

  scaling_module u_scaling (
    .clk, .rst, .dt, .dv, .cap_full,
    .trigger_addr(trig_addr), .trigger_valid(trig_valid),
    .rd_addr(scale_raddr), .rd_data(scale_rdata),
    .we(wave_we), .waddr(wave_wa), .wdata(wave_wd),
    .rearm, .render_done, .swapped
  );

  waveform_bram u_waveform (
    .clk, .select, .we(wave_we), .waddr(wave_wa), .wdata(wave_wd),
    .re(wave_re), .raddr(wave_ra), .rdata(wave_rd)
  );

  delta_t_bram u_delta_t (
    .clk, .we(dtimg_we), .waddr(dtimg_wa), .wdata(dtimg_wd),
    .re(dtimg_re), .raddr(dtimg_ra), .rdata(dtimg_rd)
  );

  vga_controller u_vga (
    .clk, .rst,
    .wave_re, .wave_raddr(wave_ra), .wave_rdata(wave_rd),
    .num_re, .num_raddr(num_ra), .num_rdata(num_rd),
    .dt_re(dtimg_re), .dt_raddr(dtimg_ra), .dt_rdata(dtimg_rd),
    .write_warning, .render_done, .swapped, .select,
    .vga_r, .vga_g, .vga_b, .vga_hsync_n, .vga_vsync_n, .vga_blank
  );

endmodule
