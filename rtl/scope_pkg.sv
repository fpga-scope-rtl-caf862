// scope_pkg: constants, setting tables and shared types of the oscilloscope.
//
// Screen geometry (from the memory budget of the design): the waveform image
// is 748 columns (one per displayed sample) by 700 rows, the numbers image is
// 242 columns by 700 rows and the time-scale image is 100 columns by 34 rows.
// The capture buffer holds four screen widths, 4 x 748 = 2992 samples of 12
// bits. Every image is one bit per pixel and stored one-dimensionally,
// address = row * width + column.
//
// The delta-t and delta-V setting tables are this design's own choice: the
// ADC is run at most at 10 kHz (the AD574 limit), slower settings lower the
// sample rate and faster settings keep 10 kHz and stretch each sample over
// several columns. Grid lines are drawn every 50 columns and every 70 rows.
package scope_pkg;

  localparam int unsigned SAMPLE_W      = 12;
  localparam int unsigned SCREEN_SAMPLES = 748;
  localparam int unsigned CAPTURE_DEPTH  = 4 * SCREEN_SAMPLES;   // 2992
  localparam int unsigned CAP_AW         = $clog2(CAPTURE_DEPTH);

  localparam int unsigned WAVE_W = 748;
  localparam int unsigned WAVE_H = 700;
  localparam int unsigned NUM_W  = 242;
  localparam int unsigned NUM_H  = 700;
  localparam int unsigned DT_W   = 100;
  localparam int unsigned DT_H   = 34;

  localparam int unsigned GRID_X = 50;     // columns per horizontal division
  localparam int unsigned GRID_Y = 70;     // rows per vertical division

  // Settings
  localparam int unsigned N_DT    = 8;
  localparam int unsigned N_DV    = 6;
  localparam int unsigned DT_IW   = 3;
  localparam int unsigned DV_IW   = 3;
  localparam logic [DT_IW-1:0] DT_RESET = 3'd3;   // 5 ms/div, 10 kHz, no stretch
  localparam logic [DV_IW-1:0] DV_RESET = 3'd3;   // 1 V/div, full ADC range fills screen

  typedef logic [DT_IW-1:0] dt_idx_t;
  typedef logic [DV_IW-1:0] dv_idx_t;
  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [CAP_AW-1:0] cap_addr_t;
  typedef logic [7:0] char_t;   // ASCII code of a character to draw

  // Sample period in microseconds for each delta-t setting.
  function automatic int unsigned dt_sample_us(dt_idx_t i);
    case (i)
      3'd0, 3'd1, 3'd2, 3'd3: return 100;
      3'd4:                   return 200;
      3'd5:                   return 500;
      3'd6:                   return 1000;
      default:                return 2000;
    endcase
  endfunction

  // Columns per sample (horizontal stretch) for each delta-t setting.
  function automatic int unsigned dt_zoom(dt_idx_t i);
    case (i)
      3'd0:    return 10;
      3'd1:    return 5;
      3'd2:    return 2;
      default: return 1;
    endcase
  endfunction

  // Time per grid division in microseconds: GRID_X * period / zoom.
  function automatic int unsigned dt_div_us(dt_idx_t i);
    return GRID_X * dt_sample_us(i) / dt_zoom(i);
  endfunction

  // Vertical gain: rows per full ADC range (4096 codes = 10 V).
  function automatic int unsigned dv_gain(dv_idx_t i);
    case (i)
      3'd0:    return 7000;
      3'd1:    return 3500;
      3'd2:    return 1400;
      3'd3:    return 700;
      3'd4:    return 350;
      default: return 140;
    endcase
  endfunction

  // Millivolts per grid division: 10000 mV * GRID_Y / gain.
  function automatic int unsigned dv_mv_per_div(dv_idx_t i);
    return 10000 * GRID_Y / dv_gain(i);
  endfunction

  // ADC code (bipolar +-5 V, offset binary) to millivolts: (code-2048)*10000/4096.
  function automatic int code_to_mv(int code_minus_mid);
    return (code_minus_mid * 625) / 256;
  endfunction

endpackage
