// decimal_module: writes the numeric read-outs into the numbers image.
//
// Whenever the math module publishes new statistics (stats_stb), and once
// after reset, or when the delta-V setting changes, it converts the average
// voltage, the peak-to-peak voltage, the frequency and the volts per division
// to decimal (shift-and-add-3 converters) and redraws eight text lines with
// stored glyph images:
//     AVG / <sign><5 digits> mV, VPP / <5 digits> mV,
//     FREQ / <5 digits> Hz, V/DIV / <5 digits> mV
// Leading zeros are blanked. Each glyph pixel is drawn as a 2x2 square, 16x16
// pixels per character, lines 24 rows apart from (16, 16). Drawing pauses
// while write_warning is high. A request that arrives while a redraw is in
// progress is remembered and served when it ends.
//
// That the module turns the statistics and delta-V into decimal digits and
// copies pre-made digit and label images into the numbers BRAM is the
// document's; the layout, the units and the font are this design's.
//
// Interface: avg_mv, vpp_mv, freq_hz, stats_stb from the math module; dv from
// the menu FSM; write_warning from the VGA controller; we/waddr/wdata to the
// numbers BRAM; busy while drawing.
// Timing: 8 * 9 * 256 = 18,432 pixel writes per redraw, plus held cycles.
module decimal_module
  import scope_pkg::*;
#(
  parameter int unsigned IMG_W = NUM_W,
  parameter int unsigned AW    = $clog2(NUM_W * NUM_H)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [15:0] avg_mv,
  input  logic [15:0]        vpp_mv,
  input  logic [19:0]        freq_hz,
  input  logic               stats_stb,
  input  dv_idx_t            dv,
  input  logic               write_warning,
  output logic               we,
  output logic [AW-1:0]      waddr,
  output logic               wdata,
  output logic               busy
);
  localparam int unsigned LINES = 8;
  localparam int unsigned COLS  = 9;


  logic [16:0] avg_abs;
  logic [23:0] bcd_avg, bcd_vpp, bcd_frq, bcd_dv;

  always_comb avg_abs = (avg_mv < 0) ? 17'(-int'(avg_mv)) : 17'(avg_mv);

  bin2bcd #(.W(17), .DIGITS(6)) u_bcd_avg (.bin(avg_abs),             .bcd(bcd_avg));
  bin2bcd #(.W(17), .DIGITS(6)) u_bcd_vpp (.bin(17'(vpp_mv)),         .bcd(bcd_vpp));
  bin2bcd #(.W(20), .DIGITS(6)) u_bcd_frq (.bin(freq_hz),             .bcd(bcd_frq));
  bin2bcd #(.W(17), .DIGITS(6)) u_bcd_dv  (.bin(17'(dv_mv_per_div(dv))), .bcd(bcd_dv));

  // Five right-aligned digits with leading zeros blanked.
  function automatic void put_number(ref char_t line [COLS], input logic [23:0] bcd);
    logic lead;
    lead = 1'b1;
    for (int d = 4; d >= 0; d--) begin
      if (bcd[4*d +: 4] != 4'd0 || d == 0) lead = 1'b0;
      line[5 - d] = lead ? char_t'(" ") : char_t'(8'h30 + 8'(bcd[4*d +: 4]));
    end
  endfunction

  char_t next_text [LINES][COLS];
  always_comb begin
    for (int l = 0; l < LINES; l++)
      for (int c = 0; c < COLS; c++) next_text[l][c] = " ";
    next_text[0][0:2] = '{"A", "V", "G"};
    next_text[2][0:2] = '{"V", "P", "P"};
    next_text[4][0:3] = '{"F", "R", "E", "Q"};
    next_text[6][0:4] = '{"V", "/", "D", "I", "V"};
    put_number(next_text[1], bcd_avg);
    put_number(next_text[3], bcd_vpp);
    put_number(next_text[5], bcd_frq);
    put_number(next_text[7], bcd_dv);
    if (avg_mv < 0) next_text[1][0] = "-";
    next_text[1][7:8] = '{"m", "V"};
    next_text[3][7:8] = '{"m", "V"};
    next_text[5][7:8] = '{"H", "z"};
    next_text[7][7:8] = '{"m", "V"};
  end

  logic    pending, start;
  dv_idx_t dv_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= 1'b1;
      dv_q    <= dv;
      start   <= 1'b0;
    end else begin
      dv_q  <= dv;
      start <= 1'b0;
      if (stats_stb || dv != dv_q) pending <= 1'b1;
      if (pending && !busy && !start) begin
        start   <= 1'b1;
        pending <= stats_stb || dv != dv_q;
      end
    end
  end

  text_writer #(
    .IMG_W(IMG_W), .AW(AW), .LINES(LINES), .COLS(COLS),
    .SCALE_SH(1), .X0(16), .Y0(16), .PITCH(24)
  ) u_writer (
    .clk, .rst, .start, .text(next_text), .hold(write_warning),
    .busy, .we, .waddr, .wdata
  );

endmodule
