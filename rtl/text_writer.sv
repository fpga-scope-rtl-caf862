// text_writer: copies lines of 8x8 glyphs into a one-bit-per-pixel image.
//
// On `start` it latches a LINES x COLS array of characters and then writes
// every pixel of the text area, one pixel per clock: line by line, pixel row
// by pixel row, left to right. Each glyph pixel becomes a 2^SCALE_SH square.
// Line l starts at row Y0 + l * PITCH, column X0, of an image IMG_W pixels
// wide (address = row * IMG_W + column). While `hold` (the display's write
// warning) is high it stops writing and resumes where it left off.
//
// Interface: start, text -> busy; we/waddr/wdata go to the image memory.
// Timing: LINES * COLS * 64 * 4^SCALE_SH writes, plus the cycles held.
module text_writer
  import scope_pkg::*;
#(
  parameter int unsigned IMG_W    = NUM_W,
  parameter int unsigned AW       = 18,
  parameter int unsigned LINES    = 8,
  parameter int unsigned COLS     = 9,
  parameter int unsigned SCALE_SH = 1,
  parameter int unsigned X0       = 16,
  parameter int unsigned Y0       = 16,
  parameter int unsigned PITCH    = 24
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  char_t         text [LINES][COLS],
  input  logic          hold,
  output logic          busy,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic          wdata
);
  localparam int unsigned CELL = 8 << SCALE_SH;        // pixels per glyph side
  localparam int unsigned LINE_PIX = COLS * CELL;      // pixels per text row
  localparam int unsigned XW = $clog2(LINE_PIX);
  localparam int unsigned YW = $clog2(CELL);
  localparam int unsigned LW = (LINES > 1) ? $clog2(LINES) : 1;
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1;

  char_t         txt [LINES][COLS];
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [LW-1:0] l;

  char_t      ch;
  logic [7:0] row_bits;
  logic [2:0] gcol;

  always_comb begin
    ch    = txt[l][CW'(x >> (3 + SCALE_SH))];
    gcol  = 3'(x >> SCALE_SH);
    we    = busy && !hold;
    waddr = AW'((Y0 + int'(l) * PITCH + int'(y)) * IMG_W + X0 + int'(x));
    wdata = row_bits[3'd7 - gcol];
  end

  font_rom u_font (.ch(ch), .row(3'(y >> SCALE_SH)), .bits(row_bits));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      x    <= '0;
      y    <= '0;
      l    <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        txt  <= text;
        x    <= '0;
        y    <= '0;
        l    <= '0;
      end
    end else if (!hold) begin
      if (x != XW'(LINE_PIX - 1)) begin
        x <= x + 1'b1;
      end else begin
        x <= '0;
        if (y != YW'(CELL - 1)) begin
          y <= y + 1'b1;
        end else begin
          y <= '0;
          if (l != LW'(LINES - 1)) l <= l + 1'b1;
          else busy <= 1'b0;
        end
      end
    end
  end

endmodule
