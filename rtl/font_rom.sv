// font_rom: 8x8 pixel glyphs for the characters the read-outs use.
//
// Combinational lookup: given an ASCII code and a row (0 = top) it returns
// the eight pixels of that row, bit 7 being the leftmost. It covers the digits,
// space, '-', ':', '/', the capitals A D E F G H I P Q R T V and the
// lower-case m s u z; any other code is blank. These are the stored images of
// numbers and labels that the decimal module and the menu FSM copy into the
// display memories; the glyph shapes are this design's own.
module font_rom
  import scope_pkg::*;
(
  input  char_t      ch,
  input  logic [2:0] row,
  output logic [7:0] bits
);
  logic [63:0] g;

  always_comb begin
    case (ch)
      "0": g = 64'h3C666E7666663C00;
      "1": g = 64'h1838181818187E00;
      "2": g = 64'h3C66060C30607E00;
      "3": g = 64'h3C66061C06663C00;
      "4": g = 64'h0C1C3C6C7E0C0C00;
      "5": g = 64'h7E607C0606663C00;
      "6": g = 64'h3C607C6666663C00;
      "7": g = 64'h7E060C1830303000;
      "8": g = 64'h3C66663C66663C00;
      "9": g = 64'h3C66663E060C3800;
      "-": g = 64'h0000007E00000000;
      ":": g = 64'h0018180018180000;
      "/": g = 64'h02060C1830604000;
      "A": g = 64'h183C66667E666600;
      "D": g = 64'h786C6666666C7800;
      "E": g = 64'h7E60607C60607E00;
      "F": g = 64'h7E60607C60606000;
      "G": g = 64'h3C66606E66663C00;
      "H": g = 64'h6666667E66666600;
      "I": g = 64'h3C18181818183C00;
      "P": g = 64'h7C66667C60606000;
      "Q": g = 64'h3C6666666A6C3600;
      "R": g = 64'h7C66667C6C666600;
      "T": g = 64'h7E18181818181800;
      "V": g = 64'h66666666663C1800;
      "m": g = 64'h0000667F7F6B6300;
      "s": g = 64'h00003E603C067C00;
      "u": g = 64'h0000666666663E00;
      "z": g = 64'h00007E0C18307E00;
      default: g = 64'h0;
    endcase
    bits = g[63 - 8*row -: 8];
  end

endmodule
