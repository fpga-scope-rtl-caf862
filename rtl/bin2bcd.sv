// bin2bcd: combinational binary-to-decimal converter (shift-and-add-3).
//
// The binary input is shifted in one bit at a time from the top; before each
// shift every BCD digit of 5 or more has 3 added, so that the shift carries
// correctly into the next decimal digit. Values that do not fit in DIGITS
// decimal digits lose their top digits.
//
// Interface: bin (W bits) -> bcd (DIGITS x 4 bits, digit 0 = units).
module bin2bcd #(
  parameter int unsigned W      = 17,
  parameter int unsigned DIGITS = 6
) (
  input  logic [W-1:0]        bin,
  output logic [4*DIGITS-1:0] bcd
);
  always_comb begin
    logic [4*DIGITS-1:0] acc;
    acc = '0;
    for (int i = W - 1; i >= 0; i--) begin
      for (int d = 0; d < DIGITS; d++)
        if (acc[4*d +: 4] >= 4'd5) acc[4*d +: 4] = acc[4*d +: 4] + 4'd3;
      acc = {acc[4*DIGITS-2:0], bin[i]};
    end
    bcd = acc;
  end
endmodule
