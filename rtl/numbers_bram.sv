// numbers_bram: one-bit-per-pixel image of the numeric read-outs (average, peak-to-peak, frequency, volts per division) and their labels.
//
// The image is 700 rows by 242 columns, 169,400 bits (under 2^18), stored
// one-dimensionally (address = row * width + column) as the document
// describes. The decimal module writes it through the write port, pausing
// while the VGA controller's write warning is high; the VGA controller reads
// it through the read port while it scans the screen. A simple dual-port
// memory with a registered read is this design's choice; it maps onto block
// RAM.
//
// Interface: we/waddr/wdata write port; re/raddr read port, rdata.
// Timing: rdata holds the pixel at raddr one cycle after a read with re high.
module numbers_bram
  import scope_pkg::*;
#(
  parameter int unsigned WIDTH  = NUM_W,
  parameter int unsigned HEIGHT = NUM_H,
  parameter int unsigned AW     = $clog2(WIDTH * HEIGHT)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rdata
);
  localparam int unsigned DEPTH = WIDTH * HEIGHT;

  logic mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = 1'b0;

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
    if (re) rdata <= (int'(raddr) < DEPTH) ? mem[raddr] : 1'b0;
  end

endmodule
