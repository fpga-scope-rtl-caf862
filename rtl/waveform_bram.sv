// waveform_bram: double-buffered image of the oscilloscope trace and grid.
//
// Two banks, each 700 rows by 748 columns at one bit per pixel (523,600 bits;
// both together under 2^20). Drawing a new image takes longer than one 1/60 s
// screen refresh, so one bank is shown while the other is drawn. `select`,
// driven by the VGA controller, picks the bank that is read: the read data
// comes through a 2:1 multiplexer (input 0 = bank 1, input 1 = bank 2) and
// writes go to the other bank. Two banks, the multiplexer and the select
// signal are the document's; the registered read is this design's choice.
//
// Interface: we/waddr/wdata from the scaling module (always to the hidden
// bank); re/raddr/rdata for the VGA controller (the shown bank).
// Timing: rdata one cycle after raddr; a change of select affects the next
// read and the next write.
module waveform_bram
  import scope_pkg::*;
#(
  parameter int unsigned WIDTH  = WAVE_W,
  parameter int unsigned HEIGHT = WAVE_H,
  parameter int unsigned AW     = $clog2(WIDTH * HEIGHT)
) (
  input  logic          clk,
  input  logic          select,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rdata
);
  localparam int unsigned DEPTH = WIDTH * HEIGHT;

  logic bank1 [DEPTH];
  logic bank2 [DEPTH];
  logic rd1, rd2, sel_q;

  initial for (int i = 0; i < DEPTH; i++) begin
    bank1[i] = 1'b0;
    bank2[i] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (we && select && int'(waddr) < DEPTH) bank1[waddr] <= wdata;
    if (re) rd1 <= (int'(raddr) < DEPTH) ? bank1[raddr] : 1'b0;
  end

  always_ff @(posedge clk) begin
    if (we && !select && int'(waddr) < DEPTH) bank2[waddr] <= wdata;
    if (re) rd2 <= (int'(raddr) < DEPTH) ? bank2[raddr] : 1'b0;
  end

  always_ff @(posedge clk) if (re) sel_q <= select;

  assign rdata = sel_q ? rd2 : rd1;

endmodule
