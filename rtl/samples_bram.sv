// samples_bram: capture buffer for raw ADC samples.
//
// Holds DEPTH 12-bit samples (four screen widths, 4 x 748 = 2992), so that
// the trigger point can be searched for and a full screen of samples around it
// is still present. The converter's status line (STS) is the write enable, as
// the document describes: it is synchronised, and each falling edge (end of a
// conversion) writes the 12-bit data word at the next address. After DEPTH
// writes the buffer is full and ignores further conversions until `rearm`
// starts a new capture at address 0; this freeze is this design's choice, so
// that the scaling module can read one consistent capture.
//
// Each accepted sample is also presented to the math module (sample_stb,
// sample_idx, sample_val), which the block diagram feeds from the same
// ready/write and data lines.
//
// Interface: adc_sts/adc_data from the converter; rd_addr/rd_data read port
// (registered, one cycle latency); full = capture complete.
// Timing: a sample is written 3 cycles after STS falls.
module samples_bram
  import scope_pkg::*;
#(
  parameter int unsigned DEPTH = CAPTURE_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     adc_sts,
  input  sample_t                  adc_data,
  input  logic                     rearm,
  output logic                     full,
  output logic                     sample_stb,
  output logic [$clog2(DEPTH)-1:0] sample_idx,
  output sample_t                  sample_val,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output sample_t                  rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  sample_t mem [DEPTH];

  logic sts_s0, sts_s1, sts_s2;
  sample_t data_s0, data_s1;
  logic [AW-1:0] waddr;
  logic          accept;

  always_ff @(posedge clk) begin
    if (rst) begin
      sts_s0 <= 1'b0;
      sts_s1 <= 1'b0;
      sts_s2 <= 1'b0;
    end else begin
      sts_s0 <= adc_sts;
      sts_s1 <= sts_s0;
      sts_s2 <= sts_s1;
    end
    data_s0 <= adc_data;
    data_s1 <= data_s0;
  end

  assign accept = sts_s2 && !sts_s1 && !full;

  always_ff @(posedge clk) begin
    if (rst) begin
      waddr      <= '0;
      full       <= 1'b0;
      sample_stb <= 1'b0;
      sample_idx <= '0;
      sample_val <= '0;
    end else begin
      sample_stb <= 1'b0;
      if (rearm) begin
        waddr <= '0;
        full  <= 1'b0;
      end else if (accept) begin
        sample_stb <= 1'b1;
        sample_idx <= waddr;
        sample_val <= data_s1;
        if (waddr == AW'(DEPTH - 1)) begin
          full  <= 1'b1;
          waddr <= '0;
        end else begin
          waddr <= waddr + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept && !rearm) mem[waddr] <= data_s1;
    rd_data <= mem[rd_addr];
  end

  // A full buffer is never written until it is re-armed.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (rst)
    full && !rearm |=> !sample_stb);

endmodule
