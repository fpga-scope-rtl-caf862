// ad574_model: behavioural model of the AD574 12-bit converter (not
// synthesisable, testbench use only).
//
// A falling edge on R/C# while CE is high and CS# low starts a 12-bit
// conversion of the input code `vin`: STS goes high at once and falls
// CONV_CYCLES clock cycles later, when the result appears on `data`. The data
// lines keep the last result. The analogue input is represented by the code
// the converter would produce (0 = -5 V, 4095 = +5 V).
module ad574_model #(
  parameter int unsigned CONV_CYCLES = 20
) (
  input  logic        clk,
  input  logic        ce,
  input  logic        cs_n,
  input  logic        rc_n,
  input  logic        a0,
  input  logic        b12_8,
  input  logic [11:0] vin,
  output logic        sts,
  output logic [11:0] data,
  output int          conversions
);
  logic rc_q = 1'b1;
  int   cnt  = 0;
  logic [11:0] held;

  initial begin
    sts         = 1'b0;
    data        = '0;
    conversions = 0;
  end

  always @(posedge clk) begin
    rc_q <= rc_n;
    if (rc_q && !rc_n && ce && !cs_n && !sts) begin
      sts  <= 1'b1;
      held <= (a0 || !b12_8) ? {vin[11:4], 4'h0} : vin;
      cnt  <= CONV_CYCLES;
    end else if (sts) begin
      if (cnt == 1) begin
        sts         <= 1'b0;
        data        <= held;
        conversions <= conversions + 1;
      end
      cnt <= cnt - 1;
    end
  end
endmodule
