// adc_controller: paces the AD574 converter at the sample rate set by delta-t.
//
// A down-counter is reloaded with (sample period in microseconds) x
// CYCLES_PER_US each time it expires; on expiry the controller starts one
// conversion by pulling the AD574's R/C# line low for RC_PULSE cycles while
// CE is high and CS# is low. A0 is held low and 12/8# high, so every
// conversion is a full 12-bit one and the result is read on the 12 parallel
// data lines once the chip's status (STS) output falls. A change of delta-t
// restarts the count so the new rate takes effect at once.
//
// The document states that the controller turns delta-t into a control signal
// of matching frequency and that the AD574 limits sampling to 10 kHz; the
// table of periods (scope_pkg::dt_sample_us) and the pin sequencing follow the
// AD574's stand-alone mode and are this design's choice.
//
// Interface: dt = delta-t setting; sample = one-cycle pulse at each
// conversion start; adc_* = converter control pins.
// Timing: one conversion every dt_sample_us(dt) * CYCLES_PER_US cycles.
module adc_controller
  import scope_pkg::*;
#(
  parameter int unsigned CYCLES_PER_US = 65,
  parameter int unsigned RC_PULSE      = 33
) (
  input  logic    clk,
  input  logic    rst,
  input  dt_idx_t dt,
  output logic    sample,
  output logic    adc_ce,
  output logic    adc_cs_n,
  output logic    adc_rc_n,
  output logic    adc_a0,
  output logic    adc_12_8
);
  localparam int unsigned MAX_PERIOD = 2000 * CYCLES_PER_US;
  localparam int unsigned CW = $clog2(MAX_PERIOD + 1);

  logic [CW-1:0] cnt;
  logic [CW-1:0] pulse_cnt;
  dt_idx_t       dt_q;
  logic [CW-1:0] period;

  always_comb period = CW'(dt_sample_us(dt) * CYCLES_PER_US);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      dt_q      <= dt;
      sample    <= 1'b0;
      pulse_cnt <= '0;
      adc_rc_n  <= 1'b1;
    end else begin
      sample <= 1'b0;
      dt_q   <= dt;
      if (dt != dt_q) begin
        cnt <= period - 1'b1;
      end else if (cnt == '0) begin
        cnt       <= period - 1'b1;
        sample    <= 1'b1;
        pulse_cnt <= CW'(RC_PULSE);
        adc_rc_n  <= 1'b0;
      end else begin
        cnt <= cnt - 1'b1;
      end
      if (pulse_cnt != '0) begin
        pulse_cnt <= pulse_cnt - 1'b1;
        if (pulse_cnt == CW'(1)) adc_rc_n <= 1'b1;
      end
    end
  end

  assign adc_ce   = 1'b1;
  assign adc_cs_n = 1'b0;
  assign adc_a0   = 1'b0;
  assign adc_12_8 = 1'b1;

endmodule
