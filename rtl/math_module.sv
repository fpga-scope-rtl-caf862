// math_module: measures the input signal while it is being captured.
//
// It watches every sample that enters the capture buffer and, per capture of
// DEPTH samples, produces:
//  * average voltage: a running sum of the samples, weighted by 1/DEPTH at the
//    end of the capture (one serial division);
//  * peak-to-peak voltage: the largest minus the smallest sample;
//  * frequency: the time between the first two maxima of the capture. A
//    maximum is the largest sample of an excursion above the mid level; an
//    excursion starts when the signal rises to mid + HYST and ends when it
//    falls below mid - HYST (the hysteresis keeps noise from splitting
//    peaks). f = 1e6 / (samples between maxima * sample period in us);
//  * trigger address: the first rising crossing of mid + HYST whose index
//    leaves half a screen of samples on either side; without one the window
//    starts at the beginning of the capture (free run).
// The mid level is (max + min) / 2 of the previous capture, 2048 after reset.
// Voltages are reported in millivolts for a +-5 V offset-binary converter:
// mV = (code - 2048) * 10000 / 4096.
//
// The three statistics, the max/min tracking, the time between maxima and the
// threshold trigger are the document's; the hysteresis, the mid level, the
// units and the 1/DEPTH weighting are this design's choices. New statistics
// are only published (stats_stb) while write_warning is low, so that the
// decimal module never sees them change while the screen is being read.
//
// Interface: sample_stb/idx/val from the capture buffer; dt = delta-t setting
// of the capture; trigger_addr/trigger_valid to the scaling module (valid from
// the end of a capture until the first sample of the next); avg_mv, vpp_mv,
// freq_hz, stats_stb to the decimal module.
// Timing: trigger_valid rises one cycle after the last sample; statistics
// follow about 70 cycles later, plus any wait for write_warning to fall.
module math_module
  import scope_pkg::*;
#(
  parameter int unsigned DEPTH = CAPTURE_DEPTH,
  parameter int unsigned HALF  = SCREEN_SAMPLES / 2,
  parameter int unsigned HYST  = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     sample_stb,
  input  logic [$clog2(DEPTH)-1:0] sample_idx,
  input  sample_t                  sample_val,
  input  dt_idx_t                  dt,
  input  logic                     write_warning,
  output logic [$clog2(DEPTH)-1:0] trigger_addr,
  output logic                     trigger_valid,
  output logic signed [15:0]       avg_mv,
  output logic [15:0]              vpp_mv,
  output logic [19:0]              freq_hz,
  output logic                     stats_stb
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [1:0] {P_WAIT_LOW, P_LOW, P_HIGH} peak_state_t;
  typedef enum logic [2:0] {M_IDLE, M_DIV_AVG, M_WAIT_AVG, M_DIV_FREQ, M_WAIT_FREQ, M_PUBLISH} math_state_t;

  peak_state_t pst;
  math_state_t mst;

  sample_t  mid, smax, smin, pk_val;
  logic [AW-1:0] pk_idx, first_max, second_max, trig_idx;
  logic [1:0]    n_max;
  logic          trig_found;
  logic [31:0]   sum;

  // end-of-capture results
  sample_t       cap_max, cap_min;
  logic [31:0]   cap_sum;
  logic [AW-1:0] cap_period;
  logic          cap_period_ok;
  dt_idx_t       cap_dt;
  logic [31:0]   avg_code;

  logic [12:0] thr_hi, thr_lo;
  always_comb begin
    thr_hi = {1'b0, mid} + 13'(HYST);
    thr_lo = ({1'b0, mid} > 13'(HYST)) ? {1'b0, mid} - 13'(HYST) : 13'd0;
  end

  // divider
  logic        div_start, div_busy, div_done;
  logic [31:0] div_a, div_b, div_q;
  serial_divider #(.W(32)) u_div (
    .clk, .rst, .start(div_start), .dividend(div_a), .divisor(div_b),
    .busy(div_busy), .done(div_done), .quotient(div_q)
  );

  // sample-by-sample tracking
  always_ff @(posedge clk) begin
    if (rst) begin
      pst           <= P_WAIT_LOW;
      mid           <= sample_t'(2048);
      smax          <= '0;
      smin          <= '0;
      pk_val        <= '0;
      pk_idx        <= '0;
      first_max     <= '0;
      second_max    <= '0;
      n_max         <= '0;
      trig_found    <= 1'b0;
      trig_idx      <= AW'(HALF);
      sum           <= '0;
      trigger_valid <= 1'b0;
      trigger_addr  <= AW'(HALF);
      cap_max       <= '0;
      cap_min       <= '0;
      cap_sum       <= '0;
      cap_period    <= '0;
      cap_period_ok <= 1'b0;
      cap_dt        <= '0;
    end else if (sample_stb) begin
      automatic logic first = (sample_idx == '0);
      automatic sample_t  nmax = (first || sample_val > smax) ? sample_val : smax;
      automatic sample_t  nmin = (first || sample_val < smin) ? sample_val : smin;
      automatic logic [31:0] nsum = (first ? 32'd0 : sum) + 32'(sample_val);
      automatic peak_state_t ps = first ? P_WAIT_LOW : pst;
      automatic logic [1:0]  nm = first ? 2'd0 : n_max;
      automatic logic        tf = first ? 1'b0 : trig_found;
      automatic logic [AW-1:0] ti = first ? AW'(HALF) : trig_idx;
      automatic logic [AW-1:0] fm = first_max;
      automatic logic [AW-1:0] sm = second_max;

      if (first) trigger_valid <= 1'b0;

      case (ps)
        P_WAIT_LOW: if ({1'b0, sample_val} < thr_lo) ps = P_LOW;
        P_LOW: if ({1'b0, sample_val} >= thr_hi) begin
          ps = P_HIGH;
          pk_val <= sample_val;
          pk_idx <= sample_idx;
          if (!tf && sample_idx >= AW'(HALF) && sample_idx < AW'(DEPTH - HALF)) begin
            tf = 1'b1;
            ti = sample_idx;
          end
        end
        default: begin
          if (sample_val > pk_val) begin
            pk_val <= sample_val;
            pk_idx <= sample_idx;
          end
          if ({1'b0, sample_val} < thr_lo) begin
            ps = P_LOW;
            if (nm == 2'd0) begin
              fm = pk_idx;
              nm = 2'd1;
            end else if (nm == 2'd1) begin
              sm = pk_idx;
              nm = 2'd2;
            end
          end
        end
      endcase

      smax       <= nmax;
      smin       <= nmin;
      sum        <= nsum;
      pst        <= ps;
      n_max      <= nm;
      trig_found <= tf;
      trig_idx   <= ti;
      first_max  <= fm;
      second_max <= sm;

      if (sample_idx == AW'(DEPTH - 1)) begin
        trigger_addr  <= ti;
        trigger_valid <= 1'b1;
        cap_max       <= nmax;
        cap_min       <= nmin;
        cap_sum       <= nsum;
        cap_period    <= sm - fm;
        cap_period_ok <= (nm == 2'd2);
        cap_dt        <= dt;
        mid           <= sample_t'(({1'b0, nmax} + {1'b0, nmin}) >> 1);
      end
    end
  end

  // end-of-capture arithmetic and publishing
  logic [19:0] freq_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      mst       <= M_IDLE;
      div_start <= 1'b0;
      div_a     <= '0;
      div_b     <= '0;
      avg_code  <= '0;
      freq_q    <= '0;
      avg_mv    <= '0;
      vpp_mv    <= '0;
      freq_hz   <= '0;
      stats_stb <= 1'b0;
    end else begin
      div_start <= 1'b0;
      stats_stb <= 1'b0;
      case (mst)
        M_IDLE: if (sample_stb && sample_idx == AW'(DEPTH - 1)) mst <= M_DIV_AVG;
        M_DIV_AVG: begin
          div_a     <= cap_sum;
          div_b     <= 32'(DEPTH);
          div_start <= 1'b1;
          mst       <= M_WAIT_AVG;
        end
        M_WAIT_AVG: if (div_done) begin
          avg_code <= div_q;
          mst      <= M_DIV_FREQ;
        end
        M_DIV_FREQ: begin
          div_a     <= 32'd1_000_000;
          div_b     <= 32'(cap_period) * dt_sample_us(cap_dt);
          div_start <= cap_period_ok && cap_period != '0;
          freq_q    <= '0;
          mst       <= (cap_period_ok && cap_period != '0) ? M_WAIT_FREQ : M_PUBLISH;
        end
        M_WAIT_FREQ: if (div_done) begin
          freq_q <= div_q[19:0];
          mst    <= M_PUBLISH;
        end
        default: if (!write_warning) begin
          avg_mv    <= 16'(code_to_mv(int'(avg_code) - 2048));
          vpp_mv    <= 16'(code_to_mv(int'({1'b0, cap_max}) - int'({1'b0, cap_min})));
          freq_hz   <= freq_q;
          stats_stb <= 1'b1;
          mst       <= M_IDLE;
        end
      endcase
    end
  end

endmodule
