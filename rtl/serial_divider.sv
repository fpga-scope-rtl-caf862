// serial_divider: unsigned restoring divider, one quotient bit per cycle.
//
// On `start` it latches dividend and divisor; W cycles later `done` pulses for
// one cycle with the quotient (truncated). A zero divisor gives an all-ones
// quotient. Used by the math module for the average and the frequency.
//
// Interface: start (pulse), dividend, divisor -> busy, done (pulse), quotient.
// Timing: done arrives W + 1 cycles after start.
module serial_divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);
  logic [W-1:0]          rem;
  logic [W-1:0]          dvs;
  logic [W-1:0]          q;
  logic [$clog2(W+1)-1:0] n;
  logic [W:0]            trial;

  always_comb trial = {rem[W-1:0], q[W-1]} - {1'b0, dvs};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      quotient <= '0;
      rem      <= '0;
      dvs      <= '0;
      q        <= '0;
      n        <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        rem  <= '0;
        q    <= dividend;
        dvs  <= divisor;
        n    <= '0;
      end else if (busy) begin
        if (!trial[W]) begin
          rem <= trial[W-1:0];
          q   <= {q[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-2:0], q[W-1]};
          q   <= {q[W-2:0], 1'b0};
        end
        if (n == ($clog2(W+1))'(W - 1)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= !trial[W] ? {q[W-2:0], 1'b1} : {q[W-2:0], 1'b0};
        end
        n <= n + 1'b1;
      end
    end
  end

endmodule
