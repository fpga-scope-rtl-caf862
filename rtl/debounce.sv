// debounce: removes contact bounce from a bank of push buttons.
//
// Each raw input is first passed through a two-flop synchroniser. The clean
// output only takes the synchronised value after that value has stayed
// unchanged for DELAY consecutive clock cycles; any change restarts the count.
// Reset clears the outputs (buttons released).
//
// The button bank is debounced before the menu FSM, as the block diagram
// shows; the counting method and the 10 ms default (650,000 cycles of the
// 65 MHz pixel clock) are this design's choice.
//
// Interface: btn_in[N] raw, active high; btn_out[N] debounced, active high.
// Timing: btn_out follows a stable input DELAY + 3 cycles later.
module debounce #(
  parameter int unsigned N     = 4,
  parameter int unsigned DELAY = 650_000
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] btn_in,
  output logic [N-1:0] btn_out
);
  localparam int unsigned CW = $clog2(DELAY + 1);

  logic [N-1:0] sync0, sync1;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync0 <= '0;
      sync1 <= '0;
    end else begin
      sync0 <= btn_in;
      sync1 <= sync0;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_btn
    logic [CW-1:0] cnt;
    always_ff @(posedge clk) begin
      if (rst) begin
        cnt        <= '0;
        btn_out[i] <= 1'b0;
      end else if (sync1[i] == btn_out[i]) begin
        cnt <= '0;
      end else if (cnt == CW'(DELAY - 1)) begin
        cnt        <= '0;
        btn_out[i] <= sync1[i];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
