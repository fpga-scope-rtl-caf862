// scaling_module: turns one capture into the waveform image.
//
// Once the capture buffer is full and the math module has found the trigger
// address, the module draws the hidden waveform bank column by column. The
// window is centred on the trigger: it starts HALF / zoom samples before it.
// For each of the WIDTH columns it reads one sample, scales it vertically,
// and writes all HEIGHT pixels of the column:
//   row = HEIGHT/2 - ((sample - 2048) * gain(delta-V)) >>> 12,
// clipped to the image, so full ADC range spans gain rows. A pixel is lit if
// it lies between the previous and the current column's rows (joining the
// samples into a continuous trace) or on a grid line (every GRID_Y rows and
// every GRID_X columns). Horizontally each sample covers zoom(delta-t)
// columns; slower delta-t settings are handled by the ADC's sample rate.
// When the image is finished, `rearm` starts the next capture and
// `render_done` stays high until the VGA controller has shown the new bank
// (`swapped`); only then is the next image drawn.
//
// The vertical and horizontal scaling by delta-V and delta-t, the use of the
// trigger address and the fixed grid lines are the document's; the formulas,
// the centring, the column-by-column order and the handshakes are this
// design's choices.
//
// Interface: cap_full, trigger_addr/trigger_valid in; rd_addr/rd_data to the
// samples BRAM (one cycle read latency); we/waddr/wdata to the waveform BRAM;
// rearm to the samples BRAM; render_done/swapped with the VGA controller.
// Timing: WIDTH * (HEIGHT + 2) cycles per image.
module scaling_module
  import scope_pkg::*;
#(
  parameter int unsigned WIDTH  = WAVE_W,
  parameter int unsigned HEIGHT = WAVE_H,
  parameter int unsigned DEPTH  = CAPTURE_DEPTH,
  parameter int unsigned HALF   = SCREEN_SAMPLES / 2,
  parameter int unsigned AW     = $clog2(WIDTH * HEIGHT)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  dt_idx_t                  dt,
  input  dv_idx_t                  dv,
  input  logic                     cap_full,
  input  logic [$clog2(DEPTH)-1:0] trigger_addr,
  input  logic                     trigger_valid,
  output logic [$clog2(DEPTH)-1:0] rd_addr,
  input  sample_t                  rd_data,
  output logic                     we,
  output logic [AW-1:0]            waddr,
  output logic                     wdata,
  output logic                     rearm,
  output logic                     render_done,
  input  logic                     swapped
);
  localparam int unsigned CAW = $clog2(DEPTH);
  localparam int unsigned XW  = $clog2(WIDTH);
  localparam int unsigned YW  = $clog2(HEIGHT);

  typedef enum logic [2:0] {S_WAIT_CAP, S_READ, S_CALC, S_DRAW, S_DONE} state_t;
  state_t st;

  logic [CAW-1:0] sidx;
  logic [XW-1:0]  x, xmod;
  logic [YW-1:0]  y, ymod;
  logic [3:0]     zoom, zc;
  dv_idx_t        dv_q;
  logic [YW-1:0]  prev_y, ylo, yhi;
  logic [YW-1:0]  cur_y;

  // vertical scaling of the sample just read
  always_comb begin
    automatic int dy = ((int'({1'b0, rd_data}) - 2048) * int'(dv_gain(dv_q))) >>> 12;
    automatic int r  = int'(HEIGHT / 2) - dy;
    if (r < 0) cur_y = '0;
    else if (r > int'(HEIGHT - 1)) cur_y = YW'(HEIGHT - 1);
    else cur_y = YW'(r);
  end

  assign rd_addr = sidx;
  assign we      = (st == S_DRAW);
  assign wdata   = (y >= ylo && y <= yhi) || (ymod == '0) || (xmod == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= S_WAIT_CAP;
      sidx        <= '0;
      x           <= '0;
      xmod        <= '0;
      y           <= '0;
      ymod        <= '0;
      zoom        <= 4'd1;
      zc          <= '0;
      dv_q        <= '0;
      prev_y      <= '0;
      ylo         <= '0;
      yhi         <= '0;
      waddr       <= '0;
      rearm       <= 1'b0;
      render_done <= 1'b0;
    end else begin
      rearm <= 1'b0;
      case (st)
        S_WAIT_CAP: if (cap_full && trigger_valid) begin
          automatic int unsigned z = dt_zoom(dt);
          zoom <= 4'(z);
          dv_q <= dv;
          sidx <= CAW'(int'(trigger_addr) - int'(HALF / z));
          zc   <= '0;
          x    <= '0;
          xmod <= '0;
          st   <= S_READ;
        end
        S_READ: st <= S_CALC;
        S_CALC: begin
          automatic logic [YW-1:0] p = (x == '0) ? cur_y : prev_y;
          ylo    <= (p < cur_y) ? p : cur_y;
          yhi    <= (p < cur_y) ? cur_y : p;
          prev_y <= cur_y;
          y      <= '0;
          ymod   <= '0;
          waddr  <= AW'(x);
          st     <= S_DRAW;
        end
        S_DRAW: begin
          waddr <= waddr + AW'(WIDTH);
          y     <= y + 1'b1;
          ymod  <= (ymod == YW'(GRID_Y - 1)) ? '0 : ymod + 1'b1;
          if (y == YW'(HEIGHT - 1)) begin
            xmod <= (xmod == XW'(GRID_X - 1)) ? '0 : xmod + 1'b1;
            if (zc == zoom - 1'b1) begin
              zc   <= '0;
              sidx <= sidx + 1'b1;
            end else begin
              zc <= zc + 1'b1;
            end
            if (x == XW'(WIDTH - 1)) begin
              st          <= S_DONE;
              rearm       <= 1'b1;
              render_done <= 1'b1;
            end else begin
              x  <= x + 1'b1;
              st <= S_READ;
            end
          end
        end
        default: if (swapped) begin
          render_done <= 1'b0;
          st          <= S_WAIT_CAP;
        end
      endcase
    end
  end

  // Every write stays inside the image, and drawing starts only on a
  // complete capture with a valid trigger.
  a_start_on_capture: assert property (@(posedge clk) disable iff (rst)
    (st == S_WAIT_CAP && !(cap_full && trigger_valid)) |=> (st == S_WAIT_CAP));
  a_write_in_range: assert property (@(posedge clk) disable iff (rst)
    we |-> (int'(waddr) < WIDTH * HEIGHT));

endmodule
