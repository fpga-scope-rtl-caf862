// menu_fsm: user interface for the delta-t and delta-V settings.
//
// Four debounced buttons: button one chooses delta-t for editing, button two
// chooses delta-V, and the up and down buttons then step the chosen setting
// (saturating at the ends of its table). Up always means more per division:
// a longer time or a larger voltage per grid square. Before either select
// button has been pressed, up and down do nothing. Only rising edges of the
// buttons count, so holding a button steps once.
// The FSM also draws the time-scale image: after reset and whenever delta-t
// changes it writes "T/DIV" and "<time per division> us" (8x8 glyphs, two
// lines) into the delta-t BRAM, pausing while write_warning is high.
//
// The two select buttons, the up/down editing and the drawing of the delta-t
// image are the document's; the reset settings (5 ms/div, 1 V/div), the
// saturation and the image layout are this design's.
//
// Interface: btn_dt, btn_dv, btn_up, btn_down (debounced, active high);
// dt, dv settings out; editing = current mode; write_warning in;
// we/waddr/wdata to the delta-t BRAM; img_busy while drawing.
// Timing: a setting changes one cycle after the button's rising edge is seen;
// the image redraw takes 2 * 9 * 64 = 1,152 pixel writes plus held cycles.
module menu_fsm
  import scope_pkg::*;
#(
  parameter int unsigned IMG_W = DT_W,
  parameter int unsigned AW    = $clog2(DT_W * DT_H)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          btn_dt,
  input  logic          btn_dv,
  input  logic          btn_up,
  input  logic          btn_down,
  input  logic          write_warning,
  output dt_idx_t       dt,
  output dv_idx_t       dv,
  output logic [1:0]    editing,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic          wdata,
  output logic          img_busy
);
  typedef enum logic [1:0] {E_NONE = 2'd0, E_DT = 2'd1, E_DV = 2'd2} edit_t;
  edit_t mode;

  logic [3:0] btn_q;
  logic up_e, down_e, dt_e, dv_e;

  always_comb begin
    dt_e   = btn_dt   && !btn_q[0];
    dv_e   = btn_dv   && !btn_q[1];
    up_e   = btn_up   && !btn_q[2];
    down_e = btn_down && !btn_q[3];
  end

  assign editing = mode;

  logic pending, start;

  always_ff @(posedge clk) begin
    if (rst) begin
      mode    <= E_NONE;
      btn_q   <= '1;
      dt      <= DT_RESET;
      dv      <= DV_RESET;
      pending <= 1'b1;
      start   <= 1'b0;
    end else begin
      btn_q <= {btn_down, btn_up, btn_dv, btn_dt};
      start <= 1'b0;
      if (pending && !img_busy && !start) begin
        start   <= 1'b1;
        pending <= 1'b0;
      end
      if (dt_e) mode <= E_DT;
      else if (dv_e) mode <= E_DV;
      else if (up_e && !down_e) begin
        if (mode == E_DT && dt != dt_idx_t'(N_DT - 1)) begin
          dt      <= dt + 1'b1;
          pending <= 1'b1;
        end
        if (mode == E_DV && dv != dv_idx_t'(N_DV - 1)) dv <= dv + 1'b1;
      end else if (down_e && !up_e) begin
        if (mode == E_DT && dt != '0) begin
          dt      <= dt - 1'b1;
          pending <= 1'b1;
        end
        if (mode == E_DV && dv != '0) dv <= dv - 1'b1;
      end
    end
  end

  // delta-t image text
  logic [23:0] bcd_t;
  bin2bcd #(.W(17), .DIGITS(6)) u_bcd (.bin(17'(dt_div_us(dt))), .bcd(bcd_t));

  char_t text [2][9];
  always_comb begin
    logic lead;
    for (int l = 0; l < 2; l++)
      for (int c = 0; c < 9; c++) text[l][c] = " ";
    text[0][0:4] = '{"T", "/", "D", "I", "V"};
    lead = 1'b1;
    for (int d = 5; d >= 0; d--) begin
      if (bcd_t[4*d +: 4] != 4'd0 || d == 0) lead = 1'b0;
      text[1][5 - d] = lead ? char_t'(" ") : char_t'(8'h30 + 8'(bcd_t[4*d +: 4]));
    end
    text[1][7:8] = '{"u", "s"};
  end

  text_writer #(
    .IMG_W(IMG_W), .AW(AW), .LINES(2), .COLS(9),
    .SCALE_SH(0), .X0(4), .Y0(6), .PITCH(14)
  ) u_writer (
    .clk, .rst, .start, .text, .hold(write_warning),
    .busy(img_busy), .we, .waddr, .wdata
  );

endmodule
