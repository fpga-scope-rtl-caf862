// tb_waveform_bram: checks the double buffer: writes always go to the bank
// not selected for reading, reads come from the selected bank through the
// multiplexer, and toggling select exchanges the roles, so an image drawn
// while hidden is shown after the swap and the shown one is left untouched.
module tb_waveform_bram;
  import scope_pkg::*;
  localparam int DEPTH = WAVE_W * WAVE_H;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  logic select = 0, we = 0, wdata = 0, re = 0, rdata;
  logic [AW-1:0] waddr = '0, raddr = '0;
  int checks = 0, failures = 0;
  bit bank [2][DEPTH];     // [0] = bank 1 (shown when select = 0), [1] = bank 2

  waveform_bram dut (.clk, .select, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 4; round++) begin
      int hidden, shown_ok, shown_n;
      hidden = (select == 1'b0) ? 1 : 0;
      shown_ok = 0;
      shown_n = 0;
      // draw a full image into the hidden bank while reading the shown one
      for (int i = 0; i < DEPTH; i++) begin
        automatic int a = int'($urandom % DEPTH);
        bank[hidden][i] = ((i / 7 + round) % 3) == 0;
        we <= 1'b1;
        waddr <= AW'(i);
        wdata <= bank[hidden][i];
        re <= 1'b1;
        raddr <= AW'(a);
        @(posedge clk);
        #1;
        begin
          shown_n++;
          if (rdata == bank[1 - hidden][a]) shown_ok++;
        end
      end
      we <= 1'b0;
      check(shown_ok == shown_n, $sformatf("round %0d: shown bank undisturbed (%0d/%0d)", round, shown_ok, shown_n));
      // swap and read the new image
      select <= ~select;
      @(posedge clk);
      for (int k = 0; k < 3000; k++) begin
        automatic int a = int'($urandom % DEPTH);
        raddr <= AW'(a);
        @(posedge clk);
        #1 check(rdata == bank[hidden][a], $sformatf("round %0d: new image pixel %0d", round, a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
