// tb_numbers_bram: random writes and reads of the full-size image memory against a
// reference array; checks the one-cycle read latency, that rdata holds while
// re is low, that reads and writes may happen in the same cycle, and that
// the last pixel of the image is addressable.
module tb_numbers_bram;
  import scope_pkg::*;
  localparam int DEPTH = NUM_W * NUM_H;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  logic we = 0, wdata = 0, re = 0, rdata;
  logic [AW-1:0] waddr = '0, raddr = '0;
  int checks = 0, failures = 0;
  bit ref_mem [DEPTH];

  numbers_bram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the image starts blank
    for (int i = 0; i < DEPTH; i += 97) begin
      re <= 1'b1;
      raddr <= AW'(i);
      @(posedge clk);
      #1 check(rdata == 1'b0, "blank after configuration");
    end
    // fill with a pattern, including the last pixel
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = 1'($urandom);
      we <= 1'b1;
      waddr <= AW'(i);
      wdata <= ref_mem[i];
      @(posedge clk);
    end
    we <= 1'b0;
    for (int k = 0; k < 4000; k++) begin
      automatic int a = (k == 0) ? DEPTH - 1 : int'($urandom % DEPTH);
      automatic int b = int'($urandom % DEPTH);
      automatic bit v = 1'($urandom);
      re <= 1'b1;
      raddr <= AW'(a);
      we <= 1'b1;
      waddr <= AW'(b);
      wdata <= v;
      @(posedge clk);
      #1;
      if (a != b) check(rdata == ref_mem[a], $sformatf("read %0d", a));
      ref_mem[b] = v;
      // hold: re low keeps the last output
      re <= 1'b0;
      we <= 1'b0;
      raddr <= AW'($urandom % DEPTH);
      waddr <= AW'(a);
      wdata <= !ref_mem[a];
      @(posedge clk);
      #1 if (a != b) check(rdata == ref_mem[a], "rdata held while re is low");
      // the pixel offered with we low must be unchanged
      re <= 1'b1;
      raddr <= AW'(a);
      @(posedge clk);
      #1 check(rdata == ref_mem[a], "no write while we is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
