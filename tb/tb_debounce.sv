// tb_debounce: checks that bouncing inputs are ignored and that a stable
// change reaches the output exactly DELAY + 2 cycles after it is applied.
module tb_debounce;
  localparam int DELAY = 10;
  logic clk = 0, rst = 1;
  logic [1:0] bin = '0, bout;
  int checks = 0, failures = 0;

  debounce #(.N(2), .DELAY(DELAY)) dut (.clk, .rst, .btn_in(bin), .btn_out(bout));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    check(bout == 2'b00, "idle after reset");
    // bounce button 0 faster than DELAY
    for (int i = 0; i < 10; i++) begin
      bin[0] <= ~bin[0];
      repeat (3) @(posedge clk);
      check(bout[0] == 1'b0, "bounce ignored");
    end
    bin[0] <= 1'b0;
    repeat (DELAY + 5) @(posedge clk);
    check(bout == 2'b00, "still released after bounce");
    // clean press on button 1: measure latency
    for (int trial = 0; trial < 2; trial++) begin
      bin[1] <= (trial == 0);
      lat = 0;
      do begin
        @(posedge clk);
        #1 lat++;
      end while (bout[1] != (trial == 0) && lat < 100);
      check(lat == DELAY + 2, $sformatf("latency %0d", lat));
      check(bout[0] == 1'b0, "other button unaffected");
    end
    // random presses
    for (int k = 0; k < 20; k++) begin
      logic v;
      v = 1'($urandom);
      bin[0] <= v;
      repeat (DELAY + 4) @(posedge clk);
      check(bout[0] == v, "random stable press");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
