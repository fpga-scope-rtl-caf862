// tb_samples_bram: feeds converter results through the STS write strobe,
// checks the strobe to the math module, the freeze when full, the read port
// and re-arming.
module tb_samples_bram;
  import scope_pkg::*;
  localparam int DEPTH = 20;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, rst = 1;
  logic sts = 0, rearm = 0, full, stb;
  sample_t data = '0, val, rdata;
  logic [AW-1:0] idx, raddr = '0;
  int checks = 0, failures = 0;
  sample_t ref_mem [DEPTH];
  int n_stb = 0;

  samples_bram #(.DEPTH(DEPTH)) dut (
    .clk, .rst, .adc_sts(sts), .adc_data(data), .rearm, .full,
    .sample_stb(stb), .sample_idx(idx), .sample_val(val),
    .rd_addr(raddr), .rd_data(rdata));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one conversion: STS high for a while, data valid when it falls
  task automatic convert(sample_t v);
    sts <= 1'b1;
    repeat (4) @(posedge clk);
    data <= v;
    sts  <= 1'b0;
    repeat (6) @(posedge clk);
  endtask

  int exp_idx = 0;
  always @(posedge clk) if (!rst && stb) begin
    check(int'(idx) == exp_idx, $sformatf("strobe index %0d exp %0d", idx, exp_idx));
    check(val == ref_mem[idx], "strobe value");
    exp_idx = (exp_idx + 1) % DEPTH;
    n_stb++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int pass = 0; pass < 2; pass++) begin
      @(posedge clk);
      check(!full, "empty at start of capture");
      for (int i = 0; i < DEPTH; i++) begin
        ref_mem[i] = sample_t'($urandom);
        convert(ref_mem[i]);
        check(full == (i == DEPTH - 1), $sformatf("full flag after %0d", i));
      end
      // further conversions are ignored
      for (int i = 0; i < 3; i++) convert(12'hFFF);
      check(full, "stays full");
      check(n_stb == DEPTH * (pass + 1), $sformatf("strobes %0d", n_stb));
      for (int i = 0; i < DEPTH; i++) begin
        raddr <= AW'(i);
        @(posedge clk);
        @(posedge clk);
        check(rdata == ref_mem[i], $sformatf("read %0d: %h exp %h", i, rdata, ref_mem[i]));
      end
      rearm <= 1'b1;
      @(posedge clk);
      rearm <= 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
