// tb_delta_sigma: holds the input at several values and counts the ones in
// the output over 2560 cycles; a first-order modulator gives a density of
// (x + 128) / 256, so the count must be within 1 of 10 * (x + 128). Also
// checks that the ones are spread out: at x = 0 the output must alternate.
module tb_delta_sigma;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, dout;
  logic signed [7:0] din;
  delta_sigma dut (.clk, .rst, .din, .dout);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vals [8] = '{-128, -100, -37, 0, 1, 50, 100, 127};
  initial begin
    rst = 1'b1; din = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    foreach (vals[i]) begin
      automatic int ones = 0;
      automatic int exp;
      @(negedge clk);
      din = 8'(vals[i]);
      repeat (256) @(negedge clk);        // let the register settle into the new pattern
      for (int c = 0; c < 2560; c++) begin
        @(negedge clk);
        ones += dout;
      end
      exp = 10 * (vals[i] + 128);
      checks++;
      if (ones < exp - 1 || ones > exp + 1) begin failures++; $display("x=%0d: %0d ones, expected %0d", vals[i], ones, exp); end
    end
    din = 8'sd0;
    repeat (4) @(negedge clk);
    for (int c = 0; c < 64; c++) begin
      automatic logic prev = dout;
      @(negedge clk);
      checks++;
      if (dout == prev) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
