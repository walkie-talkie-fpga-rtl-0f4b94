// tb_decimate: sends strobed random samples with random gaps and checks that
// exactly every 4th one (the last of each group of 4) comes out, one cycle
// after its strobe, and nothing else.
module tb_decimate;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, din_valid, dout_valid;
  logic signed [15:0] din, dout;
  decimate dut (.clk, .rst, .din, .din_valid, .dout, .dout_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int outs = 0;
  initial begin
    rst = 1'b1; din_valid = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 1; n <= 400; n++) begin
      @(negedge clk);
      din = 16'($urandom); din_valid = 1'b1;
      @(negedge clk);
      din_valid = 1'b0;
      checks++;
      if (n % 4 == 0) begin
        outs++;
        if (!dout_valid || dout !== din) begin failures++; $display("sample %0d not passed", n); end
      end else if (dout_valid) begin
        failures++; $display("sample %0d passed", n);
      end
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        checks++;
        if (dout_valid) failures++;
      end
    end
    checks++;
    if (outs != 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
