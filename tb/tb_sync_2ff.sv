// tb_sync_2ff: drives a random bit stream and checks that q equals d from two
// clock edges earlier, and that reset clears the chain.
module tb_sync_2ff;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, d, q;
  sync_2ff dut (.clk, .rst, .d, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic hist [3];
  initial begin
    rst = 1'b1; d = 1'b1;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (q !== 1'b0) failures++;
    rst = 1'b0;
    hist = '{1'b0, 1'b0, 1'b0};
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      d = 1'($urandom);
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      #1;
      if (n >= 2) begin
        checks++;
        if (q !== hist[1]) begin failures++; $display("n=%0d q=%0d expected %0d", n, q, hist[1]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
