// tb_block_create: sends 64 random bytes with random gaps and checks that
// exactly four blocks come out, each on the 16th byte's following cycle, with
// the first byte of the group in bits [127:120].
module tb_block_create;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, din_valid, block_valid;
  logic [7:0] din;
  logic [127:0] block_out, exp;
  block_create dut (.clk, .rst, .din, .din_valid, .block_out, .block_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int blocks = 0;
  initial begin
    rst = 1'b1; din_valid = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < 64; n++) begin
      @(negedge clk);
      din = 8'($urandom); din_valid = 1'b1;
      exp[127 - 8*(n % 16) -: 8] = din;
      @(negedge clk);
      din_valid = 1'b0;
      checks++;
      if (n % 16 == 15) begin
        blocks++;
        if (!block_valid || block_out !== exp) begin
          failures++; $display("block %0d: %032h expected %032h", blocks, block_out, exp);
        end
      end else if (block_valid) begin
        failures++; $display("early block at byte %0d", n);
      end
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    checks++;
    if (blocks != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
