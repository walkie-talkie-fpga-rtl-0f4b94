// tb_block_destroy: plays out blocks one byte per tick (every 40 cycles) and
// checks every byte and its order against the blocks sent. The second block
// arrives while the first is still playing and must follow it seamlessly;
// ticks with nothing left must produce nothing.
module tb_block_destroy;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, block_valid, tick, dout_valid;
  logic [127:0] block_in;
  logic [7:0] dout;
  block_destroy dut (.clk, .rst, .block_in, .block_valid, .tick, .dout, .dout_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] q [$];
  int cyc = 0, got = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    tick <= (cyc % 40 == 39);
  end

  always @(negedge clk) begin
    if (!rst && dout_valid) begin
      checks++;
      got++;
      if (q.size() == 0) begin failures++; $display("unexpected byte %02x", dout); end
      else begin
        automatic logic [7:0] e = q.pop_front();
        if (dout !== e) begin failures++; $display("byte %0d = %02x, expected %02x", got, dout, e); end
      end
    end
  end

  task automatic send(logic [127:0] b);
    @(negedge clk);
    block_in = b; block_valid = 1'b1;
    for (int k = 0; k < 16; k++) q.push_back(b[127-8*k -: 8]);
    @(negedge clk);
    block_valid = 1'b0;
    block_in = '0;
  endtask

  initial begin
    rst = 1'b1; block_valid = 1'b0; block_in = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    send({$urandom, $urandom, $urandom, $urandom});
    repeat (300) @(posedge clk);          // about 7 bytes played
    send({$urandom, $urandom, $urandom, $urandom});
    repeat (40 * 40) @(posedge clk);       // long enough for both, then idle ticks
    send(128'h00112233445566778899aabbccddeeff);
    repeat (40 * 20) @(posedge clk);
    checks += 2;
    if (got != 48) begin failures++; $display("%0d bytes played, expected 48", got); end
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
