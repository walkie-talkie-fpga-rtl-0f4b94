// tb_wtf_tx: sends random blocks and an all-ones block and records the line
// as a list of level lengths, which must equal the code worked out here:
// 784 low, 784 high, then per bit (MSB first) 392 low and 196 (0) or 392 (1)
// high, the line low again afterwards. Checks done pulses once per frame, and
// that a whole frame fits in one block period (16 samples at 12 kHz, about
// 1.34 ms = 130,666 cycles at 98 MHz); the all-ones frame takes 1040 us.
// A second instance with NBITS = 8 runs the one-byte-per-frame variant: 8'hFF
// must take 16 + 8*8 = 80 us (7840 cycles), inside one 12 kHz sample period
// (83 us = 8166 cycles).
module tb_wtf_tx;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start, busy, done, line;
  logic [127:0] block_in;
  wtf_tx dut (.clk, .rst, .block_in, .start, .busy, .done, .line);

  logic       start8, busy8, done8, line8;
  logic [7:0] byte_in;
  wtf_tx #(.NBITS(8)) dut8 (.clk, .rst, .block_in (byte_in), .start (start8), .busy (busy8),
                             .done (done8), .line (line8));

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [127:0] b);
    int runs [$];
    int exp [$];
    int len, total, dones;
    logic cur;
    exp.push_back(784);
    exp.push_back(784);
    for (int i = 127; i >= 0; i--) begin
      exp.push_back(392);
      exp.push_back(b[i] ? 392 : 196);
    end
    @(negedge clk);
    block_in = b; start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    block_in = '0;
    cur = 1'b0; len = 1; total = 1; dones = 0;
    forever begin
      @(posedge clk);
      #1;
      if (done) dones++;
      if (!busy) break;
      total++;
      if (line == cur) len++;
      else begin runs.push_back(len); len = 1; cur = line; end
    end
    runs.push_back(len);
    checks += 4;
    if (line !== 1'b0) failures++;
    if (dones != 1) begin failures++; $display("%0d done pulses", dones); end
    if (total > 130666) begin failures++; $display("frame takes %0d cycles", total); end
    if (runs.size() != exp.size()) begin
      failures++; $display("%0d levels, expected %0d", runs.size(), exp.size());
    end else begin
      for (int i = 0; i < exp.size(); i++) begin
        checks++;
        if (runs[i] != exp[i]) begin failures++; $display("level %0d lasts %0d, expected %0d", i, runs[i], exp[i]); end
      end
    end
    if (b == '1) begin
      checks++;
      if (total != 101920) begin failures++; $display("all-ones frame %0d cycles", total); end
    end
    repeat (50) @(posedge clk);
    checks++;
    if (line !== 1'b0) failures++;   // idles low
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; block_in = '0; start8 = 1'b0; byte_in = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    begin
      int t8, highs;
      @(negedge clk);
      byte_in = 8'hff; start8 = 1'b1;
      @(negedge clk);
      start8 = 1'b0;
      t8 = 0; highs = 0;
      while (busy8) begin
        t8++;
        if (line8) highs++;
        @(negedge clk);
      end
      checks += 2;
      if (t8 != 7840) begin failures++; $display("8'hFF frame %0d cycles, expected 7840", t8); end
      if (t8 > 8166 || highs != 784 + 8 * 392) begin failures++; $display("8'hFF high time %0d", highs); end
    end
    send({$urandom, $urandom, $urandom, $urandom});
    send('1);
    send(128'h0);
    send({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
