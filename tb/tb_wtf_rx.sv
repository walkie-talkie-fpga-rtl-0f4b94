// tb_wtf_rx: drives the receiver with frames produced here from the line code
// (sync 784 low + 784 high, bits 392 low + 196/392 high, line idle low), with
// every level stretched or shortened by up to 20 cycles and edges placed off
// the clock edge, as from a board running on its own clock. Checks that good
// frames come back as the sent block, and that a frame with a malformed pulse,
// a frame with an over-long low and a frame broken off halfway are each
// dropped with an error pulse and no block.
module tb_wtf_rx;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, line, block_valid, error;
  logic [127:0] block_out;
  wtf_rx dut (.clk, .rst, .line, .block_out, .block_valid, .error);

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int blocks = 0, errors = 0;
  logic [127:0] last_block;
  always @(posedge clk) if (!rst) begin
    if (block_valid) begin blocks++; last_block = block_out; end
    if (error) errors++;
  end

  task automatic level(logic v, int cycles);
    line = v;
    #(10 * (cycles + $urandom_range(0, 40) - 20));
  endtask

  // fault: 0 none, 1 a 60-cycle pulse at bit 70, 2 a 700-cycle low at bit 40,
  // 3 frame stops after 50 bits
  task automatic frame(logic [127:0] b, int fault);
    level(1'b0, 784);
    level(1'b1, 784);
    for (int i = 127; i >= 0; i--) begin
      if (fault == 3 && i == 77) break;
      level(1'b0, (fault == 2 && i == 87) ? 700 : 392);
      level(1'b1, (fault == 1 && i == 57) ? 60 : (b[i] ? 392 : 196));
    end
    line = 1'b0;
    #(10 * 2000);
  endtask

  task automatic expect_block(logic [127:0] b, int nb, int ne);
    checks += 2;
    if (blocks != nb) begin failures++; $display("%0d blocks, expected %0d", blocks, nb); end
    else if (last_block !== b) begin failures++; $display("got %032h expected %032h", last_block, b); end
    if (errors != ne) begin failures++; $display("%0d errors, expected %0d", errors, ne); end
  endtask

  initial begin
    logic [127:0] b;
    rst = 1'b1; line = 1'b0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    #3;
    b = {$urandom, $urandom, $urandom, $urandom};
    frame(b, 0);             expect_block(b, 1, 0);
    frame('1, 0);            expect_block('1, 2, 0);
    frame(b ^ 128'h5, 1);    expect_block('1, 2, 1);
    frame(b, 2);             expect_block('1, 2, 2);
    frame(b, 3);             expect_block('1, 2, 3);
    b = {$urandom, $urandom, $urandom, $urandom};
    frame(b, 0);             expect_block(b, 3, 3);
    frame(128'h0, 0);        expect_block(128'h0, 4, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
