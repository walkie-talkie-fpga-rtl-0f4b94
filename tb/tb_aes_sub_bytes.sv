// tb_aes_sub_bytes: runs SubBytes and InvSubBytes on the FIPS-197 example
// state and on random blocks, comparing with the behavioural reference, and
// checks that done comes 19 cycles after start.
module tb_aes_sub_bytes;
  import tb_aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start;
  logic [127:0] din, dout_f, dout_i;
  logic done_f, done_i;
  aes_sub_bytes #(.INVERSE(1'b0)) dut_f (.clk, .rst, .start, .din, .dout (dout_f), .done (done_f));
  aes_sub_bytes #(.INVERSE(1'b1)) dut_i (.clk, .rst, .start, .din, .dout (dout_i), .done (done_i));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] x);
    int cyc = 0;
    @(negedge clk);
    din = x; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    din = '0;       // the block must have been latched at start
    cyc = 1;
    while (!done_f) begin @(negedge clk); cyc++; end
    checks += 3;
    if (cyc != 19) begin failures++; $display("latency %0d, expected 19", cyc); end
    if (dout_f !== sub_bytes(x, 0)) begin failures++; $display("sub %032h -> %032h", x, dout_f); end
    if (!done_i || dout_i !== sub_bytes(x, 1)) begin failures++; $display("inv sub %032h -> %032h", x, dout_i); end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(128'h193de3bea0f4e22b9ac68d2ae9f84808);
    checks++;
    if (dout_f !== 128'hd42711aee0bf98f1b8b45de51e415230) failures++;
    for (int n = 0; n < 20; n++) run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
