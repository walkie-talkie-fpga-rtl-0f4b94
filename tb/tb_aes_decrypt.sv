// tb_aes_decrypt: decrypts the FIPS-197 Appendix B and C.1 ciphertexts and random
// blocks under random keys, comparing with the published plaintexts and the
// behavioural reference. Checks the latency (282 cycles) against the 800-cycle
// budget for one block, and that busy covers the operation.
module tb_aes_decrypt;
  import tb_aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start, busy, done;
  logic [127:0] key, din, dout;
  aes_decrypt dut (.clk, .rst, .start, .key, .din, .dout, .busy, .done);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] k, logic [127:0] pt, logic [127:0] exp);
    int cyc;
    @(negedge clk);
    key = k; din = pt; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    din = '0;
    cyc = 1;
    checks++;
    if (!busy) failures++;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 3;
    if (cyc != 282) begin failures++; $display("latency %0d, expected 282", cyc); end
    if (cyc >= 800) failures++;
    if (dout !== exp) begin failures++; $display("dec(%032h) = %032h expected %032h", pt, dout, exp); end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; key = '0; din = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32,
        128'h3243f6a8885a308d313198a2e0370734);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        128'h00112233445566778899aabbccddeeff);
    for (int n = 0; n < 4; n++) begin
      automatic logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, decrypt(p, k));
      checks++;
      if (encrypt(dout, k) !== p) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
