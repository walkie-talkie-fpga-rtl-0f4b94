// tb_aes_key_expand: expands the FIPS-197 Appendix A.1 key and random keys and
// compares all 11 round keys with the reference expansion (and round keys 1
// and 10 with the published values); checks done comes 71 cycles after start.
module tb_aes_key_expand;
  import tb_aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start, busy, done;
  logic [127:0] key, round_key;
  logic [3:0] round_idx;
  aes_key_expand dut (.clk, .rst, .start, .key, .round_idx, .round_key, .busy, .done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] k);
    keys_t exp = expand(k);
    int cyc;
    @(negedge clk);
    key = k; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 71) begin failures++; $display("latency %0d, expected 71", cyc); end
    for (int r = 0; r <= 10; r++) begin
      round_idx = 4'(r);
      #1;
      checks++;
      if (round_key !== exp[r]) begin failures++; $display("key %0d: %032h expected %032h", r, round_key, exp[r]); end
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; key = '0; round_idx = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    round_idx = 4'd1; #1 checks++;
    if (round_key !== 128'ha0fafe1788542cb123a339392a6c7605) failures++;
    round_idx = 4'd10; #1 checks++;
    if (round_key !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
    for (int n = 0; n < 5; n++) run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
