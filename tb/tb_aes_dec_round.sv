// tb_aes_dec_round: runs single AES decryption rounds, normal and last, on
// random states and keys and compares with the behavioural reference built
// from the individual steps; checks done comes 20 cycles after start.
module tb_aes_dec_round;
  import tb_aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, start, last, done;
  logic [127:0] din, round_key, dout;
  aes_dec_round dut (.clk, .rst, .start, .last, .din, .round_key, .dout, .done);

  function automatic logic [127:0] ref_round(logic [127:0] s, logic [127:0] k, bit lst);
    s = sub_bytes(shift_rows(s, 1), 1) ^ k;
    if (!lst) s = mix_columns(s, 1);
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] s, logic [127:0] k, bit lst);
    int cyc;
    @(negedge clk);
    din = s; round_key = k; last = lst; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != 20) begin failures++; $display("latency %0d, expected 20", cyc); end
    if (dout !== ref_round(s, k, lst)) begin
      failures++; $display("round(%032h, last=%0d) = %032h", s, lst, dout);
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; last = 1'b0; din = '0; round_key = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < 20; n++)
      run({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
