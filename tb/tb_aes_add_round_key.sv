// tb_aes_add_round_key: checks the key addition on the FIPS-197 worked example
// (input XOR cipher key) and on random operands against a bit-by-bit XOR.
module tb_aes_add_round_key;
  int checks = 0, failures = 0;
  logic [127:0] st, k, dout, exp;
  aes_add_round_key dut (.state (st), .round_key (k), .dout (dout));

  initial begin
    st = 128'h3243f6a8885a308d313198a2e0370734;
    k  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1 checks++;
    if (dout !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) failures++;
    for (int n = 0; n < 50; n++) begin
      st = {$urandom, $urandom, $urandom, $urandom};
      k  = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 128; b++) exp[b] = (st[b] != k[b]);
      #1 checks++;
      if (dout !== exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
