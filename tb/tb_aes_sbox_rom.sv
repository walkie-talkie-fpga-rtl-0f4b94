// tb_aes_sbox_rom: checks all 256 entries of the S-box and inverse S-box ROMs
// against values computed here from the definition (GF(2^8) inverse followed
// by the affine map), presenting one address per cycle and expecting each
// result exactly two cycles later.
module tb_aes_sbox_rom;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] addr, data_f, data_i;
  aes_sbox_rom #(.INVERSE(1'b0)) dut_f (.clk (clk), .addr (addr), .data (data_f));
  aes_sbox_rom #(.INVERSE(1'b1)) dut_i (.clk (clk), .addr (addr), .data (data_i));

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction
  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] b = 0;
    for (int y = 1; y < 256; y++) if (x != 0 && mul(x, 8'(y)) == 8'h01) b = 8'(y);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  logic [7:0] fwd [256];
  logic [7:0] inv [256];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) fwd[i] = ref_sbox(8'(i));
    for (int i = 0; i < 256; i++) inv[fwd[i]] = 8'(i);
    // spot values of the standard table
    checks++; if (fwd[8'h00] != 8'h63 || fwd[8'h53] != 8'hed || fwd[8'h6f] != 8'ha8) failures++;
    addr = 0;
    for (int i = 0; i < 258; i++) begin
      @(negedge clk);
      if (i < 256) addr = 8'(i);
      if (i >= 2) begin
        checks += 2;
        if (data_f !== fwd[i-2]) begin failures++; $display("sbox[%02x] = %02x, expected %02x", i-2, data_f, fwd[i-2]); end
        if (data_i !== inv[i-2]) begin failures++; $display("inv_sbox[%02x] = %02x, expected %02x", i-2, data_i, inv[i-2]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
