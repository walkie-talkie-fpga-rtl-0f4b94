// tb_aes_shift_rows: checks ShiftRows and its inverse. The expected output is
// built independently from a 4x4 row/column picture of the state; random
// blocks also check that the inverse undoes the forward step.
module tb_aes_shift_rows;
  int checks = 0, failures = 0;
  logic [127:0] din, fwd, back;
  aes_shift_rows #(.INVERSE(1'b0)) dut_f (.din (din), .dout (fwd));
  aes_shift_rows #(.INVERSE(1'b1)) dut_i (.din (fwd), .dout (back));

  initial begin
    // bytes 00..0f in order: state (r,c) = 4c+r. After the left rotation row r
    // reads columns c+r: 00 05 0a 0f | 04 09 0e 03 | 08 0d 02 07 | 0c 01 06 0b
    din = 128'h000102030405060708090a0b0c0d0e0f;
    #1;
    checks++;
    if (fwd !== 128'h00050a0f04090e03080d02070c01060b) begin
      failures++; $display("shift_rows: %032h", fwd);
    end
    // FIPS-197 Appendix B, round 1: after SubBytes -> after ShiftRows
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1;
    checks++;
    if (fwd !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin
      failures++; $display("shift_rows FIPS: %032h", fwd);
    end
    for (int n = 0; n < 50; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (back !== din) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
