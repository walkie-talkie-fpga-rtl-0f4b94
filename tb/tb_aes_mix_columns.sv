// tb_aes_mix_columns: checks MixColumns on the well-known test columns
// (db 13 53 45 -> 8e 4d a1 bc, f2 0a 22 5c -> 9f dc 58 9d, c6 c6 c6 c6 and
// 01 01 01 01 unchanged), on one state of the FIPS-197 worked example, and
// that InvMixColumns undoes it for random states.
module tb_aes_mix_columns;
  int checks = 0, failures = 0;
  logic [127:0] din, fwd, back;
  aes_mix_columns #(.INVERSE(1'b0)) dut_f (.din (din), .dout (fwd));
  aes_mix_columns #(.INVERSE(1'b1)) dut_i (.din (fwd), .dout (back));

  task automatic expect_eq(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %032h expected %032h", what, got, exp); end
  endtask

  initial begin
    din = 128'hdb135345f20a225cc6c6c6c601010101;
    #1 expect_eq(fwd, 128'h8e4da1bc9fdc589dc6c6c6c601010101, "test columns");
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5;     // FIPS-197 App. B round 1
    #1 expect_eq(fwd, 128'h046681e5e0cb199a48f8d37a2806264c, "FIPS round 1");
    for (int n = 0; n < 50; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1 expect_eq(back, din, "inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
