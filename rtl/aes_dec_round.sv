// aes_dec_round: one AES decryption round (FIPS-197 inverse cipher order):
// InvShiftRows, InvSubBytes, AddRoundKey, then InvMixColumns, which is skipped
// when last is set (the final round). InvShiftRows is combinational in front of
// the sequential InvSubBytes (one shared inverse S-box block RAM); the key
// addition and InvMixColumns act on its result, registered into dout.
// din and round_key must stay stable from start until done, which pulses 20
// cycles after start.
// A decryption round made of the inverse steps follows the original design; the
// FIPS-197 step order and the handshake are chosen here.
module aes_dec_round (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         last,
  input  logic [127:0] din,
  input  logic [127:0] round_key,
  output logic [127:0] dout,
  output logic         done
);
  logic [127:0] sr_out, sb_out, ark_out, mc_out;
  logic         sb_done;

  aes_shift_rows #(.INVERSE(1'b1)) u_shift (.din (din), .dout (sr_out));
  aes_sub_bytes #(.INVERSE(1'b1)) u_sub (
    .clk (clk), .rst (rst), .start (start), .din (sr_out), .dout (sb_out), .done (sb_done)
  );
  aes_add_round_key u_ark (.state (sb_out), .round_key (round_key), .dout (ark_out));
  aes_mix_columns #(.INVERSE(1'b1)) u_mix (.din (ark_out), .dout (mc_out));

  always_ff @(posedge clk) begin
    if (rst) begin
      dout <= '0;
      done <= 1'b0;
    end else begin
      done <= sb_done;
      if (sb_done) dout <= last ? ark_out : mc_out;
    end
  end
endmodule
