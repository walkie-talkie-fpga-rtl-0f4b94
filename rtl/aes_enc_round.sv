// aes_enc_round: one AES encryption round built from the four step modules:
// SubBytes, ShiftRows, MixColumns and AddRoundKey. When last is set,
// MixColumns is skipped, as in round 10 of AES-128.
// start latches nothing itself: din and round_key must stay stable from start
// until done. SubBytes is sequential (one shared S-box block RAM); the other
// three steps are combinational on its result, which is registered into dout.
// done pulses 20 cycles after start.
// The round built from the four step modules follows the original design's
// hierarchy; the handshake is chosen here.
module aes_enc_round (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         last,
  input  logic [127:0] din,
  input  logic [127:0] round_key,
  output logic [127:0] dout,
  output logic         done
);
  logic [127:0] sb_out, sr_out, mc_out, ark_out;
  logic         sb_done;

  aes_sub_bytes #(.INVERSE(1'b0)) u_sub (
    .clk (clk), .rst (rst), .start (start), .din (din), .dout (sb_out), .done (sb_done)
  );
  aes_shift_rows #(.INVERSE(1'b0)) u_shift (.din (sb_out), .dout (sr_out));
  aes_mix_columns #(.INVERSE(1'b0)) u_mix (.din (sr_out), .dout (mc_out));
  aes_add_round_key u_ark (
    .state (last ? sr_out : mc_out), .round_key (round_key), .dout (ark_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dout <= '0;
      done <= 1'b0;
    end else begin
      done <= sb_done;
      if (sb_done) dout <= ark_out;
    end
  end
endmodule
