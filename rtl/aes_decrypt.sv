// aes_decrypt: AES-128 decryption of one 128-bit block with a single call; it
// inverts aes_encrypt when given the same key.
// start latches din (ciphertext) and key. The key expander makes the 11 round
// keys; the block is XORed with round key NR and passed through NR decryption
// rounds using keys NR-1 down to 0, the last round without InvMixColumns.
// dout holds the plaintext from the cycle done pulses until the next done.
// busy is high from start to done; start is ignored while busy. Latency is
// 282 cycles at NR = 10, like encryption.
// A single-call decryption module taking the same key follows the original
// design; the handshake and key handling match aes_encrypt.
module aes_decrypt #(
  parameter int NR = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic [127:0] dout,
  output logic         busy,
  output logic         done
);
  typedef enum logic [1:0] {S_IDLE, S_KEY, S_ROUND} state_e;
  state_e       st;
  logic [127:0] blk, ark0, round_key, rd_out;
  logic [3:0]   kidx;
  logic         ke_start, ke_done, rd_start, rd_done;

  assign ke_start = (st == S_IDLE) && start;

  aes_key_expand u_keys (
    .clk (clk), .rst (rst), .start (ke_start), .key (key),
    .round_idx (kidx), .round_key (round_key), .busy (), .done (ke_done)
  );
  aes_add_round_key u_ark0 (.state (blk), .round_key (round_key), .dout (ark0));
  aes_dec_round u_round (
    .clk (clk), .rst (rst), .start (rd_start), .last (kidx == 4'd0),
    .din (blk), .round_key (round_key), .dout (rd_out), .done (rd_done)
  );

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      blk      <= '0;
      kidx     <= '0;
      rd_start <= 1'b0;
      dout     <= '0;
      done     <= 1'b0;
    end else begin
      rd_start <= 1'b0;
      done     <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          blk  <= din;
          kidx <= 4'(NR);
          st   <= S_KEY;
        end
        S_KEY: if (ke_done) begin
          blk      <= ark0;          // initial AddRoundKey with key NR
          kidx     <= 4'(NR - 1);
          rd_start <= 1'b1;
          st       <= S_ROUND;
        end
        S_ROUND: if (rd_done) begin
          if (kidx == 4'd0) begin
            dout <= rd_out;
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            blk      <= rd_out;
            kidx     <= kidx - 4'd1;
            rd_start <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
