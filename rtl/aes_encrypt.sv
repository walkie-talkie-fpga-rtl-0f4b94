// aes_encrypt: AES-128 encryption of one 128-bit block with a single call.
// start latches din (plaintext) and key. The key expander makes the 11 round
// keys (71 cycles); the block is XORed with round key 0 and then passed through
// NR encryption rounds, round NR without MixColumns, each round taking its key
// from the expander. dout holds the ciphertext from the cycle done pulses until
// the next done. busy is high from start to done; start is ignored while busy.
// Latency, start to done, is 72 + NR*21 = 282 cycles at NR = 10, about 2.9 us at 98 MHz.
// A single-call encryption module on top of the round module follows the
// original design; the start/done handshake and re-expanding the key per block
// are this design's choices.
module aes_encrypt #(
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
  logic [3:0]   round;
  logic         ke_start, ke_done, rd_start, rd_done;

  assign ke_start = (st == S_IDLE) && start;

  aes_key_expand u_keys (
    .clk (clk), .rst (rst), .start (ke_start), .key (key),
    .round_idx (round), .round_key (round_key), .busy (), .done (ke_done)
  );
  aes_add_round_key u_ark0 (.state (blk), .round_key (round_key), .dout (ark0));
  aes_enc_round u_round (
    .clk (clk), .rst (rst), .start (rd_start), .last (round == 4'(NR)),
    .din (blk), .round_key (round_key), .dout (rd_out), .done (rd_done)
  );

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= S_IDLE;
      blk      <= '0;
      round    <= '0;
      rd_start <= 1'b0;
      dout     <= '0;
      done     <= 1'b0;
    end else begin
      rd_start <= 1'b0;
      done     <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          blk   <= din;
          round <= '0;
          st    <= S_KEY;
        end
        S_KEY: if (ke_done) begin
          blk      <= ark0;          // initial AddRoundKey with key 0
          round    <= 4'd1;
          rd_start <= 1'b1;
          st       <= S_ROUND;
        end
        S_ROUND: if (rd_done) begin
          if (round == 4'(NR)) begin
            dout <= rd_out;
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            blk      <= rd_out;
            round    <= round + 4'd1;
            rd_start <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
