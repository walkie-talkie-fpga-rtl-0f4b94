// wtf_top: one end of the encrypted walkie-talkie, transmit and receive paths
// side by side.
// Transmit: the PDM microphone (mic_clk/mic_data) is sampled at clk/PDM_DIV,
// low-pass filtered and decimated by 4 four times to 8-bit samples at about
// 12 kHz (tx_sample), packed 16 at a time into a 128-bit block, encrypted with
// AES-128 under key, and sent on tx_line with the sync + pulse-width line code.
// Receive: rx_line (the other end's tx_line, through laser and phototransistor
// or a plain wire) is decoded into 128-bit blocks, decrypted with the same
// key, unpacked into bytes played out one per SAMPLE_DIV cycles (rx_sample,
// about 12 kHz), and turned into a 1-bit audio stream (audio_out) by a
// first-order delta-sigma modulator for the headphone jack.
// Rates at the defaults (98 MHz): a block every 16 samples, about every
// 1.34 ms; encryption takes 282 cycles (2.9 us), a frame on the line at most
// 1040 us. A block that finds the encryptor or transmitter busy is dropped;
// rx_error pulses when a received frame is dropped for a malformed pulse.
// Line timing parameters are in clock cycles (see wtf_pkg).
// The chain of blocks and its rates follow the original design; the place of
// the delta-sigma modulator, the output tick, the key port and dropping a block
// that finds the transmitter busy are this design's choices.
module wtf_top #(
  parameter int PDM_DIV    = 32,
  parameter int SAMPLE_DIV = 8192,
  parameter int SYNC_LOW   = wtf_pkg::SYNC_LOW_CYC,
  parameter int SYNC_HIGH  = wtf_pkg::SYNC_HIGH_CYC,
  parameter int BIT_LOW    = wtf_pkg::BIT_LOW_CYC,
  parameter int ZERO_HIGH  = wtf_pkg::ZERO_HIGH_CYC,
  parameter int ONE_HIGH   = wtf_pkg::ONE_HIGH_CYC
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [127:0] key,
  // microphone
  output logic         mic_clk,
  input  logic         mic_data,
  // line to the laser driver / from the photo receiver
  output logic         tx_line,
  input  logic         rx_line,
  // headphone jack
  output logic         audio_out,
  // sample streams on both sides of the link
  output logic [7:0]   tx_sample,
  output logic         tx_sample_valid,
  output logic [7:0]   rx_sample,
  output logic         rx_sample_valid,
  output logic         rx_error
);
  // ---------------- transmit path ----------------
  logic               pdm_bit, pdm_valid;
  logic signed [7:0]  lpf_sample;
  logic [3:0][15:0]   stage_out;
  logic [127:0]       plain_blk, cipher_blk;
  logic               plain_valid, enc_busy, enc_done, tx_busy, tx_done;

  pdm_input #(.DIV(PDM_DIV)) u_pdm (
    .clk (clk), .rst (rst), .mic_clk (mic_clk), .mic_data (mic_data),
    .bit_out (pdm_bit), .bit_valid (pdm_valid)
  );

  lpf_decimator u_lpf (
    .clk (clk), .rst (rst), .pdm_bit (pdm_bit), .pdm_valid (pdm_valid),
    .sample (lpf_sample), .sample_valid (tx_sample_valid), .stage_out (stage_out)
  );
  assign tx_sample = lpf_sample;

  block_create u_bc (
    .clk (clk), .rst (rst), .din (lpf_sample), .din_valid (tx_sample_valid),
    .block_out (plain_blk), .block_valid (plain_valid)
  );

  aes_encrypt u_enc (
    .clk (clk), .rst (rst), .start (plain_valid), .key (key), .din (plain_blk),
    .dout (cipher_blk), .busy (enc_busy), .done (enc_done)
  );

  wtf_tx #(
    .SYNC_LOW (SYNC_LOW), .SYNC_HIGH (SYNC_HIGH), .BIT_LOW (BIT_LOW),
    .ZERO_HIGH (ZERO_HIGH), .ONE_HIGH (ONE_HIGH), .NBITS (128)
  ) u_tx (
    .clk (clk), .rst (rst), .block_in (cipher_blk), .start (enc_done),
    .busy (tx_busy), .done (tx_done), .line (tx_line)
  );

  // ---------------- receive path ----------------
  logic [127:0]      rx_blk, dec_blk;
  logic              rx_valid, dec_busy, dec_done;
  logic              tick;
  logic [$clog2(SAMPLE_DIV)-1:0] tick_cnt;

  wtf_rx #(
    .SYNC_LOW (SYNC_LOW), .SYNC_HIGH (SYNC_HIGH), .BIT_LOW (BIT_LOW),
    .ZERO_HIGH (ZERO_HIGH), .ONE_HIGH (ONE_HIGH), .NBITS (128)
  ) u_rx (
    .clk (clk), .rst (rst), .line (rx_line),
    .block_out (rx_blk), .block_valid (rx_valid), .error (rx_error)
  );

  aes_decrypt u_dec (
    .clk (clk), .rst (rst), .start (rx_valid), .key (key), .din (rx_blk),
    .dout (dec_blk), .busy (dec_busy), .done (dec_done)
  );

  // free-running output sample tick, one per SAMPLE_DIV cycles
  always_ff @(posedge clk) begin
    if (rst) tick_cnt <= '0;
    else     tick_cnt <= (tick_cnt == $bits(tick_cnt)'(SAMPLE_DIV - 1)) ? '0 : tick_cnt + 1'b1;
  end
  assign tick = (tick_cnt == '0);

  block_destroy u_bd (
    .clk (clk), .rst (rst), .block_in (dec_blk), .block_valid (dec_done),
    .tick (tick), .dout (rx_sample), .dout_valid (rx_sample_valid)
  );

  delta_sigma #(.IN_W(8)) u_ds (
    .clk (clk), .rst (rst), .din (rx_sample), .dout (audio_out)
  );
endmodule
