// tb_wtf_top: end-to-end test of one walkie-talkie end at its default sizes
// (98 MHz clock, 3.06 MHz PDM, 12 kHz samples, 8 us / 4 us / 2 us line code).
// A microphone model turns a 600 Hz sine (amplitude 0.5) into a PDM stream;
// tx_line is wired back to rx_line, as the wire that replaces the laser link,
// so the end talks to itself under one key. Checks:
//  - tx samples follow the sine (peak near 64) and come every 8192 cycles;
//  - every frame received on the line is the AES-128 encryption of the block
//    of 16 tx samples (reference cipher in tb_aes_ref_pkg), so no plaintext
//    is sent;
//  - every rx sample equals the tx sample it came from, in order;
//  - the delta-sigma output has (x + 128) * 32 ones, +-2, in the 8192 cycles
//    that each rx sample x is held;
//  - a frame hit by a glitch on the wire is dropped whole (rx_error) and the
//    next frames are received again.
// Each mechanism must occur at least once: FIR/decimation outputs of all four
// stages, block creation, encryption, frame transmission, frame reception,
// decryption, byte play-out, a dropped frame.
module tb_wtf_top;
  import tb_aes_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam int NBLOCKS = 7;

  logic rst, mic_clk, mic_data, tx_line, rx_line, audio_out;
  logic [7:0] tx_sample, rx_sample;
  logic tx_sample_valid, rx_sample_valid, rx_error;
  logic glitch;

  wtf_top dut (
    .clk, .rst, .key (KEY), .mic_clk, .mic_data, .tx_line, .rx_line, .audio_out,
    .tx_sample, .tx_sample_valid, .rx_sample, .rx_sample_valid, .rx_error
  );

  assign rx_line = tx_line ^ glitch;

  // ---------------- watchdog ----------------
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- microphone model ----------------
  real v = 0.0, ph = 0.0;
  always @(posedge mic_clk) begin
    real x;
    x = 0.5 * $sin(ph);
    ph = ph + 2.0 * 3.14159265358979 * 600.0 / (98.0e6 / 32.0);
    mic_data <= (v >= 0.0);
    v = v + x - ((v >= 0.0) ? 1.0 : -1.0);
  end

  // ---------------- mechanism counters ----------------
  int n_stage [4];
  int n_blocks_made = 0, n_enc = 0, n_frames_tx = 0, n_frames_rx = 0, n_dec = 0;
  int n_rx_bytes = 0, n_drops = 0, n_tx_samples = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_lpf.g_stage[0].u_dec.dout_valid) n_stage[0]++;
    if (dut.u_lpf.g_stage[1].u_dec.dout_valid) n_stage[1]++;
    if (dut.u_lpf.g_stage[2].u_dec.dout_valid) n_stage[2]++;
    if (dut.u_lpf.g_stage[3].u_dec.dout_valid) n_stage[3]++;
    if (dut.u_bc.block_valid) n_blocks_made++;
    if (dut.u_enc.done) n_enc++;
    if (dut.u_tx.done) n_frames_tx++;
    if (dut.u_dec.done) n_dec++;
    if (rx_error) n_drops++;
  end

  // ---------------- scoreboard ----------------
  logic [127:0] plain_q [$];     // blocks of tx samples not yet received
  logic [127:0] cur_plain;
  int           cur_n = 0, peak = 0, cyc = 0, last_tx = -1;
  logic [7:0]   play_q [$];      // bytes expected at rx_sample

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && tx_sample_valid) begin
      n_tx_samples++;
      if (last_tx >= 0) begin
        checks++;
        if (cyc - last_tx != 8192) begin failures++; $display("tx sample spacing %0d", cyc - last_tx); end
      end
      last_tx = cyc;
      if (n_tx_samples > 16) begin
        if ($signed(tx_sample) > peak) peak = $signed(tx_sample);
      end
      cur_plain[127 - 8*cur_n -: 8] = tx_sample;
      cur_n++;
      if (cur_n == 16) begin
        plain_q.push_back(cur_plain);
        cur_n = 0;
      end
    end
    if (!rst && rx_error && plain_q.size() > 0) begin
      void'(plain_q.pop_front());     // that frame's block is lost
    end
    if (!rst && dut.u_rx.block_valid) begin
      n_frames_rx++;
      checks++;
      if (plain_q.size() == 0) begin failures++; $display("frame with no block sent"); end
      else begin
        logic [127:0] p;
        p = plain_q.pop_front();
        if (dut.u_rx.block_out !== encrypt(p, KEY)) begin
          failures++; $display("frame %0d is not the ciphertext of its block", n_frames_rx);
        end
        for (int k = 0; k < 16; k++) play_q.push_back(p[127-8*k -: 8]);
      end
    end
  end

  // rx samples and the delta-sigma output density
  int ones = 0, window = 0;
  logic signed [7:0] held = 0;
  logic holding = 0;
  always @(posedge clk) begin
    if (rst) begin
      holding = 0;
    end else if (rx_sample_valid) begin
      if (holding && window == 8192) begin
        checks++;
        if (ones < (held + 128) * 32 - 2 || ones > (held + 128) * 32 + 2) begin
          failures++; $display("audio density %0d ones for sample %0d", ones, held);
        end
      end
      n_rx_bytes++;
      checks++;
      if (play_q.size() == 0) begin failures++; $display("unexpected rx sample"); end
      else begin
        logic [7:0] e;
        e = play_q.pop_front();
        if (rx_sample !== e) begin failures++; $display("rx sample %02x, expected %02x", rx_sample, e); end
      end
      held = $signed(rx_sample); holding = 1; ones = 0; window = 0;
    end else if (holding) begin
      ones += audio_out;
      window++;
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    rst = 1'b1; glitch = 1'b0; mic_data = 1'b0;
    foreach (n_stage[i]) n_stage[i] = 0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    // let three frames go through, then hit the fourth with a glitch
    wait (n_frames_tx == 3);
    wait (dut.u_tx.busy);
    repeat (30000) @(posedge clk);
    @(negedge tx_line);
    repeat (100) @(posedge clk);
    glitch = 1'b1;                      // a 60-cycle pulse in a bit's low time
    repeat (60) @(posedge clk);
    glitch = 1'b0;
    wait (n_frames_rx + n_drops >= NBLOCKS);
    wait (play_q.size() == 0);
    repeat (10) @(posedge clk);

    $display("stages %0d %0d %0d %0d, blocks %0d, enc %0d, tx %0d, rx %0d, drops %0d, dec %0d, bytes %0d, peak %0d",
             n_stage[0], n_stage[1], n_stage[2], n_stage[3], n_blocks_made, n_enc, n_frames_tx,
             n_frames_rx, n_drops, n_dec, n_rx_bytes, peak);
    checks += 12;
    foreach (n_stage[i]) if (n_stage[i] == 0) failures++;
    if (n_blocks_made == 0) failures++;
    if (n_enc != n_blocks_made) failures++;       // no block lost before the line
    if (n_frames_tx == 0) failures++;
    if (n_frames_rx == 0) failures++;
    if (n_drops != 1) failures++;
    if (n_dec != n_frames_rx) failures++;
    if (n_rx_bytes != 16 * n_frames_rx) failures++;
    if (peak < 54 || peak > 74) begin failures++; $display("tx peak %0d", peak); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
