// tb_lpf_decimator: drives the four-stage filter/decimator with a PDM stream
// made here by a first-order sigma-delta model (one bit every 32 cycles, as
// the microphone interface delivers) and checks:
//  - the output rate: one sample every 4^4 * 32 = 8192 cycles;
//  - DC levels: PDM densities 75% and 25% give +64 and -64 (+-4);
//  - a 1 kHz sine of amplitude 0.5 passes with a peak of 64 (+-10);
//  - a 20 kHz tone of the same amplitude is stopped (peak below 8).
module tb_lpf_decimator;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, pdm_bit, pdm_valid, sample_valid;
  logic signed [7:0] sample;
  logic signed [3:0][15:0] stage_out;
  lpf_decimator dut (.clk, .rst, .pdm_bit, .pdm_valid, .sample, .sample_valid, .stage_out);

  localparam real FS = 98.0e6 / 32.0;
  real  v = 0.0, phase = 0.0;
  real  freq = 0.0, amp = 0.0, dc = 0.0;
  int   n_out = 0, last_out = -1, cyc = 0, peak = 0, sum = 0, sum_n = 0;
  bit   track = 0;

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PDM source: one bit every 32 cycles
  always @(posedge clk) begin
    cyc <= cyc + 1;
    pdm_valid <= 1'b0;
    if (!rst && cyc % 32 == 0) begin
      real x;
      x = dc + amp * $sin(phase);
      phase = phase + 2.0 * 3.14159265358979 * freq / FS;
      pdm_bit   <= (v >= 0.0);
      v = v + x - ((v >= 0.0) ? 1.0 : -1.0);
      pdm_valid <= 1'b1;
    end
  end

  // output monitor
  always @(posedge clk) begin
    if (!rst && sample_valid) begin
      if (last_out >= 0) begin
        checks++;
        if (cyc - last_out != 8192) begin failures++; $display("output spacing %0d", cyc - last_out); end
      end
      last_out = cyc;
      n_out++;
      if (track) begin
        if ($signed(sample) > peak) peak = $signed(sample);
        if (-$signed(sample) > peak) peak = -$signed(sample);
        sum += $signed(sample);
        sum_n++;
      end
    end
  end

  task automatic settle_and_measure(int settle, int measure);
    repeat (settle) @(posedge sample_valid);
    peak = 0; sum = 0; sum_n = 0; track = 1;
    repeat (measure) @(posedge sample_valid);
    track = 0;
  endtask

  initial begin
    rst = 1'b1; pdm_bit = 1'b0; pdm_valid = 1'b0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    dc = 0.5; amp = 0.0;
    settle_and_measure(12, 8);
    checks++;
    if (sum / sum_n < 60 || sum / sum_n > 68) begin failures++; $display("DC +0.5 -> %0d", sum / sum_n); end
    dc = -0.5;
    settle_and_measure(12, 8);
    checks++;
    if (sum / sum_n < -68 || sum / sum_n > -60) begin failures++; $display("DC -0.5 -> %0d", sum / sum_n); end
    dc = 0.0; amp = 0.5; freq = 1000.0;
    settle_and_measure(12, 48);
    checks++;
    $display("1 kHz peak %0d", peak);
    if (peak < 54 || peak > 74) failures++;
    freq = 20000.0;
    settle_and_measure(12, 48);
    checks++;
    $display("20 kHz peak %0d", peak);
    if (peak >= 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
