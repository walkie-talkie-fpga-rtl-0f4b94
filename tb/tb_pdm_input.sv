// tb_pdm_input: checks the microphone clock (period 32 cycles, 16 high) and
// that each bit_valid strobe, one per period, carries the bit a microphone
// model drove during that period. The model changes its data a few cycles
// after each rising edge of mic_clk, as a PDM microphone does.
module tb_pdm_input;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, mic_clk, mic_data, bit_out, bit_valid;
  pdm_input #(.DIV(32)) dut (.clk, .rst, .mic_clk, .mic_data, .bit_out, .bit_valid);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic driven;
  int   high_cnt, period_cnt, last_rise, strobes, last_strobe;

  // microphone model: new data 3 cycles after each rising mic_clk edge
  always @(posedge mic_clk) begin
    repeat (3) @(posedge clk);
    driven   <= 1'($urandom);
    mic_data <= driven;
  end

  initial begin
    rst = 1'b1; mic_data = 1'b0; driven = 1'b0;
    high_cnt = 0; strobes = 0; last_rise = -1; last_strobe = -1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 32 * 200; cyc++) begin
      logic prev_clk;
      prev_clk = mic_clk;
      @(posedge clk);
      #1;
      if (mic_clk && !prev_clk) begin
        if (last_rise >= 0) begin
          checks += 2;
          if (cyc - last_rise != 32) begin failures++; $display("mic_clk period %0d", cyc - last_rise); end
          if (high_cnt != 16) begin failures++; $display("mic_clk high for %0d", high_cnt); end
        end
        last_rise = cyc;
        high_cnt = 0;
      end
      if (mic_clk) high_cnt++;
      if (bit_valid) begin
        strobes++;
        checks++;
        if (bit_out !== mic_data) begin failures++; $display("bit %0d wrong", strobes); end
        if (last_strobe >= 0) begin
          checks++;
          if (cyc - last_strobe != 32) failures++;
        end
        last_strobe = cyc;
      end
    end
    checks++;
    if (strobes < 195) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
