// tb_fir: feeds random samples (at the fastest accepted spacing, 31 cycles,
// and at the 32-cycle spacing of the first stage) and compares every output
// with a convolution computed here; checks the 31-cycle latency, unity DC
// gain (a constant input comes out unchanged once the history is full) and
// saturation at full-scale input.
module tb_fir;
  import wtf_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, din_valid, dout_valid;
  logic signed [15:0] din, dout;
  fir dut (.clk, .rst, .din, .din_valid, .dout, .dout_valid);

  int hist [30];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected();
    longint acc = 0;
    longint y;
    for (int i = 0; i < 30; i++) acc += longint'(hist[i]) * longint'(FIR_COEFS[i]);
    y = acc >>> 14;
    if (y > 32767) y = 32767;
    if (y < -32768) y = -32768;
    return int'(y);
  endfunction

  task automatic push(int x, int gap, bit check_val);
    int cyc, e;
    @(negedge clk);
    din = 16'(x); din_valid = 1'b1;
    for (int i = 29; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    e = expected();
    @(negedge clk);
    din_valid = 1'b0;
    cyc = 1;
    while (!dout_valid && cyc < 40) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != 31) begin failures++; $display("latency %0d, expected 31", cyc); end
    if (check_val && dout !== 16'(e)) begin failures++; $display("y = %0d, expected %0d", dout, e); end
    repeat (gap - 32) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; din_valid = 1'b0; din = '0;
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < 100; n++) push($signed(16'($urandom)) / 4, (n % 2) ? 31 : 32, 1'b1);
    for (int n = 0; n < 40; n++) push(1000, 32, 1'b1);
    checks++;
    if (dout !== 16'sd1000) begin failures++; $display("DC gain: %0d for 1000", dout); end
    for (int n = 0; n < 40; n++) push(32767, 32, 1'b1);   // overshoot must saturate
    for (int n = 0; n < 40; n++) push(-32768, 32, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
