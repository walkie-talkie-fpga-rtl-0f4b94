// wtf_pkg: constants shared by the walkie-talkie datapath.
// - The system clock is about 98 MHz; the line timings of the pulse-width bit
//   code are given in clock cycles at that rate (8 us = 784 cycles).
// - FIR_COEFS is the 30-tap low-pass filter used in every decimation stage:
//   h[n] = w[n] * sin(2*pi*fc*m)/(pi*m), m = n - 14.5, fc = 1/8 of the input
//   rate, w[n] = 0.54 - 0.46*cos(2*pi*n/29) (Hamming window), normalised and
//   rounded so that the taps sum to exactly 2^14 (unity gain at DC). The tap
//   values are this design's own choice; the filter length is the design's.
// The 98 MHz clock and the 8/8/4/2/4 us line timings are the original design's;
// the tap values are this design's own.
package wtf_pkg;
  localparam int CLK_HZ = 98_000_000;

  // Pulse-width line code, in clock cycles at CLK_HZ.
  localparam int SYNC_LOW_CYC  = 784;  // 8 us low
  localparam int SYNC_HIGH_CYC = 784;  // 8 us high
  localparam int BIT_LOW_CYC   = 392;  // 4 us low before every bit
  localparam int ZERO_HIGH_CYC = 196;  // 2 us high: bit 0
  localparam int ONE_HIGH_CYC  = 392;  // 4 us high: bit 1

  localparam int FIR_TAPS   = 30;
  localparam int FIR_COEF_W = 16;
  localparam int FIR_SHIFT  = 14;
  typedef logic signed [FIR_COEF_W-1:0] coef_t;
  localparam coef_t FIR_COEFS [FIR_TAPS] = '{
    -16'sd27,  -16'sd32,  -16'sd20,   16'sd30,  16'sd111,  16'sd165,   16'sd98,
    -16'sd137, -16'sd457, -16'sd624, -16'sd355,  16'sd500, 16'sd1805, 16'sd3143,
     16'sd3992, 16'sd3992, 16'sd3143, 16'sd1805, 16'sd500, -16'sd355, -16'sd624,
    -16'sd457, -16'sd137,  16'sd98,   16'sd165,  16'sd111,  16'sd30,  -16'sd20,
    -16'sd32,  -16'sd27
  };
endpackage
