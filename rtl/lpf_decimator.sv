// lpf_decimator: the microphone's signal conditioning. STAGES cascaded
// stages, each a 30-tap FIR low-pass filter followed by decimation by 4, turn
// the 1-bit PDM stream (about 3 Msps) into signed 8-bit samples at about
// 3.06 MHz / 256 = 12 kHz, band-limited for speech.
// A PDM 1 enters the first filter as +PDM_LEVEL and a 0 as -PDM_LEVEL. Every
// stage works on 16-bit signed samples and has unity DC gain, so the fourth
// stage output lies within +-PDM_LEVEL; it is shifted right by OUT_SHIFT and
// saturated to 8 bits. stage_out gives every stage's decimated output for
// observation. Each stage adds 32 cycles of latency after its last input.
// Four FIR plus decimate-by-4 stages and the 16-bit stage width follow the
// original design; the +-256 PDM levels and the final 8-bit scaling are this
// design's choices.
module lpf_decimator #(
  parameter int STAGES    = 4,
  parameter int DECIM     = 4,
  parameter int PDM_LEVEL = 256,
  parameter int OUT_SHIFT = 1
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           pdm_bit,
  input  logic                           pdm_valid,
  output logic signed [7:0]              sample,
  output logic                           sample_valid,
  output logic signed [STAGES-1:0][15:0] stage_out
);
  logic signed [15:0] s_in    [STAGES+1];
  logic               s_valid [STAGES+1];

  assign s_in[0]    = pdm_bit ? 16'(PDM_LEVEL) : -16'(PDM_LEVEL);
  assign s_valid[0] = pdm_valid;

  for (genvar g = 0; g < STAGES; g++) begin : g_stage
    logic signed [15:0] f_out;
    logic               f_valid;
    fir #(.DATA_W(16)) u_fir (
      .clk (clk), .rst (rst), .din (s_in[g]), .din_valid (s_valid[g]),
      .dout (f_out), .dout_valid (f_valid)
    );
    decimate #(.FACTOR(DECIM), .DATA_W(16)) u_dec (
      .clk (clk), .rst (rst), .din (f_out), .din_valid (f_valid),
      .dout (s_in[g+1]), .dout_valid (s_valid[g+1])
    );
    assign stage_out[g] = s_in[g+1];
  end

  logic signed [15:0] shifted;
  assign shifted = s_in[STAGES] >>> OUT_SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= s_valid[STAGES];
      if (s_valid[STAGES]) begin
        if (shifted > 16'sd127)       sample <= 8'sd127;
        else if (shifted < -16'sd128) sample <= -8'sd128;
        else                          sample <= shifted[7:0];
      end
    end
  end
endmodule
