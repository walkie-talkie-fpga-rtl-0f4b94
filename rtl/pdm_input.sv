// pdm_input: clocks the board's PDM microphone and samples its 1-bit stream.
// mic_clk is clk divided by DIV (high for the first half of each period); at
// 98 MHz and DIV = 32 that is about 3.06 MHz, the microphone's 3 Msps rate.
// mic_data is taken on the last system cycle of each mic_clk period, just
// before mic_clk rises again, and presented on bit_out with a one-cycle
// bit_valid strobe in the following cycle, once per DIV cycles.
// The 3 Msps 1-bit microphone stream is the original design's; the divider and
// sampling point are chosen here.
module pdm_input #(
  parameter int DIV = 32
) (
  input  logic clk,
  input  logic rst,
  output logic mic_clk,
  input  logic mic_data,
  output logic bit_out,
  output logic bit_valid
);
  localparam int CNT_W = $clog2(DIV);
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      mic_clk   <= 1'b1;
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (cnt == CNT_W'(DIV - 1)) begin
        cnt       <= '0;
        bit_out   <= mic_data;
        bit_valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
      mic_clk <= (cnt == CNT_W'(DIV - 1)) || (cnt < CNT_W'(DIV/2 - 1));
    end
  end
endmodule
