// decimate: down-samples a strobed sample stream by FACTOR. Every FACTOR-th
// input sample (the last of each group) is copied to dout with a one-cycle
// dout_valid, one cycle after its din_valid; the others are dropped. It relies
// on the FIR in front of it for anti-alias filtering.
// Decimation by 4 follows the original design; keeping the last sample of each
// group is a choice made here.
module decimate #(
  parameter int FACTOR = 4,
  parameter int DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] din,
  input  logic                     din_valid,
  output logic signed [DATA_W-1:0] dout,
  output logic                     dout_valid
);
  localparam int CNT_W = (FACTOR > 1) ? $clog2(FACTOR) : 1;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (din_valid) begin
        if (cnt == CNT_W'(FACTOR - 1)) begin
          cnt        <= '0;
          dout       <= din;
          dout_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
