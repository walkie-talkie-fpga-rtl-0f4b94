// block_destroy: unpacks decrypted 128-bit blocks into a stream of bytes, one
// per sample tick, top byte [127:120] first (the order block_create packs).
// An arriving block goes into a one-block holding register; when the block
// being played out is exhausted the held one is moved in (one cycle later) and
// its BYTES bytes leave on the next BYTES ticks, each as dout with a one-cycle
// dout_valid in the cycle after the tick. A second block arriving before the
// first is taken replaces it. With no block left, ticks produce nothing and
// dout keeps the last byte.
// Splitting a decrypted block into bytes at 12 kHz follows the original design;
// the holding register and the tick interface are this design's choices.
module block_destroy #(
  parameter int BYTES = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [8*BYTES-1:0] block_in,
  input  logic               block_valid,
  input  logic               tick,
  output logic [7:0]         dout,
  output logic               dout_valid
);
  localparam int CNT_W = $clog2(BYTES + 1);
  logic [8*BYTES-1:0] hold, cur;
  logic               hold_full;
  logic [CNT_W-1:0]   remain;
  logic               take;

  assign take = (remain == '0) && hold_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      hold       <= '0;
      hold_full  <= 1'b0;
      cur        <= '0;
      remain     <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (take) begin
        cur    <= hold;
        remain <= CNT_W'(BYTES);
      end else if (tick && remain != '0) begin
        dout       <= cur[8*BYTES-1 -: 8];
        dout_valid <= 1'b1;
        cur        <= cur << 8;
        remain     <= remain - 1'b1;
      end
      if (block_valid) begin
        hold      <= block_in;
        hold_full <= 1'b1;
      end else if (take) begin
        hold_full <= 1'b0;
      end
    end
  end
endmodule
