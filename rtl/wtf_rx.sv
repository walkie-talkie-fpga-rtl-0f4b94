// wtf_rx: receives the pulse-width coded line of wtf_tx and rebuilds blocks.
// The raw line passes a two-flip-flop synchronizer. Two saturating counters
// measure the length of the current low and high levels. At every falling
// edge the high pulse just ended is judged together with the low before it:
//  - low >= 3/4 SYNC_LOW and high in (midpoint(ONE_HIGH,SYNC_HIGH),
//    3/2 SYNC_HIGH]: a sync frame; capture of a new block starts.
//  - while capturing, low in [BIT_LOW/2, midpoint(BIT_LOW,SYNC_LOW)] and high
//    in (ZERO_HIGH/2, midpoint(ONE_HIGH,SYNC_HIGH)]: one bit, 1 if the high
//    is longer than midpoint(ZERO_HIGH,ONE_HIGH), else 0; bits enter at the
//    bottom, so the first bit ends up as bit NBITS-1.
//  - anything else while capturing, or a low or high level that outlasts its
//    window: the partial block is dropped and error pulses for one cycle.
// After NBITS bits the block is put on block_out with a one-cycle
// block_valid, in the cycle after the falling edge of the last bit's pulse
// reaches the synchronizer output (3 cycles after it on the line).
// Finding the sync, decoding the pulse code and dropping a whole block on any
// error follow the original design; the acceptance windows and the drop rules
// in detail are this design's choices.
module wtf_rx #(
  parameter int SYNC_LOW  = wtf_pkg::SYNC_LOW_CYC,
  parameter int SYNC_HIGH = wtf_pkg::SYNC_HIGH_CYC,
  parameter int BIT_LOW   = wtf_pkg::BIT_LOW_CYC,
  parameter int ZERO_HIGH = wtf_pkg::ZERO_HIGH_CYC,
  parameter int ONE_HIGH  = wtf_pkg::ONE_HIGH_CYC,
  parameter int NBITS     = 128
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             line,
  output logic [NBITS-1:0] block_out,
  output logic             block_valid,
  output logic             error
);
  localparam int SYNC_LOW_MIN = (3 * SYNC_LOW) / 4;
  localparam int BIT_LOW_MIN  = BIT_LOW / 2;
  localparam int BIT_LOW_MAX  = (BIT_LOW + SYNC_LOW) / 2;
  localparam int ZERO_MIN     = ZERO_HIGH / 2;
  localparam int ZERO_ONE     = (ZERO_HIGH + ONE_HIGH) / 2;
  localparam int ONE_SYNC     = (ONE_HIGH + SYNC_HIGH) / 2;
  localparam int SYNC_MAX     = (3 * SYNC_HIGH) / 2;
  localparam int CNT_W        = $clog2(2 * (SYNC_LOW + SYNC_HIGH));
  localparam int BIT_W        = $clog2(NBITS + 1);
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic             s, s_prev;
  logic [CNT_W-1:0] low_cnt, high_cnt, last_low;
  logic [NBITS-1:0] shreg;
  logic [BIT_W-1:0] nbits;
  logic             capturing;
  logic             rise, fall, is_sync, is_bit, bit_val;

  sync_2ff #(.STAGES(2)) u_sync (.clk (clk), .rst (rst), .d (line), .q (s));

  assign rise    = s && !s_prev;
  assign fall    = !s && s_prev;
  assign is_sync = (last_low >= CNT_W'(SYNC_LOW_MIN)) &&
                   (high_cnt > CNT_W'(ONE_SYNC)) && (high_cnt <= CNT_W'(SYNC_MAX));
  assign is_bit  = (last_low >= CNT_W'(BIT_LOW_MIN)) && (last_low <= CNT_W'(BIT_LOW_MAX)) &&
                   (high_cnt > CNT_W'(ZERO_MIN)) && (high_cnt <= CNT_W'(ONE_SYNC));
  assign bit_val = (high_cnt > CNT_W'(ZERO_ONE));

  always_ff @(posedge clk) begin
    if (rst) begin
      s_prev      <= 1'b0;
      low_cnt     <= '0;
      high_cnt    <= '0;
      last_low    <= '0;
      shreg       <= '0;
      nbits       <= '0;
      capturing   <= 1'b0;
      block_out   <= '0;
      block_valid <= 1'b0;
      error       <= 1'b0;
    end else begin
      s_prev      <= s;
      block_valid <= 1'b0;
      error       <= 1'b0;

      // level length counters (the count of the level just ended stays
      // readable in the cycle of the edge)
      if (s) begin
        high_cnt <= rise ? CNT_W'(1) : (high_cnt == CNT_MAX ? high_cnt : high_cnt + 1'b1);
        if (rise) last_low <= low_cnt;
      end else begin
        low_cnt <= fall ? CNT_W'(1) : (low_cnt == CNT_MAX ? low_cnt : low_cnt + 1'b1);
      end

      if (fall) begin
        if (is_sync) begin
          if (capturing) error <= 1'b1;
          capturing <= 1'b1;
          nbits     <= '0;
        end else if (capturing) begin
          if (is_bit) begin
            shreg <= {shreg[NBITS-2:0], bit_val};
            if (nbits == BIT_W'(NBITS - 1)) begin
              block_out   <= {shreg[NBITS-2:0], bit_val};
              block_valid <= 1'b1;
              capturing   <= 1'b0;
            end else begin
              nbits <= nbits + 1'b1;
            end
          end else begin
            error     <= 1'b1;
            capturing <= 1'b0;
          end
        end
      end else if (capturing &&
                   ((!s && low_cnt > CNT_W'(BIT_LOW_MAX)) ||
                    ( s && high_cnt > CNT_W'(SYNC_MAX)))) begin
        error     <= 1'b1;    // level too long: the frame was broken off
        capturing <= 1'b0;
      end
    end
  end
endmodule
