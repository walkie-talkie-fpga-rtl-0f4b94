// wtf_tx: sends one 128-bit block over a single line with a pulse-width code.
// Frame: a sync of SYNC_LOW cycles low and SYNC_HIGH cycles high, then NBITS
// bits, most significant first, each BIT_LOW cycles low followed by a high
// pulse of ZERO_HIGH cycles for a 0 or ONE_HIGH cycles for a 1. Between frames
// the line idles low, so the end of the last bit's pulse is seen by the
// receiver. At 98 MHz the defaults are 8 us + 8 us for sync, 6 us for a 0 and
// 8 us for a 1: a frame lasts at most 16 + 128*8 = 1040 us.
// start (while not busy) latches block_in and begins the sync; busy stays high
// for the whole frame and done pulses in its last cycle. line is decoded from
// the state register.
// The sync and bit patterns, their timings and sending all 128 bits of a block
// in one frame follow the original design; the idle level, bit order and
// handshake are this design's choices.
module wtf_tx #(
  parameter int SYNC_LOW  = wtf_pkg::SYNC_LOW_CYC,
  parameter int SYNC_HIGH = wtf_pkg::SYNC_HIGH_CYC,
  parameter int BIT_LOW   = wtf_pkg::BIT_LOW_CYC,
  parameter int ZERO_HIGH = wtf_pkg::ZERO_HIGH_CYC,
  parameter int ONE_HIGH  = wtf_pkg::ONE_HIGH_CYC,
  parameter int NBITS     = 128
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NBITS-1:0] block_in,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             line
);
  typedef enum logic [2:0] {S_IDLE, S_SYNC_L, S_SYNC_H, S_BIT_L, S_BIT_H} state_e;
  localparam int CNT_W = $clog2(SYNC_LOW + SYNC_HIGH + BIT_LOW + ONE_HIGH);
  localparam int BIT_W = $clog2(NBITS);

  state_e           st;
  logic [CNT_W-1:0] cnt;      // cycles left in the current level, minus one
  logic [NBITS-1:0] shreg;
  logic [BIT_W-1:0] bitn;

  assign busy = (st != S_IDLE);
  assign line = (st == S_SYNC_H) || (st == S_BIT_H);

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= S_IDLE;
      cnt   <= '0;
      shreg <= '0;
      bitn  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st != S_IDLE && cnt != '0) begin
        cnt <= cnt - 1'b1;
      end else begin
        unique case (st)
          S_IDLE: if (start) begin
            shreg <= block_in;
            bitn  <= '0;
            cnt   <= CNT_W'(SYNC_LOW - 1);
            st    <= S_SYNC_L;
          end
          S_SYNC_L: begin
            cnt <= CNT_W'(SYNC_HIGH - 1);
            st  <= S_SYNC_H;
          end
          S_SYNC_H, S_BIT_H: begin
            if (st == S_BIT_H) begin
              shreg <= shreg << 1;
              bitn  <= bitn + 1'b1;
            end
            if (st == S_BIT_H && bitn == BIT_W'(NBITS - 1)) begin
              st <= S_IDLE;
            end else begin
              cnt <= CNT_W'(BIT_LOW - 1);
              st  <= S_BIT_L;
            end
          end
          S_BIT_L: begin
            cnt <= shreg[NBITS-1] ? CNT_W'(ONE_HIGH - 1) : CNT_W'(ZERO_HIGH - 1);
            st  <= S_BIT_H;
          end
          default: st <= S_IDLE;
        endcase
      end
      if (st == S_BIT_H && cnt == '0 && bitn == BIT_W'(NBITS - 1)) done <= 1'b1;
    end
  end
endmodule
