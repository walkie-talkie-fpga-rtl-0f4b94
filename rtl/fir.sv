// fir: TAPS-tap FIR low-pass filter computed serially by a three-state FSM.
// IDLE waits for the one-cycle din_valid strobe; the sample is pushed into a
// TAPS-deep history (newest at index 0). SUM_ADD then performs one
// multiply-accumulate per cycle, acc += hist[i] * COEFS[i], for TAPS cycles
// into a wide accumulator (ACC_W bits, so no intermediate sum can overflow).
// DONE presents the result, scaled down by COEF_SHIFT (the taps sum to
// 2^COEF_SHIFT, so the DC gain is one) and saturated to DATA_W bits, with a
// one-cycle dout_valid. dout holds until the next result.
// Timing: dout_valid follows din_valid by TAPS+1 cycles (31 at the default).
// A sample is accepted in IDLE or DONE, so samples may arrive every TAPS+1
// cycles; a strobe during SUM_ADD is ignored.
// The 30 taps, the IDLE/SUM_ADD/DONE machine, the 30-cycle accumulation, the
// wide accumulator and scaling the output down follow the original design; the
// tap values, widths and saturation are this design's choices.
module fir #(
  parameter int TAPS       = wtf_pkg::FIR_TAPS,
  parameter int DATA_W     = 16,
  parameter int COEF_W     = wtf_pkg::FIR_COEF_W,
  parameter int COEF_SHIFT = wtf_pkg::FIR_SHIFT,
  parameter int ACC_W      = 40,
  parameter logic signed [COEF_W-1:0] COEFS [TAPS] = wtf_pkg::FIR_COEFS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] din,
  input  logic                     din_valid,
  output logic signed [DATA_W-1:0] dout,
  output logic                     dout_valid
);
  typedef enum logic [1:0] {IDLE, SUM_ADD, DONE} state_e;
  localparam int IDX_W = $clog2(TAPS);
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 <<< (DATA_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(1 <<< (DATA_W-1));

  state_e                   st;
  logic signed [DATA_W-1:0] hist [TAPS];
  logic        [IDX_W-1:0]  idx;
  logic signed [ACC_W-1:0]  acc, acc_next, scaled;
  logic                     accept;

  assign accept   = din_valid && (st == IDLE || st == DONE);
  assign acc_next = acc + ACC_W'(hist[idx]) * ACC_W'(COEFS[idx]);
  assign scaled   = acc_next >>> COEF_SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= IDLE;
      idx        <= '0;
      acc        <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
      hist       <= '{default: '0};
    end else begin
      dout_valid <= 1'b0;
      if (accept) begin
        hist[0] <= din;
        for (int i = 1; i < TAPS; i++) hist[i] <= hist[i-1];
        idx <= '0;
        acc <= '0;
        st  <= SUM_ADD;
      end else begin
        unique case (st)
          SUM_ADD: begin
            acc <= acc_next;
            if (idx == IDX_W'(TAPS - 1)) begin
              if (scaled > MAXV)      dout <= MAXV[DATA_W-1:0];
              else if (scaled < MINV) dout <= MINV[DATA_W-1:0];
              else                    dout <= scaled[DATA_W-1:0];
              dout_valid <= 1'b1;
              st         <= DONE;
            end else begin
              idx <= idx + 1'b1;
            end
          end
          DONE:    st <= IDLE;
          default: st <= IDLE;
        endcase
      end
    end
  end
endmodule
