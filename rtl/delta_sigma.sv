// delta_sigma: first-order delta-sigma modulator driving the 1-bit audio
// output. A register Q of IN_W+1 bits is loaded every clock with
// X + Q - Y*2^IN_W, where Y, the output bit, is the register's MSB; the
// average density of ones in dout then equals X / 2^IN_W, with the
// quantisation noise pushed to high frequencies where the analog output
// filter removes it. The signed input sample is offset to unsigned
// (X = din + 2^(IN_W-1)), so 0 gives a 50% density. dout is a register
// output; a change of din shows in the bit stream from the next cycle on.
// The first-order structure (summer, register, MSB fed back) follows the
// original design; the widths, the offset of signed samples and the place at
// the audio output are chosen here.
module delta_sigma #(
  parameter int IN_W = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [IN_W-1:0] din,
  output logic                   dout
);
  logic [IN_W:0]   q;
  logic [IN_W-1:0] x;

  assign x    = {~din[IN_W-1], din[IN_W-2:0]};
  assign dout = q[IN_W];

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= {1'b0, q[IN_W-1:0]} + {1'b0, x};   // Q + X - Y*2^IN_W
  end
endmodule
