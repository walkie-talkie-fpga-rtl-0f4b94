// aes_shift_rows: the AES ShiftRows step ("mix rows") and its inverse.
// The block is a 4x4 byte state (byte k at row k%4, column k/4). Row r is
// rotated left by r bytes (INVERSE=0) or right by r bytes (INVERSE=1), so row
// 0 stays, row 1 moves by one byte, and so on. Purely combinational.
// The step (called "mix rows" in the original description) follows the original
// design; only the byte order is chosen here.
module aes_shift_rows #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [127:0] din,
  output logic [127:0] dout
);
  always_comb begin
    dout = '0;
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        // output (r, c) takes input (r, c+r) for a left rotation, (r, c-r) for a right one
        automatic int sc = INVERSE ? ((c - r + 4) % 4) : ((c + r) % 4);
        dout[127-8*(4*c+r) -: 8] = din[127-8*(4*sc+r) -: 8];
      end
    end
  end
endmodule
