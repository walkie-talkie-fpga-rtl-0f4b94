// aes_mix_columns: the AES MixColumns step and its inverse.
// Each 4-byte column is multiplied, in GF(2^8), by the circulant matrix with
// first row {02,03,01,01} (INVERSE=0) or {0e,0b,0d,09} (INVERSE=1). Products
// are formed with shifts and XORs (xtime). Purely combinational.
// The step follows the original design; the matrices are those of the AES
// standard.
module aes_mix_columns #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [127:0] din,
  output logic [127:0] dout
);
  import aes_pkg::*;

  always_comb begin
    dout = '0;
    for (int c = 0; c < 4; c++) begin
      automatic byte_t a [4];
      for (int r = 0; r < 4; r++) a[r] = din[127-8*(4*c+r) -: 8];
      for (int r = 0; r < 4; r++) begin
        automatic byte_t y;
        if (!INVERSE)
          y = gf_mul(a[r], 8'h02) ^ gf_mul(a[(r+1)%4], 8'h03) ^ a[(r+2)%4] ^ a[(r+3)%4];
        else
          y = gf_mul(a[r], 8'h0e) ^ gf_mul(a[(r+1)%4], 8'h0b) ^
              gf_mul(a[(r+2)%4], 8'h0d) ^ gf_mul(a[(r+3)%4], 8'h09);
        dout[127-8*(4*c+r) -: 8] = y;
      end
    end
  end
endmodule
