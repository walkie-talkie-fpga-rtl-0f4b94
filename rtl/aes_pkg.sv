// aes_pkg: types and GF(2^8) helpers shared by the AES-128 modules.
// A block is 128 bits holding 16 bytes; byte k sits in bits [127-8k -: 8] and
// maps to state row k%4, column k/4 (the column-major order of FIPS-197).
// The cipher is AES-128: a 128-bit key, 10 rounds and 11 round keys.
// The cipher (AES-128) is the original design's; the byte order is the FIPS-197
// convention, chosen here.
package aes_pkg;
  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  localparam int NB_BYTES = 16;
  localparam int NR       = 10;

  function automatic byte_t get_byte(block_t b, int k);
    return b[127-8*k -: 8];
  endfunction

  // Multiply by x (i.e. by 02) in GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t r, p;
    r = '0;
    p = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= p;
      p = xtime(p);
    end
    return r;
  endfunction
endpackage
