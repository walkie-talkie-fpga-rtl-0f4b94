// aes_sbox_rom: the AES byte-substitution table held as a 256 x 8 read-only
// block RAM. INVERSE=0 gives the S-box, INVERSE=1 its inverse.
// Table: s(x) = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63,
// with b the multiplicative inverse of x in GF(2^8) (b = 0 for x = 0); the
// inverse table is its inverse permutation. The row is the high nibble of the
// address, the column the low nibble.
// Timing: the address is registered and so is the data, giving the two-cycle
// read latency of a registered block RAM: data for the address presented in
// cycle t is valid in cycle t+2. A new address may be presented every cycle.
// Holding the S-box in block RAM with a two-cycle read follows the original
// design; sharing one module for both tables is a choice made here.
module aes_sbox_rom #(
  parameter bit INVERSE = 1'b0
) (
  input  logic       clk,
  input  logic [7:0] addr,
  output logic [7:0] data
);
  logic [7:0] rom [256];
  logic [7:0] addr_q;

  initial begin
    if (INVERSE) $readmemh("rtl/aes_inv_sbox.hex", rom);
    else         $readmemh("rtl/aes_sbox.hex", rom);
  end

  always_ff @(posedge clk) begin
    addr_q <= addr;
    data   <= rom[addr_q];
  end
endmodule
