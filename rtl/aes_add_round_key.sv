// aes_add_round_key: the AES AddRoundKey step, a bitwise XOR of the 128-bit
// state with the current round key. Its own inverse. Purely combinational.
// Follows the original design.
module aes_add_round_key (
  input  logic [127:0] state,
  input  logic [127:0] round_key,
  output logic [127:0] dout
);
  assign dout = state ^ round_key;
endmodule
