// sync_2ff: brings an asynchronous input (the received line, which comes from
// another board's clock domain) into this clock domain through a chain of
// STAGES flip-flops, so a metastable first stage has a full cycle to settle.
// q follows d with a latency of STAGES cycles. Reset clears the chain.
// A synchronizer in front of the receiver follows the original design; its
// two-flip-flop form is chosen here.
module sync_2ff #(
  parameter int STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic [STAGES-1:0] chain;

  always_ff @(posedge clk) begin
    if (rst) chain <= '0;
    else     chain <= {chain[STAGES-2:0], d};
  end
  assign q = chain[STAGES-1];
endmodule
