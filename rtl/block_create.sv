// block_create: packs BYTES consecutive 8-bit samples into one AES block.
// Each din_valid shifts din in; the first sample of a group ends up in the
// top byte [127:120]. On the BYTES-th sample the completed block appears on
// block_out with a one-cycle block_valid, one cycle after that sample's
// strobe; block_out then holds until the next block.
// Gathering 16 bytes into one 128-bit block follows the original design; the
// byte order is chosen here.
module block_create #(
  parameter int BYTES = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [7:0]           din,
  input  logic                 din_valid,
  output logic [8*BYTES-1:0]   block_out,
  output logic                 block_valid
);
  localparam int CNT_W = $clog2(BYTES);
  logic [8*BYTES-1:0] shreg;
  logic [CNT_W-1:0]   cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg       <= '0;
      cnt         <= '0;
      block_out   <= '0;
      block_valid <= 1'b0;
    end else begin
      block_valid <= 1'b0;
      if (din_valid) begin
        shreg <= {shreg[8*BYTES-9:0], din};
        if (cnt == CNT_W'(BYTES - 1)) begin
          cnt         <= '0;
          block_out   <= {shreg[8*BYTES-9:0], din};
          block_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
