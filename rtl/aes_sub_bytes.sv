// aes_sub_bytes: AES SubBytes (INVERSE=0) or InvSubBytes (INVERSE=1) over a
// whole 128-bit block, using one shared S-box block RAM.
// On start the block is latched and its 16 bytes are sent to the ROM one per
// cycle, byte 0 first; each result comes back two cycles later and is written
// into its place in dout. done pulses for one cycle when dout holds all 16
// substituted bytes, 19 cycles after start. start is ignored while busy.
// SubBytes through the block-RAM S-box follows the original design; issuing all
// 16 bytes through a single shared ROM is this design's choice.
module aes_sub_bytes #(
  parameter bit INVERSE = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [127:0] din,
  output logic [127:0] dout,
  output logic         done
);
  import aes_pkg::*;

  logic [127:0] src;
  logic         issuing;
  logic [3:0]   issue_idx;
  logic [1:0]   v_pipe;
  logic [3:0]   idx_pipe [2];
  logic [7:0]   rom_addr, rom_data;

  assign rom_addr = get_byte(src, int'(issue_idx));

  aes_sbox_rom #(.INVERSE(INVERSE)) u_rom (
    .clk  (clk),
    .addr (rom_addr),
    .data (rom_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      issuing   <= 1'b0;
      issue_idx <= '0;
      v_pipe    <= '0;
      idx_pipe  <= '{default: '0};
      done      <= 1'b0;
      src       <= '0;
      dout      <= '0;
    end else begin
      done <= 1'b0;
      if (start && !issuing && v_pipe == 2'b00) begin
        src       <= din;
        issuing   <= 1'b1;
        issue_idx <= '0;
      end else if (issuing) begin
        issue_idx <= issue_idx + 4'd1;
        if (issue_idx == 4'd15) issuing <= 1'b0;
      end
      v_pipe      <= {v_pipe[0], issuing};
      idx_pipe[0] <= issue_idx;
      idx_pipe[1] <= idx_pipe[0];
      if (v_pipe[1]) begin
        dout[127-8*idx_pipe[1] -: 8] <= rom_data;
        if (idx_pipe[1] == 4'd15) done <= 1'b1;
      end
    end
  end
endmodule
