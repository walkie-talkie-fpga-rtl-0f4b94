// aes_key_expand: AES-128 key expansion, producing the 11 round keys from the
// 128-bit cipher key and holding them for the rounds to read.
// On start, round key 0 is the key itself. Each further key i (1..10) is made
// in 7 cycles: the four bytes of RotWord(w3) are sent one per cycle to an
// S-box block RAM (two-cycle latency), then temp = SubWord ^ {rcon,24'h0},
// w0' = w0 ^ temp, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'. rcon starts
// at 01 and is doubled in GF(2^8) each key. done pulses one cycle after the
// last key is stored, 71 cycles after start. round_key is the stored key
// selected by round_idx (combinational read); keys stay valid until the next
// start. start is ignored while busy.
// Eleven round keys from the 128-bit key follow the original design; the
// sequential 7-cycle schedule and storing all keys are this design's choices.
module aes_key_expand (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [3:0]   round_idx,
  output logic [127:0] round_key,
  output logic         busy,
  output logic         done
);
  import aes_pkg::*;

  logic [127:0] rk [NR+1];
  logic [127:0] cur;        // key being extended
  logic [3:0]   kidx;       // index of the key being made
  logic [2:0]   ph;         // phase within one key step
  logic [7:0]   rcon;
  logic [31:0]  sub_word;
  logic [31:0]  rot_word;
  logic [7:0]   rom_addr, rom_data;
  logic [127:0] next_key;

  assign rot_word = {cur[23:0], cur[31:24]};
  assign rom_addr = rot_word[31-8*ph[1:0] -: 8];

  aes_sbox_rom #(.INVERSE(1'b0)) u_rom (
    .clk  (clk),
    .addr (rom_addr),
    .data (rom_data)
  );

  always_comb begin
    logic [31:0] t, w0, w1, w2, w3;
    t  = sub_word ^ {rcon, 24'h0};
    w0 = cur[127:96] ^ t;
    w1 = cur[95:64]  ^ w0;
    w2 = cur[63:32]  ^ w1;
    w3 = cur[31:0]   ^ w2;
    next_key = {w0, w1, w2, w3};
  end

  assign round_key = (round_idx <= 4'(NR)) ? rk[round_idx] : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      kidx     <= '0;
      ph       <= '0;
      rcon     <= 8'h01;
      cur      <= '0;
      sub_word <= '0;
      rk       <= '{default: '0};
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          rk[0] <= key;
          cur   <= key;
          kidx  <= 4'd1;
          ph    <= '0;
          rcon  <= 8'h01;
        end
      end else begin
        // results of the lookups issued in phases 0..3 arrive in phases 2..5
        if (ph >= 3'd2 && ph <= 3'd5)
          sub_word[31-8*(int'(ph)-2) -: 8] <= rom_data;
        if (ph == 3'd6) begin
          rk[kidx] <= next_key;
          cur      <= next_key;
          rcon     <= xtime(rcon);
          ph       <= '0;
          if (kidx == 4'(NR)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
          kidx <= kidx + 4'd1;
        end else begin
          ph <= ph + 3'd1;
        end
      end
    end
  end
endmodule
