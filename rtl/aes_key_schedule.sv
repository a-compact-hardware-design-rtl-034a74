// aes_key_schedule: AES-256 key scheduler with an expanded-key store.
//
// On start the 256-bit cipher key is loaded as words w[0..7]; then one
// word per clock is derived,
//   w[i] = w[i-8] ^ SubWord(RotWord(w[i-1])) ^ Rcon   (i mod 8 = 0)
//   w[i] = w[i-8] ^ SubWord(w[i-1])                   (i mod 8 = 4)
//   w[i] = w[i-8] ^ w[i-1]                            (otherwise),
// until all 60 words (15 round keys, 240 bytes) are held. SubWord uses the
// substitution half of four integrated-LUT (aes_itable) instances.
// The round keys are kept because decryption needs them in reverse order.
// Read port: rd_idx selects round key 0..14 (words 4*idx..4*idx+3); with
// rd_invmix = 1 the key is passed through InvMixColumns, which turns it into
// the key of the equivalent inverse cipher used by the decryption rounds.
// Timing: start is taken in one cycle, after which busy is high for 52
// cycles; ready rises when the last word is written and stays high until the
// next start. The read port is combinational. Reset clears ready.
module aes_key_schedule
  import hybrid_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [255:0] key,
  output logic         busy,
  output logic         ready,
  input  logic [3:0]   rd_idx,
  input  logic         rd_invmix,
  output block_t       rk
);
  word_t      w [AES_XWORDS];
  logic [5:0] idx;      // next word to derive
  byte_t      rcon;

  word_t prev, temp, sub;
  assign prev = w[idx - 6'd1];
  // RotWord is applied only on i mod 8 = 0.
  assign temp = (idx[2:0] == 3'd0) ? {prev[23:0], prev[31:24]} : prev;

  for (genvar k = 0; k < 4; k++) begin : g_sub
    word_t unused_mix;
    aes_itable u_sbox (.dec(1'b0), .din(temp[8 * k +: 8]), .sub(sub[8 * k +: 8]), .mix(unused_mix));
  end

  word_t next_w;
  always_comb begin
    unique case (idx[2:0])
      3'd0:    next_w = w[idx - 6'd8] ^ sub ^ {rcon, 24'h0};
      3'd4:    next_w = w[idx - 6'd8] ^ sub;
      default: next_w = w[idx - 6'd8] ^ prev;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      idx   <= 6'd8;
      rcon  <= 8'h01;
      for (int i = 0; i < int'(AES_XWORDS); i++) w[i] <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      ready <= 1'b0;
      idx   <= 6'd8;
      rcon  <= 8'h01;
      for (int i = 0; i < int'(AES_NK); i++) w[i] <= key[255 - 32 * i -: 32];
    end else if (busy) begin
      w[idx] <= next_w;
      if (idx[2:0] == 3'd0) rcon <= xtime(rcon);
      if (idx == 6'(AES_XWORDS - 1)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
      idx <= idx + 6'd1;
    end
  end

  block_t rk_raw;
  assign rk_raw = {w[{rd_idx, 2'b00}], w[{rd_idx, 2'b01}], w[{rd_idx, 2'b10}], w[{rd_idx, 2'b11}]};
  assign rk     = rd_invmix ? inv_mix_block(rk_raw) : rk_raw;

  a_rd_range: assert property (@(posedge clk) disable iff (!rst_n) ready |-> rd_idx <= 4'd14);
endmodule
