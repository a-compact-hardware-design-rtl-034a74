// hybrid_top: hybrid AES-256 / SHA3-512 processor with shared resources.
//
// One core runs either AES-256 encryption or decryption on NBLK (4) 128-bit
// blocks at once under one 256-bit key, or one Keccak-f[1600] absorb-and-
// permute step of SHA3-512. Both algorithms use the same 1600-bit state
// register and the same unified XOR section (N1: 5-input XOR bank, N2:
// 2-input XOR bank). AES rounds use the unified ShiftRows and the integrated
// LUT (SubBytes+MixColumns or their inverses in one table); SHA-3 rounds use
// theta-1/theta-2 from the XOR section and the SixIE network for the rest.
// The 512-bit result is also shown on 16 LEDs, one 16-bit page at a time.
//
// Control (sampled when start = 1 and the core is idle):
//   mode = MODE_AES (1) / MODE_SHA3 (0); enc = 1 encrypt, 0 decrypt.
//   AES:  block b is din[575-128b -: 128]; din[63:0] is unused. The result
//         block b is dout[511-128b -: 128].
//   SHA3: din is one 72-byte rate block, byte 0 in din[575:568].
//         sha_first clears the state before absorbing (first block of a
//         message); sha_last marks the final block, of which only sha_len
//         bytes (0..71) are message and which is padded. After the final
//         block dout holds the 64-byte digest, byte 0 in dout[511:504].
//         A message of n bytes takes floor(n/72)+1 blocks.
// Timing (this design's own; the document gives no cycle counts):
//   AES:  1 cycle to accept, 52 cycles of key expansion, 1 cycle to see the
//         expanded key, 1 whitening cycle, 14 round cycles, 1 output cycle:
//         done pulses 70 cycles after the start cycle. The key is expanded again on every start.
//   SHA3: 1 absorb cycle, 24 round cycles, 1 output cycle: done pulses 26
//         cycles after the start cycle.
// done is a one-cycle pulse, dout holds its value until the next done.
// start while busy is ignored. Reset is asynchronous, active low.
module hybrid_top
  import hybrid_pkg::*;
#(
  parameter int unsigned NBLK = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  mode_e        mode,
  input  logic         enc,
  input  logic [575:0] din,
  input  logic [255:0] key,
  input  logic         sha_first,
  input  logic         sha_last,
  input  logic [6:0]   sha_len,
  output logic         busy,
  output logic         done,
  output logic [511:0] dout,
  input  logic         btn_next,
  output logic [15:0]  led,
  output logic [4:0]   led_page
);
  if (NBLK < 1 || NBLK > 4) begin : g_bad_nblk
    $error("NBLK must be 1..4: the input bus carries at most four blocks");
  end

  typedef enum logic [2:0] {S_IDLE, S_KEYEXP, S_WHITEN, S_AES_RND, S_SHA_RND, S_FIN} state_e;

  state_e     state;
  mode_e      mode_q;
  logic       enc_q;
  logic [4:0] rnd;
  kstate_t    st;

  // ---------------- key scheduler ----------------
  logic   ks_busy, ks_ready, ks_start;
  logic [3:0] rk_idx;
  logic   rk_invmix;
  block_t rk;

  assign ks_start = (state == S_IDLE) && start && (mode == MODE_AES);

  always_comb begin
    if (state == S_WHITEN)         rk_idx = enc_q ? 4'd0 : 4'd14;
    else if (state == S_AES_RND)   rk_idx = enc_q ? rnd[3:0] : 4'd14 - rnd[3:0];
    else                           rk_idx = 4'd0;
  end
  assign rk_invmix = !enc_q && (state == S_AES_RND) && (rnd != 5'd14);

  aes_key_schedule u_ks (
    .clk, .rst_n, .start(ks_start), .key,
    .busy(ks_busy), .ready(ks_ready),
    .rd_idx(rk_idx), .rd_invmix(rk_invmix), .rk
  );

  // ---------------- AES section: unified ShiftRows + integrated LUT -------
  word_t  aes_t   [NBLK][4][4];
  block_t aes_x   [NBLK];
  block_t aes_sub [NBLK];
  block_t aes_n1  [NBLK];
  block_t aes_n2  [NBLK];

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    block_t shifted;
    aes_shiftrows_unified u_sr (.enc(enc_q), .din(st[128 * b +: 128]), .dout(shifted));
    for (genvar c = 0; c < 4; c++) begin : g_col
      for (genvar r = 0; r < 4; r++) begin : g_row
        word_t mix;
        aes_itable u_it (
          .dec(!enc_q), .din(shifted[127 - 8 * (r + 4 * c) -: 8]),
          .sub(aes_sub[b][127 - 8 * (r + 4 * c) -: 8]), .mix(mix)
        );
        // a byte in row r contributes its row-0 word rotated right by r bytes
        if (r == 0) begin : g_r0
          assign aes_t[b][c][r] = mix;
        end else begin : g_rn
          assign aes_t[b][c][r] = {mix[8 * r - 1 : 0], mix[31 : 8 * r]};
        end
      end
    end
    assign aes_x[b] = (state == S_WHITEN) ? st[128 * b +: 128] : aes_sub[b];
  end

  // ---------------- unified XOR section and SixIE network -----------------
  logic [319:0] sha_c, sha_d;
  kstate_t      sha_next;

  unified_xor #(.NBLK(NBLK)) u_xor (
    .mode(mode_q), .aes_t, .aes_rk(rk), .aes_x, .sha_a(st),
    .aes_n1, .aes_n2, .sha_c, .sha_d
  );

  keccak_sixie u_sixie (.a(st), .d(sha_d), .rnd(rnd), .a_next(sha_next));

  // ---------------- SHA-3 padding / absorb ---------------------------------
  logic [575:0] rate_block;
  sha3_padding u_pad (.din, .len(sha_len), .last(sha_last), .rate_block);

  // ---------------- controller and state register --------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mode_q <= MODE_AES;
      enc_q  <= 1'b1;
      rnd    <= '0;
      st     <= '0;
      done   <= 1'b0;
      dout   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          mode_q <= mode;
          enc_q  <= enc;
          rnd    <= '0;
          if (mode == MODE_AES) begin
            for (int b = 0; b < int'(NBLK); b++) st[128 * b +: 128] <= din[575 - 128 * b -: 128];
            state <= S_KEYEXP;
          end else begin
            st[SHA3_RATE-1:0] <= (sha_first ? '0 : st[SHA3_RATE-1:0]) ^ rate_block;
            if (sha_first) st[1599:SHA3_RATE] <= '0;
            state <= S_SHA_RND;
          end
        end
        S_KEYEXP: if (ks_ready) state <= S_WHITEN;
        S_WHITEN: begin
          for (int b = 0; b < int'(NBLK); b++) st[128 * b +: 128] <= aes_n2[b];
          rnd   <= 5'd1;
          state <= S_AES_RND;
        end
        S_AES_RND: begin
          for (int b = 0; b < int'(NBLK); b++)
            st[128 * b +: 128] <= (rnd == 5'(AES_ROUNDS)) ? aes_n2[b] : aes_n1[b];
          rnd <= rnd + 5'd1;
          if (rnd == 5'(AES_ROUNDS)) state <= S_FIN;
        end
        S_SHA_RND: begin
          st  <= sha_next;
          rnd <= rnd + 5'd1;
          if (rnd == 5'(KECCAK_ROUNDS - 1)) state <= S_FIN;
        end
        S_FIN: begin
          done <= 1'b1;
          if (mode_q == MODE_AES) begin
            dout <= '0;
            for (int b = 0; b < int'(NBLK); b++) dout[511 - 128 * b -: 128] <= st[128 * b +: 128];
          end else begin
            for (int j = 0; j < SHA3_OUT / 8; j++) dout[511 - 8 * j -: 8] <= st[8 * j +: 8];
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ---------------- LED output -------------------------------------------
  led_display u_led (
    .clk, .rst_n, .load(done), .result(dout), .btn_next,
    .led, .page(led_page)
  );

  // ---------------- protocol rules ----------------------------------------
  a_len_range: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy && mode == MODE_SHA3 && sha_last) |-> sha_len <= 7'd71);
  a_ks_in_keyexp: assert property (@(posedge clk) disable iff (!rst_n)
    ks_busy |-> state == S_KEYEXP);
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
endmodule
