// keygen: round key generator for AES-128, encryption and decryption.
//
// The cipher key is captured by key_capture into a holding register, so a
// new key can be accepted while the pipeline still uses the old round keys.
// A start pulse copies it (or key_in, if key_capture is high in the same
// clock) into the key table and then runs the forward key
// schedule one round per clock: ten clocks after start all eleven
// encryption round keys ek[0..10] are stored and done pulses for one clock.
//
// For decryption the coprocessor uses the Equivalent Inverse Cipher, whose
// round keys are the encryption keys in reverse order with InvMixColumns
// applied to the nine inner ones:
//   dk[0] = ek[10],  dk[r] = InvMixColumns(ek[10-r]) for r = 1..9,
//   dk[10] = ek[0].
// Each key is converted as it is produced, by one shared InvMixColumns unit,
// so both tables are complete when done pulses.  SubWord uses four logic
// S-boxes, the same unit as the datapath.
//
// Timing: start at rising edge t, ek/dk valid and done = 1 after rising edge
// t+10.  The tables hold their values between expansions.
// The forward/reverse key schedules follow AES; the one-round-per-clock
// timing, the stored tables and the holding register are choices of this
// implementation.
module keygen
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_capture,       // load key_in into the holding register
  input  block_t key_in,            // cipher key, first key byte in [127:120]
  input  logic   start,             // begin expansion of the held key
  output logic   busy,              // expansion in progress
  output logic   done,              // one-clock pulse: tables complete
  output block_t ek [NKEYS],        // encryption round keys, round 0..10
  output block_t dk [NKEYS]         // decryption round keys, stage 0..10
);

  block_t      key_hold;
  block_t      key_start;  // key used by a start: key_in if captured now
  block_t      w;          // last round key produced
  byte_t       rc;         // round constant of the next round
  logic [3:0]  rnd;        // index of the next round key to produce

  // One step of the forward key schedule.
  word_t  rot, sub, temp;
  block_t nxt, nxt_inv;

  assign rot = {w[23:0], w[31:24]};   // RotWord of the last word
  assign key_start = key_capture ? key_in : key_hold;

  for (genvar i = 0; i < 4; i++) begin : g_subword
    subbytes_byte u_sbox (
      .mode (MODE_ENC),
      .din  (rot[31 - 8*i -: 8]),
      .dout (sub[31 - 8*i -: 8])
    );
  end

  always_comb begin
    temp = sub ^ {rc, 24'h0};
    nxt[127:96] = w[127:96] ^ temp;
    nxt[95:64]  = w[95:64]  ^ nxt[127:96];
    nxt[63:32]  = w[63:32]  ^ nxt[95:64];
    nxt[31:0]   = w[31:0]   ^ nxt[63:32];
  end

  mix_columns u_invmix (
    .mode (MODE_DEC),
    .din  (nxt),
    .dout (nxt_inv)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      key_hold <= '0;
      w        <= '0;
      rc       <= 8'h01;
      rnd      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      for (int i = 0; i < int'(NKEYS); i++) begin
        ek[i] <= '0;
        dk[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (key_capture) key_hold <= key_in;
      if (start) begin
        w          <= key_start;
        ek[0]      <= key_start;
        dk[NR]     <= key_start;
        rc         <= 8'h01;
        rnd        <= 4'd1;
        busy       <= 1'b1;
      end else if (busy) begin
        w       <= nxt;
        rc      <= xtime(rc);
        ek[rnd] <= nxt;
        if (rnd == 4'(NR)) begin
          dk[0] <= nxt;
          busy  <= 1'b0;
          done  <= 1'b1;
        end else begin
          dk[4'(NR) - rnd] <= nxt_inv;
          rnd              <= rnd + 4'd1;
        end
      end
    end
  end

endmodule
