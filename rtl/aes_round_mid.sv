// aes_round_mid: one inner-round stage of the outer-round pipeline (AES
// rounds 1..9).
//
// Encryption:  SubBytes, ShiftRows, MixColumns, AddRoundKey(ek[r]).
// Decryption (Equivalent Inverse Cipher):  InvSubBytes, InvShiftRows,
// InvMixColumns, AddRoundKey(dk[r]).
// Both use the same order of steps, so one set of units with a mode input
// does both; the mode travels with the block.  The result is stored in an
// SDDO stage register.  Latency: one loading edge.
module aes_round_mid
  import aes_pkg::*;
#(
  parameter bit SDDO = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  slot_t  din,
  input  block_t key_enc,
  input  block_t key_dec,
  output slot_t  dout
);

  block_t s_sub, s_shift, s_mix;
  slot_t  nxt;

  subbytes u_sub (
    .mode (din.mode),
    .din  (din.data),
    .dout (s_sub)
  );

  shift_rows u_shift (
    .mode (din.mode),
    .din  (s_sub),
    .dout (s_shift)
  );

  mix_columns u_mix (
    .mode (din.mode),
    .din  (s_shift),
    .dout (s_mix)
  );

  always_comb begin
    nxt      = din;
    nxt.data = s_mix ^ ((din.mode == MODE_DEC) ? key_dec : key_enc);
  end

  sddo_reg #(.W($bits(slot_t)), .SDDO(SDDO)) u_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (nxt),
    .q     (dout)
  );

endmodule
