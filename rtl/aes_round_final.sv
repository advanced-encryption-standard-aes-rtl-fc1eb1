// aes_round_final: last stage of the outer-round pipeline (AES round 10).
//
// Encryption:  SubBytes, ShiftRows, AddRoundKey(ek[10]).
// Decryption:  InvSubBytes, InvShiftRows, AddRoundKey(dk[10] = ek[0]).
// There is no MixColumns step in the final round.  The result is stored in
// an SDDO stage register, which is the coprocessor's output register.
// Latency: one loading edge.
module aes_round_final
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

  block_t s_sub, s_shift;
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

  always_comb begin
    nxt      = din;
    nxt.data = s_shift ^ ((din.mode == MODE_DEC) ? key_dec : key_enc);
  end

  sddo_reg #(.W($bits(slot_t)), .SDDO(SDDO)) u_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (nxt),
    .q     (dout)
  );

endmodule
