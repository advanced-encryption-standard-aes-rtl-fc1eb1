// aes_round_init: first stage of the outer-round pipeline (initial round).
//
// Adds (XOR) round key 0 of the block's own operation to the incoming block
// and stores the result, together with its valid flag and mode, in an SDDO
// stage register.  For encryption the key is ek[0], for decryption the
// Equivalent Inverse Cipher key dk[0] (= ek[10]).
// Latency: one loading edge (half a clock with SDDO = 1, one clock with
// SDDO = 0).
module aes_round_init
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

  slot_t nxt;

  always_comb begin
    nxt      = din;
    nxt.data = din.data ^ ((din.mode == MODE_DEC) ? key_dec : key_enc);
  end

  sddo_reg #(.W($bits(slot_t)), .SDDO(SDDO)) u_reg (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (nxt),
    .q     (dout)
  );

endmodule
