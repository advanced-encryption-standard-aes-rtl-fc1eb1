// subbytes_byte: AES S-box (encryption) or inverse S-box (decryption) of
// one byte, computed in logic rather than read from a table.
//
// Encryption: multiplicative inverse in GF(2^8) followed by the affine map
//   s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// Decryption: the inverse affine map
//   b = rotl(s,1) ^ rotl(s,3) ^ rotl(s,6) ^ 8'h05
// followed by the same multiplicative inverse.  One inverter serves both
// directions.  The inverse is x^254, formed by an addition chain of seven
// squarings and six multiplications; 0 maps to 0 as the standard requires.
// Combinational, no latency.
// Computing the S-box in logic follows the pure-logic goal of the
// architecture; the x^254 addition chain is this implementation's choice.
module subbytes_byte
  import aes_pkg::*;
(
  input  aes_mode_e mode,   // MODE_ENC: S-box, MODE_DEC: inverse S-box
  input  byte_t     din,
  output byte_t     dout
);

  function automatic byte_t rotl8(input byte_t v, input int n);
    return byte_t'((v << n) | (v >> (8 - n)));
  endfunction

  byte_t inv_in;
  byte_t inv_out;
  byte_t x3, x7, x15, x31, x63, x127;

  // Inverse affine map on the decryption path, identity on encryption.
  assign inv_in = (mode == MODE_DEC)
                ? (rotl8(din, 1) ^ rotl8(din, 3) ^ rotl8(din, 6) ^ 8'h05)
                : din;

  // x^254 = x^-1 by the chain x^3, x^7, x^15, x^31, x^63, x^127, x^254.
  always_comb begin
    x3      = gf_mul(gf_mul(inv_in, inv_in), inv_in);
    x7      = gf_mul(gf_mul(x3, x3), inv_in);
    x15     = gf_mul(gf_mul(x7, x7), inv_in);
    x31     = gf_mul(gf_mul(x15, x15), inv_in);
    x63     = gf_mul(gf_mul(x31, x31), inv_in);
    x127    = gf_mul(gf_mul(x63, x63), inv_in);
    inv_out = gf_mul(x127, x127);
  end

  // Forward affine map on the encryption path.
  assign dout = (mode == MODE_ENC)
              ? (inv_out ^ rotl8(inv_out, 1) ^ rotl8(inv_out, 2)
                 ^ rotl8(inv_out, 3) ^ rotl8(inv_out, 4) ^ 8'h63)
              : inv_out;

endmodule
