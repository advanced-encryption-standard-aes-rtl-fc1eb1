// mix_column_word: MixColumns or InvMixColumns of one 32-bit state column.
//
// Each output byte is a GF(2^8) dot product of the column with a row of the
// circulant matrix {02,03,01,01} (encryption) or {0e,0b,0d,09}
// (decryption).  Multiplications by constants are built from xtime
// (multiply by {02}) and XOR, so the block is pure logic.  The column's
// first byte (row 0) is in bits [31:24].  Combinational, no latency.
module mix_column_word
  import aes_pkg::*;
(
  input  aes_mode_e mode,   // MODE_ENC: MixColumns, MODE_DEC: InvMixColumns
  input  word_t     din,
  output word_t     dout
);

  byte_t a [4];
  byte_t x2 [4];
  byte_t x4 [4];
  byte_t x8 [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a[i]  = din[31 - 8*i -: 8];
      x2[i] = xtime(a[i]);
      x4[i] = xtime(x2[i]);
      x8[i] = xtime(x4[i]);
    end
    for (int i = 0; i < 4; i++) begin
      if (mode == MODE_ENC) begin
        // 02*a0 ^ 03*a1 ^ a2 ^ a3 (indices rotate with the output row)
        dout[31 - 8*i -: 8] = x2[i] ^ (x2[(i+1)%4] ^ a[(i+1)%4])
                              ^ a[(i+2)%4] ^ a[(i+3)%4];
      end else begin
        // 0e*a0 ^ 0b*a1 ^ 0d*a2 ^ 09*a3
        dout[31 - 8*i -: 8] = (x8[i] ^ x4[i] ^ x2[i])
                              ^ (x8[(i+1)%4] ^ x2[(i+1)%4] ^ a[(i+1)%4])
                              ^ (x8[(i+2)%4] ^ x4[(i+2)%4] ^ a[(i+2)%4])
                              ^ (x8[(i+3)%4] ^ a[(i+3)%4]);
      end
    end
  end

endmodule
