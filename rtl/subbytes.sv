// subbytes: SubBytes or InvSubBytes of the whole 128-bit state.
//
// Sixteen subbytes_byte instances, one per state byte, work in parallel.
// Combinational, no latency.
module subbytes
  import aes_pkg::*;
(
  input  aes_mode_e mode,   // MODE_ENC: SubBytes, MODE_DEC: InvSubBytes
  input  block_t    din,
  output block_t    dout
);

  for (genvar k = 0; k < 16; k++) begin : g_byte
    subbytes_byte u_byte (
      .mode (mode),
      .din  (din [127 - 8*k -: 8]),
      .dout (dout[127 - 8*k -: 8])
    );
  end

endmodule
