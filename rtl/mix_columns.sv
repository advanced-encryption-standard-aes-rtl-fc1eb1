// mix_columns: MixColumns or InvMixColumns of the whole 128-bit state.
//
// Four mix_column_word instances, one per state column, work in parallel.
// Combinational, no latency.
module mix_columns
  import aes_pkg::*;
(
  input  aes_mode_e mode,   // MODE_ENC: MixColumns, MODE_DEC: InvMixColumns
  input  block_t    din,
  output block_t    dout
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    mix_column_word u_word (
      .mode (mode),
      .din  (din [127 - 32*c -: 32]),
      .dout (dout[127 - 32*c -: 32])
    );
  end

endmodule
