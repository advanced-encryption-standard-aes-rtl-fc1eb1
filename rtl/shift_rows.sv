// shift_rows: ShiftRows (encryption) or InvShiftRows (decryption) of a
// 128-bit AES state.
//
// Row r of the state is rotated left by r byte positions for encryption and
// right by r positions for decryption; row 0 is unchanged.  The permutation
// is pure wiring selected by the mode input, so one module serves both
// directions, as the design's shared encrypt/decrypt datapath requires.
// Purely combinational, no latency.
module shift_rows
  import aes_pkg::*;
(
  input  aes_mode_e mode,   // MODE_ENC: ShiftRows, MODE_DEC: InvShiftRows
  input  block_t    din,
  output block_t    dout
);

  // Output byte (row r, column c) takes input column (c+r)%4 for
  // encryption and (c-r)%4 for decryption, row r in both cases.
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int SRC_ENC = 4*((c + r) % 4) + r;
      localparam int SRC_DEC = 4*((c + 4 - r) % 4) + r;
      localparam int DST     = 4*c + r;
      assign dout[127 - 8*DST -: 8] = (mode == MODE_ENC) ? din[127 - 8*SRC_ENC -: 8]
                                                         : din[127 - 8*SRC_DEC -: 8];
    end
  end

endmodule
