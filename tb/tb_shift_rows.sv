// tb_shift_rows: checks ShiftRows and InvShiftRows against the reference
// model on random states, and that the two are inverse to each other.
module tb_shift_rows;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  aes_mode_e mode;
  block_t din, dout;

  shift_rows dut (.mode(mode), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t fwd;
    for (int i = 0; i < 200; i++) begin
      din  = rand_blk();
      mode = MODE_ENC;
      #1;
      checks++;
      if (dout !== ref_shift(din, 0)) begin
        failures++;
        $display("ENC mismatch in=%h out=%h", din, dout);
      end
      fwd  = dout;
      din  = fwd;
      mode = MODE_DEC;
      #1;
      checks++;
      if (dout !== ref_shift(fwd, 1)) begin
        failures++;
        $display("DEC mismatch in=%h out=%h", fwd, dout);
      end
    end
    // FIPS-197 Appendix B, round 1: after SubBytes -> after ShiftRows
    din  = 128'hd42711aee0bf98f1b8b45de51e415230;
    mode = MODE_ENC;
    #1;
    checks++;
    if (dout !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
