// tb_mix_columns: checks the full-state MixColumns / InvMixColumns against
// the reference model and the FIPS-197 Appendix B round-1 value.
module tb_mix_columns;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  aes_mode_e mode;
  block_t din, dout;

  mix_columns dut (.mode(mode), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_ENC;
    din  = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    #1;
    checks++;
    if (dout !== 128'h046681e5e0cb199a48f8d37a2806264c) failures++;
    for (int i = 0; i < 300; i++) begin
      mode = aes_mode_e'(i % 2);
      din  = rand_blk();
      #1;
      checks++;
      if (dout !== ref_mix(din, i % 2)) begin
        failures++;
        $display("mismatch mode=%0d in=%h out=%h", mode, din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
