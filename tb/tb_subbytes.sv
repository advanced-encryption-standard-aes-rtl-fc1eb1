// tb_subbytes: checks SubBytes / InvSubBytes of whole states against the
// reference model and the FIPS-197 Appendix B round-1 value.
module tb_subbytes;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  aes_mode_e mode;
  block_t din, dout;

  subbytes dut (.mode(mode), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_ENC;
    din  = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    #1;
    checks++;
    if (dout !== 128'hd42711aee0bf98f1b8b45de51e415230) failures++;
    for (int i = 0; i < 100; i++) begin
      mode = aes_mode_e'(i % 2);
      din  = rand_blk();
      #1;
      checks++;
      if (dout !== ref_sub(din, i % 2)) begin
        failures++;
        $display("mismatch mode=%0d in=%h out=%h", mode, din, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
