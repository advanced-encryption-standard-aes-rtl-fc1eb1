// tb_subbytes_byte: exhaustive check of the logic S-box and inverse S-box
// over all 256 inputs against the reference model.
module tb_subbytes_byte;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  aes_mode_e mode;
  byte_t din, dout;

  subbytes_byte dut (.mode(mode), .din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      byte_t s;
      s    = ref_sbox(8'(x));
      mode = MODE_ENC;
      din  = 8'(x);
      #1;
      checks++;
      if (dout !== s) begin
        failures++;
        $display("S-box(%h) = %h, expected %h", x, dout, s);
      end
      mode = MODE_DEC;
      din  = s;
      #1;
      checks++;
      if (dout !== 8'(x)) begin
        failures++;
        $display("InvS-box(%h) = %h, expected %h", s, dout, x);
      end
    end
    // two well-known table entries
    mode = MODE_ENC; din = 8'h53; #1; checks++; if (dout !== 8'hed) failures++;
    mode = MODE_ENC; din = 8'h00; #1; checks++; if (dout !== 8'h63) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
