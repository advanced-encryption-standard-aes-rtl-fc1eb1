// tb_mix_column_word: checks MixColumns / InvMixColumns of one column
// against known columns and the reference model.
module tb_mix_column_word;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  aes_mode_e mode;
  word_t din, dout;

  mix_column_word dut (.mode(mode), .din(din), .dout(dout));

  task automatic check(input aes_mode_e m, input word_t i, input word_t exp);
    mode = m;
    din  = i;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("mismatch mode=%0d in=%h out=%h exp=%h", m, i, dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t b, m;
    check(MODE_ENC, 32'hdb135345, 32'h8e4da1bc);
    check(MODE_DEC, 32'h8e4da1bc, 32'hdb135345);
    check(MODE_ENC, 32'hf20a225c, 32'h9fdc589d);
    check(MODE_ENC, 32'hc6c6c6c6, 32'hc6c6c6c6);
    for (int i = 0; i < 300; i++) begin
      b = rand_blk();
      m = ref_mix(b, i % 2);
      check(aes_mode_e'(i % 2), b[127:96], m[127:96]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
