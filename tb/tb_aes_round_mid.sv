// tb_aes_round_mid: checks an inner-round stage (SubBytes, ShiftRows,
// MixColumns, AddRoundKey, or their inverses for decryption) against the
// reference model after every clock edge, valid and mode fields included.
module tb_aes_round_mid;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  slot_t din, dout;
  block_t key_enc, key_dec;

  always #5 clk = ~clk;

  aes_round_mid #(.SDDO(1'b1)) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    key_enc = rand_blk();
    key_dec = rand_blk();
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      slot_t exp;
      din.valid = 1'($urandom);
      din.mode  = aes_mode_e'($urandom % 2);
      din.data  = rand_blk();
      exp       = din;
      exp.data  = ref_mix(ref_shift(ref_sub(din.data, din.mode), din.mode), din.mode) ^ (din.mode == MODE_DEC ? key_dec : key_enc);
      @(clk);
      #1;
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("out=%h expected %h", dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
