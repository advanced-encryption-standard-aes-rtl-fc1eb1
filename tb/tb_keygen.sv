// tb_keygen: runs the round key generator on the FIPS-197 key and random
// keys, checks all eleven encryption and decryption round keys against the
// reference key expansion and checks that done comes ten clocks after start.
module tb_keygen;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic key_capture = 1'b0, start = 1'b0, busy, done;
  block_t key_in = '0;
  block_t ek [NKEYS];
  block_t dk [NKEYS];

  always #5 clk = ~clk;

  keygen dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_key(input block_t key, input bit same_clock);
    blk_t rk [11];
    int   cyc;
    ref_expand(key, rk);
    @(negedge clk);
    key_in = key;
    key_capture = 1'b1;
    if (!same_clock) begin
      @(negedge clk);
      key_capture = 1'b0;
      key_in = rand_blk();         // holding register must keep the key
    end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    key_capture = 1'b0;
    key_in = rand_blk();
    // cyc counts rising edges after the one that sampled start
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 10) begin
      failures++;
      $display("done %0d clocks after start, expected 10", cyc);
    end
    // a capture after completion must not disturb the tables
    key_capture = 1'b1;
    @(negedge clk);
    key_capture = 1'b0;
    for (int r = 0; r < 11; r++) begin
      checks += 2;
      if (ek[r] !== rk[r]) begin
        failures++;
        $display("ek[%0d]=%h expected %h", r, ek[r], rk[r]);
      end
      if (dk[r] !== ((r == 0 || r == 10) ? rk[10 - r] : ref_mix(rk[10 - r], 1))) begin
        failures++;
        $display("dk[%0d]=%h wrong", r, dk[r]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b0);
    checks++;
    if (ek[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
    run_key(128'h000102030405060708090a0b0c0d0e0f, 1'b1);
    for (int i = 0; i < 6; i++) run_key(rand_blk(), i % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
