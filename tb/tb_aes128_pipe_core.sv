// tb_aes128_pipe_core: streams a mix of encryptions and decryptions into
// the SDDO pipeline at both clock edges, with random gaps, and checks every
// result against the reference cipher, the order of results, the latency
// of exactly 11 loading edges and two results per clock at full rate.
module tb_aes128_pipe_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int LAT = 11;   // loading edges from input to output

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  slot_t din, dout;
  block_t ek [NKEYS];
  block_t dk [NKEYS];
  logic busy;

  always #5 clk = ~clk;

  aes128_pipe_core #(.SDDO(1'b1)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int edge_no; aes_mode_e mode; block_t exp; } exp_t;
  exp_t q [$];

  initial begin
    blk_t   rk [11];
    block_t key;
    int     edge_no, n_out, n_enc, n_dec, back_to_back;
    logic   prev_out;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    ref_expand(key, rk);
    for (int r = 0; r < 11; r++) begin
      ek[r] = rk[r];
      dk[r] = (r == 0 || r == 10) ? rk[10 - r] : ref_mix(rk[10 - r], 1);
    end
    din = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    edge_no = 0; n_out = 0; n_enc = 0; n_dec = 0; back_to_back = 0;
    prev_out = 1'b0;
    for (int i = 0; i < 400; i++) begin
      // offer the block for the coming edge
      din.valid = (i < 360) && (i < 100 || ($urandom % 4) != 0);
      din.mode  = aes_mode_e'($urandom % 2);
      din.data  = (i == 0) ? 128'h00112233445566778899aabbccddeeff : rand_blk();
      if (din.valid) begin
        exp_t e;
        e.edge_no = edge_no + 1;
        e.mode    = din.mode;
        e.exp     = (din.mode == MODE_ENC) ? ref_encrypt(key, din.data)
                                           : ref_decrypt(key, din.data);
        if (i == 0 && din.mode == MODE_ENC && e.exp !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a)
          failures++;
        q.push_back(e);
      end
      @(clk);
      edge_no++;
      #1;
      if (dout.valid) begin
        exp_t e;
        n_out++;
        if (prev_out) back_to_back++;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("unexpected output %h", dout.data);
        end else begin
          e = q.pop_front();
          if (dout.data !== e.exp || dout.mode !== e.mode) begin
            failures++;
            $display("edge %0d: out=%h mode=%0d, expected %h mode=%0d",
                     edge_no, dout.data, dout.mode, e.exp, e.mode);
          end
          checks++;
          if (edge_no - e.edge_no != LAT - 1) begin
            failures++;
            $display("latency %0d edges, expected %0d", edge_no - e.edge_no + 1, LAT);
          end
          if (e.mode == MODE_ENC) n_enc++; else n_dec++;
        end
      end
      prev_out = dout.valid;
    end
    checks++;
    if (q.size() != 0 || busy) begin
      failures++;
      $display("%0d blocks lost, busy=%b", q.size(), busy);
    end
    // full rate: results on consecutive edges, i.e. two per clock
    checks++;
    if (back_to_back < 80 || n_enc == 0 || n_dec == 0) failures++;
    $display("outputs=%0d enc=%0d dec=%0d back_to_back=%0d", n_out, n_enc, n_dec, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
