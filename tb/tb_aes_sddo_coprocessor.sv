// tb_aes_sddo_coprocessor: end-to-end test of the coprocessor at its
// default configuration (SDDO on).
//
// The host side loads a key, streams a random mix of encryptions and
// decryptions offered at every clock edge (with occasional idle slots),
// changes the key while blocks are in flight and streams again.  Every
// result is compared with an independent reference cipher, in order, and
// its latency must be exactly 11 loading edges (5.5 clocks).  A full-rate
// burst must deliver two results per clock.  The test also counts each
// mechanism of the design and fails if one never occurred:
//   stall    blocks offered but refused (no key yet / key expansion)
//   dual     clocks in which results left at both edges
//   switch   accepted blocks whose mode differs from the previous one
//   drain    edges with input refused while old blocks still drain
//   bubble   idle input slots inside a stream
module tb_aes_sddo_coprocessor;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int LAT = 11;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic key_load = 1'b0, key_ready;
  block_t key_in = '0;
  logic in_valid = 1'b0, in_ready;
  aes_mode_e in_mode = MODE_ENC;
  block_t in_data = '0;
  logic out_valid;
  aes_mode_e out_mode;
  block_t out_data;
  logic busy;

  always #5 clk = ~clk;

  aes_sddo_coprocessor dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int edge_no; aes_mode_e mode; block_t exp; } exp_t;
  exp_t q [$];

  int        edge_no = 0;
  block_t    cur_key, pend_key;
  logic      key_pending = 1'b0;
  int        n_stall = 0, n_dual = 0, n_switch = 0, n_drain = 0, n_bubble = 0;
  int        n_out = 0;
  aes_mode_e last_mode = MODE_ENC;
  logic      prev_out_rise = 1'b0;
  int        out_edge [$];   // edge number of every result, in order

  // Monitor: at every edge, record the block the coprocessor takes.  The
  // inputs are driven 1 time unit after an edge, so here they hold the
  // values the design samples.
  always @(clk) begin
    if (rst_n) begin
      if (clk && key_load && key_ready) begin
        pend_key    = key_in;
        key_pending = 1'b1;
      end
      if (key_pending && !in_ready && !(clk && key_load)) begin
        cur_key     = pend_key;   // old blocks drain with the old key
        key_pending = 1'b0;
      end
      if (in_valid && !in_ready) begin
        n_stall++;
        if (busy && key_ready) n_drain++;
      end
      if (!in_valid) n_bubble++;
      if (in_valid && in_ready) begin
        exp_t e;
        e.edge_no = edge_no + 1;
        e.mode    = in_mode;
        e.exp     = (in_mode == MODE_ENC) ? ref_encrypt(cur_key, in_data)
                                          : ref_decrypt(cur_key, in_data);
        q.push_back(e);
        if (in_mode != last_mode) n_switch++;
        last_mode = in_mode;
      end
    end
  end

  // Checker: just after every edge, compare a result with the oldest
  // expected one.
  always @(clk) begin
    logic rising;
    rising = clk;
    #1;
    edge_no++;
    if (out_valid) begin
      exp_t e;
      n_out++;
      out_edge.push_back(edge_no);
      if (!rising && prev_out_rise) n_dual++;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output %h", out_data);
      end else begin
        e = q.pop_front();
        if (out_data !== e.exp || out_mode !== e.mode) begin
          failures++;
          $display("edge %0d: out=%h mode=%0d, expected %h mode=%0d",
                   edge_no, out_data, out_mode, e.exp, e.mode);
        end
        checks++;
        if (edge_no - e.edge_no != LAT - 1) begin
          failures++;
          $display("latency %0d edges, expected %0d", edge_no - e.edge_no + 1, LAT);
        end
      end
    end
    if (rising) prev_out_rise = out_valid;
  end

  // Offer one block (or an idle slot) for the coming edge and wait until
  // the checker has looked at the outputs after it.
  task automatic offer(input logic valid, input aes_mode_e mode, input block_t data);
    in_valid = valid;
    in_mode  = mode;
    in_data  = data;
    @(clk);
    #2;
    in_valid = 1'b0;
  endtask

  // Request a key change; key_load is sampled at the next rising edge.
  task automatic load_key(input block_t key);
    while (clk) offer(1'b0, MODE_ENC, '0);   // get into the low phase
    checks++;
    if (!key_ready) begin
      failures++;
      $display("key_ready low before key_load");
    end
    key_load = 1'b1;
    key_in   = key;
    offer(1'b0, MODE_ENC, '0);               // this edge is rising
    key_load = 1'b0;
    key_in   = rand_blk();
    // the falling edge after it still belongs to the old key
    while (in_ready) offer(1'b0, MODE_ENC, '0);
  endtask

  task automatic stream(input int n, input int idle_pct);
    for (int i = 0; i < n; i++) begin
      logic v;
      v = ($urandom % 100) >= idle_pct;
      offer(v, aes_mode_e'($urandom % 2), rand_blk());
    end
  endtask

  initial begin
    int n_before;
    repeat (3) @(posedge clk);
    #2;
    rst_n = 1'b1;
    // no key yet: blocks are refused
    for (int i = 0; i < 4; i++) offer(1'b1, MODE_ENC, rand_blk());
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("block taken without a key");
    end

    // first key: FIPS-197 Appendix C.1 key
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    while (!in_ready) offer(1'b1, MODE_ENC, 128'h00112233445566778899aabbccddeeff);
    // known-answer blocks first: one encryption, one decryption
    offer(1'b1, MODE_ENC, 128'h00112233445566778899aabbccddeeff);
    offer(1'b1, MODE_DEC, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    checks++;
    if (q[0].exp !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a ||
        q[1].exp !== 128'h00112233445566778899aabbccddeeff) begin
      failures++;
      $display("FIPS-197 C.1 known answers not taken as expected");
    end

    // full-rate burst: 64 blocks on 64 consecutive edges
    n_before = n_out + q.size();
    for (int i = 0; i < 64; i++) offer(1'b1, aes_mode_e'(i % 3 == 0), rand_blk());
    while (n_out < n_before + 64) offer(1'b0, MODE_ENC, '0);
    // 64 results on consecutive edges (32 clocks): 63 edges first to last
    checks++;
    if (out_edge[n_before + 63] - out_edge[n_before] != 63) begin
      failures++;
      $display("burst took %0d edges for 64 results",
               out_edge[n_before + 63] - out_edge[n_before] + 1);
    end

    // random stream, then a key change (FIPS-197 Appendix B key) in flight
    stream(150, 15);
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    while (!in_ready) offer(1'b1, MODE_DEC, rand_blk());
    offer(1'b1, MODE_ENC, 128'h3243f6a8885a308d313198a2e0370734);
    checks++;
    if (q[q.size()-1].exp !== 128'h3925841d02dc09fbdc118597196a0b32) begin
      failures++;
      $display("FIPS-197 B known answer not taken with the new key");
    end
    stream(150, 15);
    // key change with the pipeline already empty
    while (busy) offer(1'b0, MODE_ENC, '0);
    load_key(rand_blk());
    while (!in_ready) offer(1'b0, MODE_ENC, '0);
    stream(100, 30);
    while (busy) offer(1'b0, MODE_ENC, '0);

    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results missing", q.size());
    end
    $display("results=%0d stall=%0d dual=%0d switch=%0d drain=%0d bubble=%0d",
             n_out, n_stall, n_dual, n_switch, n_drain, n_bubble);
    checks += 5;
    if (n_stall == 0)  begin failures++; $display("no stall seen");       end
    if (n_dual == 0)   begin failures++; $display("no dual output seen"); end
    if (n_switch == 0) begin failures++; $display("no mode switch seen"); end
    if (n_drain == 0)  begin failures++; $display("no drain seen");       end
    if (n_bubble == 0) begin failures++; $display("no bubble seen");      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
