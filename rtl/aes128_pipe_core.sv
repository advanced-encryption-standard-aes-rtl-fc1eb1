// aes128_pipe_core: full outer-round pipelined AES-128 core for encryption
// and decryption.
//
// Eleven stages in a row: the initial round (AddRoundKey), nine inner
// rounds and the final round, each ending in its own stage register, so
// eleven blocks can be in flight at once.  Every stage holds the round keys
// of both operations and picks the one matching the mode that travels with
// its block, so encryptions and decryptions may be freely interleaved.
//
// With SDDO = 1 (Single Datapath Dual Output) every stage register loads on
// both clock edges: a block can enter on every edge, two per clock, and
// leaves 11 edges (5.5 clocks) later.  With SDDO = 0 the same core is the
// plain pipelined design: one block per clock, latency 11 clocks.
//
// din is the block offered for the next loading edge; din.valid must
// already include the control unit's grant.  busy is high while any stage
// holds a valid block.
module aes128_pipe_core
  import aes_pkg::*;
#(
  parameter bit SDDO = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  slot_t  din,
  input  block_t ek [NKEYS],   // encryption round keys 0..10
  input  block_t dk [NKEYS],   // decryption round keys 0..10
  output slot_t  dout,
  output logic   busy
);

  slot_t st [NKEYS];   // output of stage r

  aes_round_init #(.SDDO(SDDO)) u_round0 (
    .clk     (clk),
    .rst_n   (rst_n),
    .din     (din),
    .key_enc (ek[0]),
    .key_dec (dk[0]),
    .dout    (st[0])
  );

  for (genvar r = 1; r < NR; r++) begin : g_round
    aes_round_mid #(.SDDO(SDDO)) u_round (
      .clk     (clk),
      .rst_n   (rst_n),
      .din     (st[r-1]),
      .key_enc (ek[r]),
      .key_dec (dk[r]),
      .dout    (st[r])
    );
  end

  aes_round_final #(.SDDO(SDDO)) u_round_last (
    .clk     (clk),
    .rst_n   (rst_n),
    .din     (st[NR-1]),
    .key_enc (ek[NR]),
    .key_dec (dk[NR]),
    .dout    (st[NR])
  );

  assign dout = st[NR];

  always_comb begin
    busy = 1'b0;
    for (int r = 0; r < int'(NKEYS); r++) busy |= st[r].valid;
  end

endmodule
