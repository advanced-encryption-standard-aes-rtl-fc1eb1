// aes_pkg: types, constants and GF(2^8) helper functions shared by the
// AES-128 pipelined coprocessor.
//
// State layout (FIPS-197 convention): a 128-bit block holds bytes
// in0..in15 with in0 in bits [127:120].  Byte k sits at row k%4, column k/4
// of the 4x4 state, so each 32-bit word [127-32c -: 32] is one column.
//
// The GF(2^8) arithmetic uses the AES field polynomial x^8+x^4+x^3+x+1.
// All functions are pure combinational logic (no look-up tables), which is
// the "pure logic" style the design targets for portability.
package aes_pkg;

  localparam int unsigned NR     = 10;  // number of rounds (AES-128)
  localparam int unsigned NKEYS  = NR + 1;

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;

  // Operation of a block travelling through the pipeline.
  typedef enum logic {
    MODE_ENC = 1'b0,
    MODE_DEC = 1'b1
  } aes_mode_e;

  // One pipeline slot: a block with its valid flag and its operation.
  typedef struct packed {
    logic      valid;
    aes_mode_e mode;
    block_t    data;
  } slot_t;

  // Multiply by x (i.e. {02}) in GF(2^8).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiplication by shift-and-add.
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p;
    byte_t t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Round constant of round r (1..10): x^(r-1) in GF(2^8).
  function automatic byte_t rcon(input int unsigned r);
    byte_t c;
    c = 8'h01;
    for (int unsigned i = 1; i < 10; i++)
      if (i < r) c = xtime(c);
    return c;
  endfunction

endpackage
