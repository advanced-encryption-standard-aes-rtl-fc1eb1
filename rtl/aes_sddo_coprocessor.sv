// aes_sddo_coprocessor: pipelined AES-128 encryption/decryption coprocessor
// with Single Datapath Dual Output (SDDO).
//
// Parts: the control unit (aes_ctrl), the round key generator (keygen), the
// load enable delay register (le_delay_reg) and the eleven-stage outer-round
// pipelined core (aes128_pipe_core).
//
// Use:
//  1. Pulse key_load for one clock (sampled at a rising edge) with the
//     cipher key on key_in while key_ready is high.  Ten clocks of key
//     expansion follow; in_ready stays low meanwhile.  A key_load while
//     blocks are in flight first lets the pipeline drain.
//  2. Offer blocks: in_data, in_mode (0 = encrypt, 1 = decrypt) and
//     in_valid are sampled at every clock edge, rising and falling, when
//     SDDO = 1 (every rising edge when SDDO = 0).  A block is taken at an
//     edge if in_valid and in_ready are both high just before it.  in_ready
//     changes only just after an edge.
//  3. Each block appears on out_data with out_valid and its out_mode 11
//     loading edges after it was taken (5.5 clocks with SDDO = 1) and is
//     held until the next edge.  Blocks leave in the order they entered.
// Data byte order follows FIPS-197: byte 0 of a block or key is in bits
// [127:120].  Reset is synchronous and active low.
// The partition into control unit, key generator, pipelined core and load
// enable delay register follows the SDDO architecture; the host handshake
// (valid/ready per edge, key_load/key_ready) is this implementation's own.
module aes_sddo_coprocessor
  import aes_pkg::*;
#(
  parameter bit SDDO = 1'b1   // 1: load on both edges, 0: plain pipeline
) (
  input  logic      clk,
  input  logic      rst_n,
  // key interface
  input  logic      key_load,
  input  block_t    key_in,
  output logic      key_ready,
  // block input
  input  logic      in_valid,
  input  aes_mode_e in_mode,
  input  block_t    in_data,
  output logic      in_ready,
  // block output
  output logic      out_valid,
  output aes_mode_e out_mode,
  output block_t    out_data,
  // status
  output logic      busy
);

  logic   kg_capture, kg_start, kg_busy, kg_done;
  logic   le, le_slot, pipe_busy;
  block_t ek [NKEYS];
  block_t dk [NKEYS];
  slot_t  core_in, core_out;

  aes_ctrl u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .key_load   (key_load),
    .kg_done    (kg_done),
    .pipe_busy  (pipe_busy),
    .kg_capture (kg_capture),
    .kg_start   (kg_start),
    .le         (le),
    .key_ready  (key_ready)
  );

  keygen u_keygen (
    .clk         (clk),
    .rst_n       (rst_n),
    .key_capture (kg_capture),
    .key_in      (key_in),
    .start       (kg_start),
    .busy        (kg_busy),
    .done        (kg_done),
    .ek          (ek),
    .dk          (dk)
  );

  le_delay_reg #(.SDDO(SDDO)) u_le_delay (
    .clk     (clk),
    .rst_n   (rst_n),
    .le      (le),
    .le_slot (le_slot)
  );

  assign in_ready = le_slot;

  always_comb begin
    core_in.valid = in_valid && le_slot;
    core_in.mode  = in_mode;
    core_in.data  = in_data;
  end

  aes128_pipe_core #(.SDDO(SDDO)) u_core (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (core_in),
    .ek    (ek),
    .dk    (dk),
    .dout  (core_out),
    .busy  (pipe_busy)
  );

  assign out_valid = core_out.valid;
  assign out_mode  = core_out.mode;
  assign out_data  = core_out.data;
  assign busy      = pipe_busy || kg_busy;

endmodule
