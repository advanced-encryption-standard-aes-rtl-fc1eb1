// aes_ctrl: control unit of the pipelined SDDO AES-128 coprocessor.
//
// A four-state machine on the rising clock edge:
//   IDLE   no valid round keys; waits for key_load.
//   KEYEXP the key generator is expanding the key (10 clocks); no input
//          slot is granted.
//   RUN    round keys are valid; the load enable le grants every input slot.
//   DRAIN  a new key was loaded while blocks were in flight; no new blocks
//          are granted until the pipeline is empty, then the new key is
//          expanded.  This keeps a block from seeing round keys of two keys.
// key_load is accepted in IDLE, RUN and DRAIN (kg_capture copies the key
// into the key generator's holding register) and ignored during KEYEXP,
// when key_ready is low.  le and key_ready are registered outputs (Moore).
// The architecture calls for a control unit that grants the datapath's
// load enable; the four states, the drain rule and the key_load handling
// are this implementation's own.
module aes_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic key_load,     // host: new cipher key on key_in
  input  logic kg_done,      // key generator: tables complete
  input  logic pipe_busy,    // core: a valid block is in flight
  output logic kg_capture,   // key generator: latch key_in
  output logic kg_start,     // key generator: begin expansion
  output logic le,           // load enable: input slots granted
  output logic key_ready     // a key_load would be accepted now
);

  typedef enum logic [1:0] {
    S_IDLE   = 2'd0,
    S_KEYEXP = 2'd1,
    S_RUN    = 2'd2,
    S_DRAIN  = 2'd3
  } state_e;

  state_e state, state_nxt;

  assign key_ready  = (state != S_KEYEXP);
  assign kg_capture = key_load && key_ready;
  assign le         = (state == S_RUN);

  always_comb begin
    state_nxt = state;
    kg_start  = 1'b0;
    unique case (state)
      S_IDLE:   if (key_load) begin
                  state_nxt = S_KEYEXP;
                  kg_start  = 1'b1;
                end
      S_KEYEXP: if (kg_done) state_nxt = S_RUN;
      S_RUN:    if (key_load) state_nxt = S_DRAIN;
      S_DRAIN:  if (!pipe_busy) begin
                  state_nxt = S_KEYEXP;
                  kg_start  = 1'b1;
                end
      default:  state_nxt = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nxt;
  end

endmodule
