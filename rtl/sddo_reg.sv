// sddo_reg: pipeline register of the Single Datapath Dual Output (SDDO)
// scheme.
//
// With SDDO = 1 the register loads d on both the rising and the falling
// clock edge, so a pipeline built from it moves a new block through every
// stage twice per clock period and delivers two results per clock.  It is
// built as the XOR form of a double-edge flip-flop: a rising-edge flop
// stores d ^ q_fall, a falling-edge flop stores d ^ q_rise, and
// q = q_rise ^ q_fall.  After a rising edge q equals the d sampled there,
// after a falling edge the d sampled there.  The clock never reaches the
// data path, so q cannot glitch on a clock transition.
// With SDDO = 0 it is an ordinary rising-edge register (the plain pipelined
// coprocessor).  Synchronous active-low reset clears q to 0; the reset is
// sampled on both edges.
// Loading on both edges is the SDDO idea itself; the XOR circuit used to
// realise it is this implementation's choice.
module sddo_reg #(
  parameter int unsigned W    = 8,
  parameter bit          SDDO = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] q_rise;

  if (SDDO) begin : g_dual
    logic [W-1:0] q_fall;

    always_ff @(posedge clk) begin
      if (!rst_n) q_rise <= '0;
      else        q_rise <= d ^ q_fall;
    end

    always_ff @(negedge clk) begin
      if (!rst_n) q_fall <= '0;
      else        q_fall <= d ^ q_rise;
    end

    assign q = q_rise ^ q_fall;
  end else begin : g_single
    always_ff @(posedge clk) begin
      if (!rst_n) q_rise <= '0;
      else        q_rise <= d;
    end

    assign q = q_rise;
  end

endmodule
