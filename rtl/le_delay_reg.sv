// le_delay_reg: load enable delay register of the SDDO coprocessor.
//
// The control unit runs on the rising clock edge and grants input slots
// with its load enable le, one decision per clock.  The datapath, however,
// loads a block on both edges.  Sampling le again at the falling edge would
// see a value the control unit may just have changed, so the falling-edge
// slot replays the value the rising edge used: le is stored at every rising
// edge in le_q and offered for the falling-edge slot that follows.
// The rising slot at edge t and the falling slot at t+T/2 thus form one
// granted pair.
//
// le_slot is the enable that applies to the next loading edge: le while the
// clock is low (a rising edge comes next), le_q while it is high.  The
// phase is tracked with a rising-edge flop and a falling-edge flop, not by
// the clock itself, so le_slot changes only just after an edge.
// With SDDO = 0 only rising edges load and le_slot = le.
// Replaying the rising-edge enable at the falling edge is part of the SDDO
// architecture; the phase-tracking flops are this implementation's choice.
module le_delay_reg #(
  parameter bit SDDO = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic le,        // load enable from the control unit
  output logic le_slot    // enable for the next loading edge
);

  if (SDDO) begin : g_dual
    logic le_q;       // le as sampled by the last rising edge
    logic ph_rise;    // toggled image of the phase, rising-edge flop
    logic ph_fall;    // copy of ph_rise taken at the falling edge

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        le_q    <= 1'b0;
        ph_rise <= 1'b0;
      end else begin
        le_q    <= le;
        ph_rise <= ~ph_fall;
      end
    end

    always_ff @(negedge clk) begin
      if (!rst_n) ph_fall <= 1'b0;
      else        ph_fall <= ph_rise;
    end

    // ph_rise != ph_fall: the last edge was a rising one, a falling one
    // comes next and must replay le_q.
    assign le_slot = (ph_rise ^ ph_fall) ? le_q : le;
  end else begin : g_single
    assign le_slot = le;
  end

endmodule
