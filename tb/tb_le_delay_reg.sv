// tb_le_delay_reg: changes the load enable only at rising edges, as the
// control unit does, and checks that the enable offered for every falling
// edge equals the one the preceding rising edge used.
module tb_le_delay_reg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic le = 1'b0, le_slot;

  always #5 clk = ~clk;

  le_delay_reg #(.SDDO(1'b1)) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic used_rise;
    int   toggles;
    toggles = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      #1;
      // low phase: the coming rising edge uses the current le
      checks++;
      if (le_slot !== le) begin
        failures++;
        $display("low phase: le_slot=%b le=%b", le_slot, le);
      end
      used_rise = le;
      @(posedge clk);
      #1;
      le = ($urandom % 3) != 0;   // control unit decision after the edge
      if (le != used_rise) toggles++;
      #1;
      // high phase: the falling edge replays what the rising edge used
      checks++;
      if (le_slot !== used_rise) begin
        failures++;
        $display("high phase: le_slot=%b, rising edge used %b", le_slot, used_rise);
      end
    end
    checks++;
    if (toggles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
