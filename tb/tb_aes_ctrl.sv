// tb_aes_ctrl: walks the control unit through key expansion, streaming,
// a key change with blocks in flight (drain) and a key_load during
// expansion, checking its outputs at every clock.
module tb_aes_ctrl;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic key_load = 1'b0, kg_done = 1'b0, pipe_busy = 1'b0;
  logic kg_capture, kg_start, le, key_ready;

  always #5 clk = ~clk;

  aes_ctrl dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check outputs in the middle of the low phase
  task automatic expect_out(input logic cap, input logic st, input logic l,
                            input logic kr, input string what);
    #1;
    checks++;
    if ({kg_capture, kg_start, le, key_ready} !== {cap, st, l, kr}) begin
      failures++;
      $display("%s: capture=%b start=%b le=%b key_ready=%b, expected %b%b%b%b",
               what, kg_capture, kg_start, le, key_ready, cap, st, l, kr);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    expect_out(0, 0, 0, 1, "idle");
    key_load = 1'b1;
    expect_out(1, 1, 0, 1, "key load in idle");
    @(negedge clk);
    key_load = 1'b0;
    expect_out(0, 0, 0, 0, "expanding");
    key_load = 1'b1;                     // ignored while expanding
    expect_out(0, 0, 0, 0, "key load while expanding");
    @(negedge clk);
    key_load = 1'b0;
    repeat (7) @(negedge clk);
    kg_done = 1'b1;
    expect_out(0, 0, 0, 0, "done pulse");
    @(negedge clk);
    kg_done = 1'b0;
    expect_out(0, 0, 1, 1, "run");
    repeat (5) begin
      @(negedge clk);
      expect_out(0, 0, 1, 1, "run held");
    end
    pipe_busy = 1'b1;
    key_load  = 1'b1;
    expect_out(1, 0, 1, 1, "key load in run");
    @(negedge clk);
    key_load = 1'b0;
    expect_out(0, 0, 0, 1, "drain, busy");
    @(negedge clk);
    expect_out(0, 0, 0, 1, "drain, still busy");
    pipe_busy = 1'b0;
    expect_out(0, 1, 0, 1, "drain done");
    @(negedge clk);
    expect_out(0, 0, 0, 0, "expanding new key");
    kg_done = 1'b1;
    @(negedge clk);
    kg_done = 1'b0;
    expect_out(0, 0, 1, 1, "run again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
