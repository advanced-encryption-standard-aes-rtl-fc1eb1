// tb_sddo_reg: drives a new value before every clock edge and checks that
// the dual-edge register (SDDO = 1) shows it after every edge, while the
// single-edge variant (SDDO = 0) only follows rising edges.
module tb_sddo_reg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0] d = '0, q2, q1;

  always #5 clk = ~clk;

  sddo_reg #(.W(16), .SDDO(1'b1)) dut2 (.clk(clk), .rst_n(rst_n), .d(d), .q(q2));
  sddo_reg #(.W(16), .SDDO(1'b0)) dut1 (.clk(clk), .rst_n(rst_n), .d(d), .q(q1));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] last_rise;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q2 !== '0 || q1 !== '0) failures++;   // reset value
    rst_n = 1'b1;
    last_rise = '0;
    for (int i = 0; i < 200; i++) begin
      logic [15:0] v;
      logic rising;
      v = 16'($urandom);
      d = v;
      @(clk);
      rising = clk;
      #1;
      if (rising) last_rise = v;
      checks += 2;
      if (q2 !== v) begin
        failures++;
        $display("dual-edge q=%h expected %h", q2, v);
      end
      if (q1 !== last_rise) begin
        failures++;
        $display("single-edge q=%h expected %h", q1, last_rise);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
