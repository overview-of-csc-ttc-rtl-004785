// tb_dead_time: after a TRIGGER pulse the inhibit must stay high for exactly
// dead_time clocks (the TRIGGER clock itself makes the published V+1).
`timescale 1ns/1ps
module tb_dead_time;
  logic clk = 0, srst = 1, trig = 0, inh;
  logic [15:0] dt;
  always #5 clk = !clk;
  dead_time dut (.clk(clk), .srst(srst), .trigger(trig), .dead_clks(dt), .inhibit(inh));
  int checks = 0, failures = 0;
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    @(negedge clk); srst = 0;
    for (int v = 0; v < 12; v++) begin
      int n;
      dt = 16'(v);
      @(negedge clk); trig = 1; @(negedge clk); trig = 0;
      n = 0;
      while (inh) begin n++; @(negedge clk); end
      checks++;
      if (n != v) begin failures++; $display("FAIL v=%0d n=%0d", v, n); end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
