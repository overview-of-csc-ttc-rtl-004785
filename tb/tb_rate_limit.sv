// tb_rate_limit: random trigger pulses against a reference that keeps the
// times of all triggers; inhibit must be high exactly when the number of
// triggers in the last WINDOW clocks has reached the limit. Run with a short
// window; limit 0 must never inhibit.
`timescale 1ns/1ps
module tb_rate_limit;
  localparam int W = 200;
  logic clk = 0, srst = 1, trig = 0, inh;
  logic [6:0] mx = 5;
  always #5 clk = !clk;
  rate_limit #(.WINDOW(W), .DEPTH(128)) dut (.clk(clk), .srst(srst), .trigger(trig), .max_trig(mx), .inhibit(inh));
  int checks = 0, failures = 0, hits = 0;
  int tq [$];
  int cyc = 0;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    @(negedge clk); srst = 0;
    for (int i = 0; i < 6000; i++) begin
      int n;
      if (i == 4000) mx = 0;
      @(negedge clk); cyc++;
      while (tq.size() > 0 && cyc - tq[0] >= W) void'(tq.pop_front());
      n = tq.size();
      checks++;
      if (inh !== (mx != 0 && n >= mx)) begin failures++; if (failures < 5) $display("FAIL cyc %0d n %0d inh %b", cyc, n, inh); end
      if (inh) hits++;
      trig = !inh && ($urandom_range(0, 19) == 0);
      if (mx == 0) trig = $urandom_range(0, 9) == 0;
      if (trig) tq.push_back(cyc + 1);
    end
    checks++; if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
