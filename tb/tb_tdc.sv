// tb_tdc: asynchronous trigger pulses at random times inside the clock
// period must each give exactly one TDC_TRIGGER pulse three clocks later,
// with the phase bit set when the input rose in the first half of the
// period; software triggers give a pulse one clock later with phase 0.
`timescale 1ns/1ps
module tb_tdc;
  logic clk = 0, a = 0, sw = 0, trig;
  logic [5:0] val;
  always #10 clk = !clk;
  tdc dut (.clk(clk), .async_trig(a), .sw_trig(sw), .tdc_trigger(trig), .tdc_value(val));
  int checks = 0, failures = 0, pulses = 0;
  always @(posedge clk) if (trig) pulses++;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (5) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      int off, p0;
      bit early;
      off = 1 + $urandom_range(0, 17);     // ns after the rising edge
      if (off == 10) off = 11;
      early = off < 10;
      @(posedge clk); #(off); a = 1;
      p0 = pulses;
      @(posedge clk); @(posedge clk);
      #1 check(trig == 0, "not yet");
      @(posedge clk); #1;
      check(trig == 1, $sformatf("pulse offset %0d", off));
      check(val == {5'd0, early}, $sformatf("phase offset %0d val %0d", off, val));
      #40 a = 0;
      repeat (6) @(posedge clk);
      check(pulses == p0 + 1, "single pulse");
    end
    @(negedge clk); sw = 1; @(negedge clk); sw = 0; #1;
    check(trig == 1 && val == 0, "software trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
