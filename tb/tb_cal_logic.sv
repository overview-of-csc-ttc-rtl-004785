// tb_cal_logic: CAL is the registered OR of the enabled sources, for all
// enable and source combinations.
`timescale 1ns/1ps
module tb_cal_logic;
  logic clk = 0, et, es, t, s, cal;
  always #5 clk = !clk;
  cal_logic dut (.clk(clk), .cal_en_tdc(et), .cal_en_stg(es), .tdc_trigger(t), .stg_trigger(s), .cal(cal));
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 64; i++) begin
      logic e;
      @(negedge clk); {et, es, t, s} = 4'(i);
      e = (et & t) | (es & s);
      @(posedge clk); #1; checks++;
      if (cal !== e) begin failures++; $display("FAIL %b", 4'(i)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
