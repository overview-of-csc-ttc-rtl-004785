// tb_ts_counter: the timestamp counts clocks from the synchronous reset,
// including across bit 12 (the split between the two record words).
`timescale 1ns/1ps
module tb_ts_counter;
  logic clk = 0, srst = 1;
  logic [39:0] ts;
  always #5 clk = !clk;
  ts_counter #(.WIDTH(40)) dut (.clk(clk), .srst(srst), .ts(ts));
  int checks = 0, failures = 0;
  initial begin
    @(negedge clk); @(negedge clk); srst = 0;
    checks++; if (ts != 0) failures++;
    for (int i = 1; i < 5000; i++) begin
      @(negedge clk);
      checks++; if (ts != 40'(i)) begin failures++; if (failures < 5) $display("FAIL %0d %0d", i, ts); end
    end
    srst = 1; @(negedge clk); checks++; if (ts != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
