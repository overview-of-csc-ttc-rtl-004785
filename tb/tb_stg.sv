// tb_stg: checks the synchronous trigger generator against the published
// one-shot example (PERIOD 8, BURST_N 2, BURST_I 4: triggers PERIOD+1 and
// PERIOD+1+BURST_I clocks after the TDC trigger), a periodic burst pattern,
// and that a zero burst count and the synchronous reset give no triggers.
`timescale 1ns/1ps
module tb_stg;
  logic clk = 0, srst = 1, one_shot = 0, tdc = 0, trig;
  logic [15:0] period = 8;
  logic [6:0] bn = 2;
  logic [7:0] bi = 4;
  always #5 clk = !clk;
  stg dut (.clk(clk), .srst(srst), .period(period), .burst_n(bn), .burst_i(bi),
           .one_shot(one_shot), .tdc_trigger(tdc), .stg_trigger(trig));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  int cyc = 0;
  int times [$];
  int tdc_t = 0;
  always @(posedge clk) begin cyc++; if (trig && !srst) times.push_back(cyc); if (tdc) tdc_t = cyc; end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    one_shot = 1;
    repeat (3) @(posedge clk); srst <= 0;
    repeat (3) @(posedge clk);
    times.delete();
    tdc <= 1; @(posedge clk); tdc <= 0;
    repeat (30) @(posedge clk);
    check(times.size() == 2, $sformatf("one-shot count %0d %p ", times.size(), times));
    if (times.size() == 2) begin
      check(times[0] - tdc_t == 9, $sformatf("first after %0d", times[0] - tdc_t));
      check(times[1] - times[0] == 4, "interval");
    end
    // periodic: period 20, 3 triggers 5 apart
    times.delete();
    srst <= 1; one_shot = 0; period = 20; bn = 3; bi = 5; @(posedge clk); srst <= 0;
    repeat (100) @(posedge clk);
    check(times.size() >= 12 && times.size() <= 15, $sformatf("periodic count %0d", times.size()));
    for (int i = 3; i < times.size(); i++) check(times[i] - times[i-3] == 20, "period");
    for (int i = 0; i + 2 < times.size(); i += 3) begin
      check(times[i+1] - times[i] == 5 && times[i+2] - times[i+1] == 5, "burst interval");
    end
    times.delete(); bn = 0; repeat (60) @(posedge clk);
    check(times.size() == 0, "burst count zero");
    bn = 3; srst <= 1; repeat (60) @(posedge clk);
    check(times.size() == 0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
