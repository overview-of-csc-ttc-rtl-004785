// tb_ttc_controller: the TTC controller driven by its synchronous trigger
// generator. Phase 1: bursts closer than the dead time; every accepted
// trigger must be more than dead_time clocks after the previous one, and
// accepted + missed must equal the generated triggers. The run stops at
// max_triggers; then the TTC FIFO is read and must hold one three-word
// record per trigger with consecutive L1IDs. Phase 2: a rate limit of 2 per
// window must never be exceeded.
`timescale 1ns/1ps
module tb_ttc_controller;
  import sit_pkg::*;
  logic clk = 0, srst = 1, fifo_rd = 0, nop = 0;
  ttcc_setup_t setup;
  stg_burst_t burst;
  logic [15:0] dead = 30, maxt = 12, period = 200;
  logic trigger, ttype, cal, fempty, fovf, funf, running;
  logic [15:0] fdout, missed, triggers;
  logic [31:0] l1id;
  always #12.5 clk = !clk;
  ttc_controller dut (.clk(clk), .srst(srst), .fp_trig(1'b0), .sw_trig(1'b0), .l1a(1'b0), .setup(setup),
    .dead_time(dead), .max_triggers(maxt), .trig_delay(8'd10), .stg_period(period), .stg_burst(burst),
    .insuf_free(1'b0), .scac_busy(1'b0), .status(7'h55), .nop_req(nop), .fifo_rd(fifo_rd),
    .trigger(trigger), .trigger_type(ttype), .cal(cal), .fifo_dout(fdout), .fifo_empty(fempty),
    .fifo_overflow(fovf), .fifo_underflow(funf), .missed(missed), .triggers(triggers), .l1id(l1id),
    .running(running));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  int cyc = 0, last = -1000, ntrig = 0, nstg = 0, ncal = 0;
  int tlist [$];
  always @(posedge clk) begin
    cyc++;
    if (!srst && trigger) begin
      check(cyc - last > dead, $sformatf("spacing %0d", cyc - last));
      last = cyc; ntrig++; tlist.push_back(cyc);
    end
    if (!srst && dut.stg_t && running) nstg++;
    if (!srst && cal) ncal++;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    setup = '0; setup.stg_en = 1; setup.stop_at_max = 1; setup.cal_en_stg = 1;
    burst = '0; burst.burst_n = 3; burst.burst_i = 10;
    repeat (3) @(negedge clk); srst = 0;
    repeat (3000) @(negedge clk);
    check(!running, "stopped at max");
    check(ntrig == 12 && l1id == 12 && triggers == 12, $sformatf("count %0d l1id %0d", ntrig, l1id));
    check(missed > 0 && missed == 16'(nstg - ntrig), $sformatf("missed %0d stg %0d", missed, nstg));
    check(ncal > ntrig, "cal pulses for every generated trigger");
    for (int r = 0; r < 12; r++) begin
      logic [31:0] w [3];
      for (int k = 0; k < 3; k++) begin
        w[k][31:16] = fdout; fifo_rd = 1; @(negedge clk);
        w[k][15:0] = fdout; @(negedge clk); fifo_rd = 0;
      end
      check(w[0][31:30] == 2'b10 && w[0][23:17] == 7'h55 && w[0][16] == 0, $sformatf("word0 %h", w[0]));
      check(w[1] == {4'b0010, 28'(r)}, $sformatf("word1 %h", w[1]));
      check(w[2][31:28] == 4'b0100, $sformatf("word2 %h", w[2]));
    end
    check(fempty && !fovf && !funf, "fifo drained");
    // phase 2: rate limit
    srst = 1; setup.stop_at_max = 0; setup.max_rate = 2; dead = 3; period = 100; burst.burst_n = 1;
    tlist.delete(); @(negedge clk); srst = 0;
    repeat (20000) @(negedge clk);
    check(tlist.size() > 6, "rate phase triggered");
    for (int i = 2; i < tlist.size(); i++)
      check(tlist[i] - tlist[i-2] >= RATE_WINDOW_CLKS, $sformatf("rate window %0d", tlist[i] - tlist[i-2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
