// tb_sca_controller: the SCA controller with a behavioural serial
// transmitter. The write address is decoded from the Gray-coded WA lines of
// the front-end word and logged. Each trigger must produce `slices`
// SliceStart commands whose cells are consecutive write addresses, the
// first being the one written a fixed distance before the trigger, marked
// first only on the first slice. The distance is measured from the
// trigger's clock to the first clock the cell appeared on WA: at 40 MHz it
// is latency-2 (the trigger capture and WA registers are part of the
// latency); at 20 MHz with odd latency 41 the pipeline is 20 steps plus the
// one-clock fudge, and the cell (two clocks long) starts 36 or 37 clocks
// before, depending on the write phase at the trigger. At the end every cell must be back in
// circulation (enough free cells, idle, no faults). Run at 40 MHz and at
// 20 MHz with an odd latency.
`timescale 1ns/1ps
module tb_sca_controller;
  import sit_pkg::*;
  logic clk = 0, srst = 1, trig = 0, ttype = 0;
  scac_setup_t setup;
  roseq_setup_t roseq;
  logic [7:0] lat = 40, cells = 144, lut_rdata;
  logic tsc_req, hp, exp_rx, insuf, sbusy, sidle, f_wa, f_fe, f_ro;
  logic [3:0] cmd;
  logic [23:0] par;
  logic [15:0] fe;
  int tbusy = 0;
  always #12.5 clk = !clk;
  sca_controller dut (.clk(clk), .srst(srst), .setup(setup), .roseq(roseq), .latency(lat), .cells(cells),
    .check_align(1'b0), .trigger(trig), .trigger_type(ttype), .lut_we(1'b0), .lut_addr(8'h0), .lut_wdata(8'h0),
    .lut_rdata(lut_rdata), .tsc_req(tsc_req), .tsc_cmd(cmd), .tsc_param(par), .tsc_has_param(hp),
    .tsc_busy(tbusy != 0), .fe(fe), .expected_rxdata(exp_rx), .insuf_free(insuf), .scac_busy(sbusy),
    .scac_idle(sidle), .fault_bad_wa(f_wa), .fault_free_empty(f_fe), .fault_readout(f_ro));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  function automatic logic [7:0] ungray(input logic [7:0] g);
    logic [7:0] b;
    b[7] = g[7];
    for (int i = 6; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction
  int cyc = 0;
  int wcyc [$];          // clock at which each write address appeared
  logic [7:0] wlog [$];  // the write addresses in order
  logic [7:0] prev_wa = 8'hff;
  int trig_cyc [$];
  slice_info_t infos [$];
  // FE is registered: the WA seen on fe just after rising edge c was the
  // address during the clock period that ended at edge c
  always @(posedge clk) begin
    logic [7:0] g, a;
    cyc++;
    #1;
    for (int i = 0; i < 8; i++) g[i] = fe[12 - i];
    a = ungray(g);
    if (!srst && !dut.filling && (a != prev_wa || (setup.write_rate == 2'b11 && wlog.size() > 0))) begin
      wlog.push_back(a); wcyc.push_back(cyc);
    end
    prev_wa = a;
    if (tbusy != 0) tbusy--;
    else if (tsc_req) begin
      tbusy = hp ? 28 : 4;
      if (cmd == TSC_SLICE_START) infos.push_back(slice_info_t'(par));
    end
  end
  initial begin repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    setup = '0; setup.slices = 3; setup.read_rate = 1;
    roseq = '0; roseq.trig_delay = 2;
    for (int r = 0; r < 2; r++) begin
      setup.write_rate = r == 0 ? 2'b11 : 2'b00;
      lat = r == 0 ? 8'd40 : 8'd41;
      srst = 1; wlog.delete(); wcyc.delete(); trig_cyc.delete(); infos.delete(); prev_wa = 8'hff;
      repeat (3) @(negedge clk); srst = 0;
      repeat (cells + 200) @(negedge clk);
      check(!insuf && !f_wa && !f_fe && !f_ro, "ready after fill");
      for (int t = 0; t < 12; t++) begin
        wait (!sbusy); @(negedge clk);
        trig = 1; ttype = 1'(t); trig_cyc.push_back(cyc + 1); @(negedge clk); trig = 0;
        repeat ($urandom_range(50, 600)) @(negedge clk);
      end
      wait (sidle); repeat (20) @(negedge clk);
      check(infos.size() == 12 * 3, $sformatf("slice commands %0d", infos.size()));
      for (int t = 0; t < 12 && 3 * t + 2 < infos.size(); t++) begin
        int idx, d;
        idx = -1;
        for (int i = wlog.size() - 1; i >= 0; i--) if (wlog[i] == infos[3*t].sca_addr && wcyc[i] < trig_cyc[t]) begin idx = i; break; end
        check(idx >= 0, "first cell was written before the trigger");
        if (idx >= 0) begin
          d = trig_cyc[t] - wcyc[idx];
          check(r == 0 ? d == lat - 2 : (d == lat - 5 || d == lat - 4), $sformatf("rate %0d latency measured %0d for %0d", r, d, lat));
          for (int s = 1; s < 3; s++)
            check(idx + s < wlog.size() && infos[3*t+s].sca_addr == wlog[idx + s], "consecutive cells");
        end
        for (int s = 0; s < 3; s++) begin
          check(infos[3*t+s].first == (s == 0), "first flag");
          check(infos[3*t+s].ttype == 1'(t), "trigger type");
        end
      end
      check(!insuf && sidle && !f_wa && !f_fe && !f_ro, "all cells recycled, no faults");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
