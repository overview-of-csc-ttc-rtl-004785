// tb_readout_seq: the readout sequencer with a behavioural Readout FIFO,
// gray table and serial transmitter. For each queued cell it must send a
// SliceStart carrying the cell's slice information, clock the Gray-coded
// address into SD (sampled on RDCLK rising edges, MSB first), give 21
// RDCLK periods of the selected length (8 address, 1 read, 12 conversion)
// with 72 data-valid clocks, and return the cell to the Done FIFO. When
// idle with alignment checking on, CheckCoarse commands must appear. In a
// third round rd_align toggles every clock, as the 20 MHz write-step phase
// does, and every slice's first RDCLK edge must fall on the same clock
// parity.
`timescale 1ns/1ps
module tb_readout_seq;
  import sit_pkg::*;
  logic clk = 0, srst = 1, rate = 0, chk_en = 0, aph = 0, aln_en = 0;
  logic ro_pop, done_push, tsc_req, hp, ss, sf, rdclk, sd, rd, adc, trig_data, dav, busy;
  logic [7:0] done_addr, graddr, grdata;
  logic [3:0] cmd;
  logic [23:0] par;
  logic [1:0] gain;
  logic [10:0] roq [$];
  int tbusy = 0;
  always #12.5 clk = !clk;
  always @(posedge clk) aph <= !aph;
  assign grdata = graddr ^ (graddr >> 1);
  readout_seq #(.CHECK_PERIOD(500)) dut (.clk(clk), .srst(srst), .ro_empty(roq.size() == 0),
    .ro_head(roq.size() ? roq[0] : 11'h0), .ro_pop(ro_pop), .done_push(done_push), .done_addr(done_addr),
    .gray_raddr(graddr), .gray_rdata(grdata), .fault_code(4'h9), .read_rate(rate), .adc_phase(3'd2),
    .sd_phase(3'd0), .trig_delay(5'd2), .check_align(chk_en), .rd_align(!aln_en || aph), .tsc_req(tsc_req), .tsc_cmd(cmd),
    .tsc_param(par), .tsc_has_param(hp), .tsc_busy(tbusy != 0), .slice_start(ss), .slice_first(sf),
    .rd_clk(rdclk), .sd(sd), .rd(rd), .gain(gain), .adc_clk(adc), .trig_data(trig_data), .dav(dav), .busy(busy));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  logic [10:0] expq [$];
  logic [10:0] cur;
  bit prev_rdclk = 0;
  int edges = 0, davs = 0, last_edge = 0, cyc = 0, n_chk = 0, n_ss = 0, par0 = -1, n_aln = 0;
  logic [7:0] sdbits;
  bit dp, rp; logic [7:0] da;
  always @(negedge clk) if (!srst) begin
    #5;
    dp = done_push; da = done_addr; rp = ro_pop;
    if (tsc_req && tbusy == 0) begin
      if (cmd == TSC_SLICE_START) begin
        check(expq.size() > 0, "unexpected slice start");
        cur = expq.size() ? expq[0] : 0;
        check(hp && par == {4'h9, cur[7:0], 9'h0, cur[8], cur[9], cur[10]}, $sformatf("slice info %h", par));
        edges = 0; davs = 0; n_ss++;
      end else begin
        check(cmd == TSC_CHECK_COARSE && !hp && roq.size() == 0, "check coarse");
        n_chk++;
      end
    end
  end
  always @(posedge clk) if (!srst) begin
    cyc++;
    #1;
    if (tbusy != 0) tbusy--;
    else if (tsc_req) tbusy = hp ? 28 : 4;
    if (rdclk && !prev_rdclk) begin
      if (edges > 0) check(cyc - last_edge == (rate ? 6 : 8), $sformatf("rdclk period %0d", cyc - last_edge));
      if (edges == 0 && aln_en) begin
        if (par0 < 0) par0 = cyc % 2;
        else check(cyc % 2 == par0, "RDCLK start phase");
        n_aln++;
      end
      if (edges < 8) sdbits[7 - edges] = sd;
      edges++; last_edge = cyc;
    end
    prev_rdclk = rdclk;
    if (dav) davs++;
    if (dp) begin
      check(da == cur[7:0], "done address");
      check(edges == 21 && davs == 72, $sformatf("edges %0d davs %0d", edges, davs));
      check(sdbits == (cur[7:0] ^ (cur[7:0] >> 1)), $sformatf("sd %h", sdbits));
      void'(expq.pop_front());
    end
    if (rp) void'(roq.pop_front());
    dp = 0; rp = 0;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [10:0] e;
    repeat (2) @(negedge clk); srst = 0;
    for (int r = 0; r < 3; r++) begin
      rate = (r != 0);
      aln_en = (r == 2);
      for (int i = 0; i < (r == 2 ? 10 : 6); i++) begin
        e = 11'($urandom); roq.push_back(e); expq.push_back(e);
        // round 3: each slice starts from idle at a random clock
        repeat (r == 2 ? $urandom_range(400, 700) : $urandom_range(0, 300)) @(negedge clk);
      end
      wait (expq.size() == 0);
      repeat (5) @(negedge clk);
    end
    check(n_ss == 22, "all slices");
    check(n_aln == 10, $sformatf("aligned slices %0d", n_aln));
    aln_en = 0;
    check(n_chk == 0, "no check while disabled");
    chk_en = 1; repeat (1200) @(negedge clk);
    check(n_chk >= 2, $sformatf("check coarse count %0d", n_chk));
    check(gain == 0, "gain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
